// ham_pkg: shared constants, types and elaboration-time helpers for the
// Hamming-coded operational blocks.
//
// A codeword of K data bits carries M Hamming bits, M being the smallest
// value with 2^M >= K+M+1. The parity equations follow the classic positional
// layout (h1,h2,d1,h3,d2,d3,d4,...): parity bit h_i sits at position 2^(i-1)
// and covers every position whose bit i-1 is set; data bit d_j takes the j-th
// position that is not a power of two. For K=4 this gives
//   h1 = d1^d2^d4,  h2 = d1^d3^d4,  h3 = d2^d3^d4.
// Ports elsewhere carry the data bits and Hamming bits as separate vectors
// (d[0]=d1, h[0]=h1); only the equations depend on the positional layout.
//
// The functions here are evaluated only at elaboration, to build constant
// coverage masks and syndrome values; no hardware is built from them directly.
package ham_pkg;

  localparam int unsigned MAX_K = 64;

  // ALU opcodes {e1,e2}: bit 1 is e1, bit 0 is e2.
  typedef enum logic [1:0] {
    OP_OR  = 2'b00,
    OP_ADD = 2'b01,
    OP_AND = 2'b10,
    OP_XOR = 2'b11
  } alu_op_e;

  // Operation computed inside one correcting channel.
  typedef enum logic [2:0] {
    CH_AND,
    CH_OR,
    CH_ADD,
    CH_SHL,
    CH_SHR
  } chan_op_e;

  // Number of Hamming bits for k data bits.
  function automatic int unsigned ham_m(input int unsigned k);
    int unsigned m;
    m = 0;
    while ((1 << m) < k + m + 1) m++;
    return m;
  endfunction

  // 1-based codeword position of data bit j (0-based).
  function automatic int unsigned ham_dpos(input int unsigned j);
    int unsigned pos;
    int unsigned seen;
    pos  = 2;
    seen = 0;
    while (seen <= j) begin
      pos++;
      if ((pos & (pos - 1)) != 0) seen++;
    end
    return pos;
  endfunction

  // Mask of the data bits covered by Hamming bit i (0-based).
  function automatic logic [MAX_K-1:0] ham_cover(input int unsigned i, input int unsigned k);
    logic [MAX_K-1:0] mask;
    mask = '0;
    for (int unsigned j = 0; j < k; j++)
      mask[j] = ((ham_dpos(j) >> i) & 1) == 1;
    return mask;
  endfunction

  // Hamming bit i of the all-ones data word: parity of the number of data
  // bits that bit covers.
  function automatic logic ham_ones_parity(input int unsigned i, input int unsigned k);
    return ^ham_cover(i, k);
  endfunction

endpackage
