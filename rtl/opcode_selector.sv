// opcode_selector: opcode selection protection for a whole result codeword.
//
// All four operation units compute their results every time; this block picks
// one codeword according to a Hamming-coded opcode. Each of the K+M result
// bits has its own opsel_bit: its own four opcode correctors, four decode
// gates and AND-OR multiplexer. A single error on an opcode line is
// corrected; a single faulty gate anywhere in the selector changes at most one
// result bit, which leaves the result correctable. Combinational.
//
// Candidate and result codewords are packed {h, d}: bits K-1:0 are data bits
// d1..dK, bits K+M-1:K are Hamming bits h1..hM.
//
// Opcode values (XOR 11, AND 10, ADD 01, OR 00) and the per-bit replication
// follow the document. The opcode carries three check bits, h1c = e1^e2,
// h2c = e1, h3c = e2, a distance-3 code; that count is this design's choice.
module opcode_selector #(
  parameter int unsigned K = 4,
  localparam int unsigned M = ham_pkg::ham_m(K),
  localparam int unsigned N = K + M
) (
  input  logic [1:0]   op_e,
  input  logic [2:0]   op_h,
  input  logic [N-1:0] cand_xor,
  input  logic [N-1:0] cand_and,
  input  logic [N-1:0] cand_add,
  input  logic [N-1:0] cand_or,
  output logic [N-1:0] sel
);

  for (genvar b = 0; b < N; b++) begin : g_bit
    opsel_bit u_sel (
      .op_e(op_e), .op_h(op_h),
      .c_xor(cand_xor[b]), .c_and(cand_and[b]), .c_add(cand_add[b]), .c_or(cand_or[b]),
      .out(sel[b])
    );
  end

endmodule
