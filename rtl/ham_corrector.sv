// ham_corrector: single-error corrector for one Hamming codeword.
//
// The syndrome bit s_i is the received Hamming bit h_i XOR the parity of the
// received data bits it covers. A non-zero syndrome equals the codeword
// position of the single flipped bit; if that position holds a data bit, the
// bit is inverted. The output is Correct(D), the data word of the nearest
// codeword, for any input with at most one bit in error. An error in a
// Hamming bit leaves the data unchanged. Purely combinational.
//
// This is the "error corrector" box that every correcting channel of the
// design holds its own copy of. The document names the box and its function;
// the syndrome decoder inside is the textbook one. The err output (syndrome
// non-zero) is an addition of this design, for observation only.
module ham_corrector #(
  parameter int unsigned K = 4,
  localparam int unsigned M = ham_pkg::ham_m(K)
) (
  input  logic [K-1:0] c_d,  // received data bits d1..dK
  input  logic [M-1:0] c_h,  // received Hamming bits h1..hM
  output logic [K-1:0] dc,   // corrected data bits
  output logic         err   // syndrome non-zero
);

  logic [M-1:0] syn;

  for (genvar i = 0; i < M; i++) begin : g_syn
    localparam logic [K-1:0] COVER = K'(ham_pkg::ham_cover(i, K));
    assign syn[i] = c_h[i] ^ (^(c_d & COVER));
  end

  for (genvar j = 0; j < K; j++) begin : g_fix
    localparam logic [M-1:0] POS = M'(ham_pkg::ham_dpos(j));
    assign dc[j] = c_d[j] ^ (syn == POS);
  end

  assign err = |syn;

endmodule
