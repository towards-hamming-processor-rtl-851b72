// hbw_not: bit-wise NOT of a Hamming-coded operand.
//
// NOT is an XOR with the codeword of the all-ones data word: every data bit
// is XORed with 1 and Hamming bit h_i with h_i(1...1), the parity of the
// number of data bits h_i covers (1,1,1 for the (7,4) code). One gate per
// codeword bit, so errors keep their position, as in the XOR block.
// Combinational.
//
// The structure follows the document. The constants h_i(1...1) are computed
// from the parity equations used throughout this design, in which h1 covers
// three data bits of the (7,4) code.
module hbw_not #(
  parameter int unsigned K = 4,
  localparam int unsigned M = ham_pkg::ham_m(K)
) (
  input  logic [K-1:0] x_d,
  input  logic [M-1:0] x_h,
  output logic [K-1:0] r_d,
  output logic [M-1:0] r_h
);

  for (genvar j = 0; j < K; j++) begin : g_d
    assign r_d[j] = x_d[j] ^ 1'b1;
  end
  for (genvar i = 0; i < M; i++) begin : g_h
    localparam logic ONES_H = ham_pkg::ham_ones_parity(i, K);
    assign r_h[i] = x_h[i] ^ ONES_H;
  end

endmodule
