// hbw_xor: bit-wise XOR of two Hamming-coded operands.
//
// The Hamming bits are linear (XOR) functions of the data bits, so the XOR of
// two codewords is the codeword of the XOR of their data. The block is K+M
// independent two-input XOR gates, one per codeword bit. An error on one input
// bit, or one faulty gate, reaches exactly one output bit at the same
// position, so the result is correctable whenever the number of input errors
// plus faulty gates is at most one. No correction takes place: input errors
// pass through to the result. Combinational.
//
// Structure as in the document; K=4 gives its (7,4) example.
module hbw_xor #(
  parameter int unsigned K = 4,
  localparam int unsigned M = ham_pkg::ham_m(K)
) (
  input  logic [K-1:0] x_d,
  input  logic [M-1:0] x_h,
  input  logic [K-1:0] y_d,
  input  logic [M-1:0] y_h,
  output logic [K-1:0] r_d,
  output logic [M-1:0] r_h
);

  for (genvar j = 0; j < K; j++) begin : g_d
    assign r_d[j] = x_d[j] ^ y_d[j];
  end
  for (genvar i = 0; i < M; i++) begin : g_h
    assign r_h[i] = x_h[i] ^ y_h[i];
  end

endmodule
