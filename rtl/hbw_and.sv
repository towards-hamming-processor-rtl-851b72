// hbw_and: bit-wise AND of two Hamming-coded operands.
//
// Data bit r_j is a single AND gate on the raw input bits x_j and y_j. Each
// Hamming bit h_r^i comes from its own channel (ham_channel) that corrects X
// and Y, computes the bit-wise AND of the corrected words and takes the parity
// of the result bits h_i covers. An error in one input data bit can reach
// only the data bit of the same index, and the Hamming bits are computed from
// corrected operands; a faulty gate reaches only the one output it drives.
// Either way the result has at most one wrong bit and stays correctable.
// Combinational.
//
// Structure as in the document's bit-wise AND figure.
module hbw_and #(
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
    assign r_d[j] = x_d[j] & y_d[j];
  end

  for (genvar i = 0; i < M; i++) begin : g_h
    ham_channel #(.K(K), .OP(ham_pkg::CH_AND), .OUT_PARITY(1'b1), .IDX(i)) u_ch (
      .x_d(x_d), .x_h(x_h), .y_d(y_d), .y_h(y_h), .out(r_h[i])
    );
  end

endmodule
