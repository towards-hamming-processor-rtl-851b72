// hadd: addition of two Hamming-coded operands (sum modulo 2^K).
//
// Every output bit has its own channel (ham_channel). Data bit r_j comes from
// a channel that corrects X and Y and adds them, keeping only sum bit j
// (FA1..FAK); Hamming bit h_r^i comes from a channel that corrects X and Y,
// adds them and takes the parity of the sum bits h_i covers. A carry chain
// is never shared between output bits, so one faulty gate corrupts at most
// one output bit. Because every channel works on corrected operands, a single
// input error is removed: with no faulty gate the result is the exact
// codeword of Correct(X)+Correct(Y). Combinational.
//
// The per-bit channel structure follows the document's adder figure. Each
// data channel holds a full K-bit adder; the bits above j are unused and
// synthesis trims them. The carry out is dropped (this design's choice).
module hadd #(
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
    ham_channel #(.K(K), .OP(ham_pkg::CH_ADD), .OUT_PARITY(1'b0), .IDX(j)) u_ch (
      .x_d(x_d), .x_h(x_h), .y_d(y_d), .y_h(y_h), .out(r_d[j])
    );
  end

  for (genvar i = 0; i < M; i++) begin : g_h
    ham_channel #(.K(K), .OP(ham_pkg::CH_ADD), .OUT_PARITY(1'b1), .IDX(i)) u_ch (
      .x_d(x_d), .x_h(x_h), .y_d(y_d), .y_h(y_h), .out(r_h[i])
    );
  end

endmodule
