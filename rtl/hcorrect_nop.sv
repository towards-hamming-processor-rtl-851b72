// hcorrect_nop: the correct-nop operation.
//
// Adds the all-zero codeword to X with the per-bit-channel adder (hadd).
// Every channel corrects X before adding, so an input with one bit in error
// leaves as the exact codeword of Correct(X); with one faulty gate and no
// input error the output still has at most one wrong bit. Combinational.
//
// This is the construction the document suggests for correcting an operand
// on request.
module hcorrect_nop #(
  parameter int unsigned K = 4,
  localparam int unsigned M = ham_pkg::ham_m(K)
) (
  input  logic [K-1:0] x_d,
  input  logic [M-1:0] x_h,
  output logic [K-1:0] r_d,
  output logic [M-1:0] r_h
);

  hadd #(.K(K)) u_add (
    .x_d(x_d), .x_h(x_h), .y_d('0), .y_h('0), .r_d(r_d), .r_h(r_h)
  );

endmodule
