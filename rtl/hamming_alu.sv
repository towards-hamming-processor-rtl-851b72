// hamming_alu: Hamming distance preserving ALU.
//
// Two Hamming-coded operands X and Y feed four operation units in parallel:
// bit-wise XOR (hbw_xor), bit-wise AND (hbw_and), addition (hadd) and bit-wise
// OR (hbw_or). Each unit builds every output bit in its own independent
// circuit, so its result is a correctable codeword of Correct(X) op Correct(Y)
// as long as input errors plus faulty gates number at most one. The
// opcode_selector then picks one result with a Hamming-coded opcode, again
// with an independent selection circuit per result bit.
//
// Opcodes {e1,e2}: XOR 11, AND 10, ADD 01, OR 00; op_h = {h3c,h2c,h1c} with
// h1c = e1^e2, h2c = e1, h3c = e2. Fully combinational; the result is valid one
// propagation delay after the inputs.
//
// The unit set, the opcodes and the compute-all-then-select scheme follow the
// document; the three-bit opcode check code is this design's choice.
module hamming_alu #(
  parameter int unsigned K = 4,
  localparam int unsigned M = ham_pkg::ham_m(K)
) (
  input  logic [K-1:0] x_d,
  input  logic [M-1:0] x_h,
  input  logic [K-1:0] y_d,
  input  logic [M-1:0] y_h,
  input  logic [1:0]   op_e,
  input  logic [2:0]   op_h,
  output logic [K-1:0] r_d,
  output logic [M-1:0] r_h
);

  logic [K-1:0] xor_d, and_d, add_d, or_d;
  logic [M-1:0] xor_h, and_h, add_h, or_h;

  hbw_xor #(.K(K)) u_xor (.x_d(x_d), .x_h(x_h), .y_d(y_d), .y_h(y_h), .r_d(xor_d), .r_h(xor_h));
  hbw_and #(.K(K)) u_and (.x_d(x_d), .x_h(x_h), .y_d(y_d), .y_h(y_h), .r_d(and_d), .r_h(and_h));
  hadd    #(.K(K)) u_add (.x_d(x_d), .x_h(x_h), .y_d(y_d), .y_h(y_h), .r_d(add_d), .r_h(add_h));
  hbw_or  #(.K(K)) u_or  (.x_d(x_d), .x_h(x_h), .y_d(y_d), .y_h(y_h), .r_d(or_d),  .r_h(or_h));

  opcode_selector #(.K(K)) u_sel (
    .op_e(op_e), .op_h(op_h),
    .cand_xor({xor_h, xor_d}), .cand_and({and_h, and_d}),
    .cand_add({add_h, add_d}), .cand_or({or_h, or_d}),
    .sel({r_h, r_d})
  );

endmodule
