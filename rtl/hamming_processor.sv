// hamming_processor: the operational core of a Hamming-coded processor.
//
// Operands, opcode and results stay in error-correcting code throughout.
// The core holds, side by side:
//   - hamming_alu: XOR, AND, ADD and OR of two Hamming-coded operands,
//     selected by a Hamming-coded opcode (op_e = {e1,e2}: XOR 11, AND 10,
//     ADD 01, OR 00; op_h = {h3c,h2c,h1c} = {e2, e1, e1^e2});
//   - hbw_not, hshift and hcorrect_nop: single-operand units on X, each with
//     its own result port (they are not among the four coded opcodes);
//   - bch_bw_and, bch_bw_xor, bch_bw_or and bch_add: the same operations on
//     two BCH(15,7) codewords, which tolerate two errors in place of one;
//     each has its own result port (the document gives no opcode selection
//     for the BCH units).
// Every result bit of every unit is produced by a circuit of its own, so a
// single input error or faulty gate (two for the BCH unit) leaves each result
// correctable. All paths are combinational; there is no clock or reset.
//
// The document gives no register file, sequencer or memory for the processor,
// so the core is the set of operational blocks it does describe.
module hamming_processor #(
  parameter int unsigned K = 4,
  localparam int unsigned M = ham_pkg::ham_m(K)
) (
  // Hamming-coded operands and opcode
  input  logic [K-1:0]  x_d,
  input  logic [M-1:0]  x_h,
  input  logic [K-1:0]  y_d,
  input  logic [M-1:0]  y_h,
  input  logic [1:0]    op_e,
  input  logic [2:0]    op_h,
  // ALU result
  output logic [K-1:0]  r_d,
  output logic [M-1:0]  r_h,
  // single-operand results on X
  output logic [K-1:0]  not_d,
  output logic [M-1:0]  not_h,
  output logic [K-1:0]  shl_d,
  output logic [M-1:0]  shl_h,
  output logic [K-1:0]  nop_d,
  output logic [M-1:0]  nop_h,
  // BCH(15,7) operands and results
  input  logic [14:0]   bx,
  input  logic [14:0]   by,
  output logic [14:0]   br_and,
  output logic [14:0]   br_xor,
  output logic [14:0]   br_or,
  output logic [14:0]   br_add
);

  hamming_alu #(.K(K)) u_alu (
    .x_d(x_d), .x_h(x_h), .y_d(y_d), .y_h(y_h),
    .op_e(op_e), .op_h(op_h), .r_d(r_d), .r_h(r_h)
  );

  hbw_not #(.K(K)) u_not (.x_d(x_d), .x_h(x_h), .r_d(not_d), .r_h(not_h));

  hshift #(.K(K), .SHAMT(1), .LEFT(1'b1)) u_shl (
    .x_d(x_d), .x_h(x_h), .r_d(shl_d), .r_h(shl_h)
  );

  hcorrect_nop #(.K(K)) u_nop (.x_d(x_d), .x_h(x_h), .r_d(nop_d), .r_h(nop_h));

  bch_bw_and u_bch_and (.x(bx), .y(by), .r(br_and));
  bch_bw_xor u_bch_xor (.x(bx), .y(by), .r(br_xor));
  bch_bw_or  u_bch_or  (.x(bx), .y(by), .r(br_or));
  bch_add    u_bch_add (.x(bx), .y(by), .r(br_add));

endmodule
