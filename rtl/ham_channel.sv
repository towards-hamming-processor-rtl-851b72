// ham_channel: one independent correcting channel of a Hamming operational
// block.
//
// The channel corrects both operands with its own two error correctors,
// applies the operation OP to the corrected data words and drives a single
// output bit: data bit IDX of the result (OUT_PARITY=0) or Hamming bit IDX of
// the result (OUT_PARITY=1), the latter being the parity over the result bits
// that Hamming bit covers. Because every output bit of a block comes from its
// own channel, one faulty gate inside a channel corrupts at most that one
// output bit, and the result stays correctable.
//
// This is the column "error corrector -> operation -> XOR" drawn once per
// Hamming bit in the AND and adder figures of the document and once per data
// bit of the adder. For single-operand operations (shifts) the y inputs are
// unused. Combinational.
module ham_channel #(
  parameter int unsigned      K          = 4,
  parameter ham_pkg::chan_op_e OP        = ham_pkg::CH_AND,
  parameter bit               OUT_PARITY = 1'b1,
  parameter int unsigned      IDX        = 0,
  parameter int unsigned      SHAMT      = 1,
  localparam int unsigned     M          = ham_pkg::ham_m(K)
) (
  input  logic [K-1:0] x_d,
  input  logic [M-1:0] x_h,
  input  logic [K-1:0] y_d,
  input  logic [M-1:0] y_h,
  output logic         out
);

  logic [K-1:0] cx, cy, res;

  ham_corrector #(.K(K)) u_cx (.c_d(x_d), .c_h(x_h), .dc(cx), .err());
  ham_corrector #(.K(K)) u_cy (.c_d(y_d), .c_h(y_h), .dc(cy), .err());

  always_comb begin
    unique case (OP)
      ham_pkg::CH_AND: res = cx & cy;
      ham_pkg::CH_OR:  res = cx | cy;
      ham_pkg::CH_ADD: res = cx + cy;
      ham_pkg::CH_SHL: res = cx << SHAMT;
      ham_pkg::CH_SHR: res = cx >> SHAMT;
      default:         res = '0;
    endcase
  end

  if (OUT_PARITY) begin : g_par
    localparam logic [K-1:0] COVER = K'(ham_pkg::ham_cover(IDX, K));
    assign out = ^(res & COVER);
  end else begin : g_dat
    assign out = res[IDX];
  end

endmodule
