// bch_channel: one independent correcting channel of a BCH(15,7) operational
// block.
//
// Two private bch_corrector instances recover Correct(D_X) and Correct(D_Y);
// the operation OP (AND, OR or ADD modulo 2^7) is applied to them and the
// channel drives one output bit: data bit IDX of the result
// (OUT_PARITY = 0) or check bit IDX of its codeword, from a private
// bch_encoder (OUT_PARITY = 1). Since every output bit of a block has its own
// channel, a faulty gate inside one channel corrupts at most one output bit.
// Combinational.
//
// This is the BCH counterpart of the Hamming channel: corrector, operation
// and encoder as in the document's BCH figure, generalised to the other
// operations as its text suggests.
module bch_channel
  import bch_pkg::*;
#(
  parameter ham_pkg::chan_op_e OP         = ham_pkg::CH_AND,
  parameter bit                OUT_PARITY = 1'b1,
  parameter int unsigned       IDX        = 0
) (
  input  logic [BCH_N-1:0] x,
  input  logic [BCH_N-1:0] y,
  output logic             out
);

  logic [BCH_K-1:0] cx, cy, res;

  bch_corrector u_cx (.c(x), .dc(cx), .err());
  bch_corrector u_cy (.c(y), .dc(cy), .err());

  always_comb begin
    unique case (OP)
      ham_pkg::CH_AND: res = cx & cy;
      ham_pkg::CH_OR:  res = cx | cy;
      ham_pkg::CH_ADD: res = cx + cy;
      default:         res = '0;
    endcase
  end

  if (OUT_PARITY) begin : g_par
    logic [BCH_P-1:0] par;
    bch_encoder u_enc (.d(res), .p(par));
    assign out = par[IDX];
  end else begin : g_dat
    assign out = res[IDX];
  end

endmodule
