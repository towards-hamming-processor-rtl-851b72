// bch_bw_or: bit-wise OR of two BCH(15,7) codewords.
//
// Data bits are single OR gates on the raw input data bits; each of the 8
// check bits comes from its own bch_channel (correct X and Y, OR, encode,
// keep one bit). An input error reaches only the data bit of the same index,
// a faulty gate only the output it drives, so the result stays within
// distance 2 of the codeword of Correct(X) OR Correct(Y) when input errors
// plus faulty gates number at most two. Combinational.
//
// Built like the document's BCH AND block, with OR in place of AND, as its
// text says the other operations are built.
module bch_bw_or
  import bch_pkg::*;
(
  input  logic [BCH_N-1:0] x,
  input  logic [BCH_N-1:0] y,
  output logic [BCH_N-1:0] r
);

  for (genvar j = 0; j < BCH_K; j++) begin : g_d
    assign r[BCH_P+j] = x[BCH_P+j] | y[BCH_P+j];
  end

  for (genvar i = 0; i < BCH_P; i++) begin : g_p
    bch_channel #(.OP(ham_pkg::CH_OR), .OUT_PARITY(1'b1), .IDX(i)) u_ch (
      .x(x), .y(y), .out(r[i])
    );
  end

endmodule
