// bch_bw_and: bit-wise AND of two BCH(15,7) codewords.
//
// The 7 data bits of the result are single AND gates on the raw data bits of
// X and Y. Each of the 8 check bits P_i comes from its own channel: two BCH
// correctors recover Correct(D_X) and Correct(D_Y), their AND is encoded by a
// private bch_encoder and only check bit i is kept. Input errors reach only
// the data bits of the same index and never the check bits, and a faulty gate
// changes only the output it drives, so the result stays within distance 2
// of the codeword of Correct(X) AND Correct(Y) when input errors plus faulty
// gates number at most two. Combinational.
//
// Structure as in the document's BCH bit-wise AND figure.
module bch_bw_and
  import bch_pkg::*;
(
  input  logic [BCH_N-1:0] x,
  input  logic [BCH_N-1:0] y,
  output logic [BCH_N-1:0] r
);

  for (genvar j = 0; j < BCH_K; j++) begin : g_d
    assign r[BCH_P+j] = x[BCH_P+j] & y[BCH_P+j];
  end

  for (genvar i = 0; i < BCH_P; i++) begin : g_p
    logic [BCH_K-1:0] cx, cy;
    logic [BCH_P-1:0] par;
    bch_corrector u_cx  (.c(x), .dc(cx), .err());
    bch_corrector u_cy  (.c(y), .dc(cy), .err());
    bch_encoder   u_enc (.d(cx & cy), .p(par));
    assign r[i] = par[i];
  end

endmodule
