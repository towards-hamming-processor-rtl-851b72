// bch_add: addition of two BCH(15,7) coded operands (sum modulo 2^7).
//
// Every output bit has its own bch_channel: the 7 data-bit channels correct
// X and Y, add them and keep sum bit j; the 8 check-bit channels correct,
// add, encode and keep check bit i. No carry chain or encoder is shared
// between output bits. With no faulty gate the result is the exact codeword
// of Correct(X) + Correct(Y) even with up to two input errors; with faulty
// gates and no input errors, up to two output bits can be wrong, which the
// code corrects. Combinational.
//
// The document's Hamming adder construction carried over to the BCH code, as
// its text proposes; the carry out is dropped (this design's choice).
module bch_add
  import bch_pkg::*;
(
  input  logic [BCH_N-1:0] x,
  input  logic [BCH_N-1:0] y,
  output logic [BCH_N-1:0] r
);

  for (genvar j = 0; j < BCH_K; j++) begin : g_d
    bch_channel #(.OP(ham_pkg::CH_ADD), .OUT_PARITY(1'b0), .IDX(j)) u_ch (
      .x(x), .y(y), .out(r[BCH_P+j])
    );
  end

  for (genvar i = 0; i < BCH_P; i++) begin : g_p
    bch_channel #(.OP(ham_pkg::CH_ADD), .OUT_PARITY(1'b1), .IDX(i)) u_ch (
      .x(x), .y(y), .out(r[i])
    );
  end

endmodule
