// bch_encoder: systematic encoder of the BCH(15,7) code.
//
// The check bits are the remainder of x^8 d(x) divided by the generator
// g(x): p(x) = x^8 d(x) mod g(x), and the codeword is {d, p}. The division is
// unrolled into a parallel XOR network (seven conditional subtractions of the
// shifted generator), so the block is combinational.
//
// The document describes this encoding (shift the data and add the
// remainder of the division); the code and the parallel form are this
// design's choices.
module bch_encoder
  import bch_pkg::*;
(
  input  logic [BCH_K-1:0] d,   // data bits, d[i] = coefficient of x^(i+8)
  output logic [BCH_P-1:0] p    // check bits, p[i] = coefficient of x^i
);

  logic [BCH_N-1:0] rem;

  always_comb begin
    rem = {d, {BCH_P{1'b0}}};
    for (int i = BCH_N - 1; i >= int'(BCH_P); i--) begin
      if (rem[i]) rem ^= BCH_N'(BCH_GEN) << (i - BCH_P);
    end
    p = rem[BCH_P-1:0];
  end

endmodule
