// bch_bw_xor: bit-wise XOR of two BCH(15,7) codewords.
//
// The BCH code is linear, so the XOR of two codewords is the codeword of the
// XOR of their data. The block is 15 independent XOR gates, one per codeword
// bit: up to two input errors or faulty gates in total give at most two wrong
// output bits at the same positions, which the code still corrects. Nothing
// is corrected here. Combinational.
//
// The document states that the Hamming constructions carry over to BCH
// codes, with linear parts computed by linear circuits; this block applies
// the XOR construction to the BCH code.
module bch_bw_xor
  import bch_pkg::*;
(
  input  logic [BCH_N-1:0] x,
  input  logic [BCH_N-1:0] y,
  output logic [BCH_N-1:0] r
);

  for (genvar b = 0; b < BCH_N; b++) begin : g_b
    assign r[b] = x[b] ^ y[b];
  end

endmodule
