// tb_bch_ref: reference model of the BCH(15,7) code for the testbenches.
//
// Encoding runs the bit-serial division of x^8 d(x) by
// g(x) = x^8 + x^7 + x^6 + x^4 + 1 in a linear feedback shift register, one
// data bit per step, highest power first. Decoding is a brute-force search
// for the nearest of the 128 codewords.
package tb_bch_ref;

  localparam logic [7:0] G_LOW = 8'b1101_0001;   // g(x) without x^8

  function automatic logic [7:0] parity(input logic [6:0] d);
    logic [7:0] s;
    logic       fb;
    s = '0;
    for (int i = 6; i >= 0; i--) begin
      fb = d[i] ^ s[7];
      s  = {s[6:0], 1'b0} ^ (fb ? G_LOW : 8'd0);
    end
    return s;
  endfunction

  function automatic logic [14:0] codeword(input logic [6:0] d);
    return {d, parity(d)};
  endfunction

  function automatic int hdist(input logic [14:0] a, input logic [14:0] b);
    int c;
    c = 0;
    for (int i = 0; i < 15; i++) c += int'(a[i] ^ b[i]);
    return c;
  endfunction

  function automatic logic [6:0] decode(input logic [14:0] w);
    int best, bd;
    best = 0;
    bd   = 99;
    for (int v = 0; v < 128; v++)
      if (hdist(w, codeword(7'(v))) < bd) begin
        bd   = hdist(w, codeword(7'(v)));
        best = v;
      end
    return 7'(best);
  endfunction

  // Random word with exactly n distinct bits set (n <= 15).
  function automatic logic [14:0] rand_err(input int n);
    logic [14:0] e;
    e = '0;
    while ($countones(e) < n) e[$urandom_range(14)] = 1'b1;
    return e;
  endfunction

endpackage
