// tb_ham_ref: reference model of the Hamming code for the testbenches.
//
// Written independently of the RTL: a codeword is built by placing the data
// bits at the non-power-of-two positions of a positional word and setting
// each parity position so that the XOR of all positions with that position's
// bit set is zero. Correction is a brute-force search for the nearest
// codeword over all 2^K data words, not a syndrome decoder.
package tb_ham_ref;

  localparam int MAXN = 32;

  function automatic int m_of(input int k);
    int m;
    m = 1;
    while ((1 << m) < k + m + 1) m++;
    return m;
  endfunction

  // Hamming bits (h[0] = h1) of data word d (d[0] = d1).
  function automatic logic [7:0] enc(input logic [15:0] d, input int k);
    logic [MAXN:1] w;
    logic [7:0]    h;
    int            n, j, m;
    m = m_of(k);
    n = k + m;
    w = '0;
    j = 0;
    for (int p = 1; p <= n; p++)
      if ((p & (p - 1)) != 0) begin
        w[p] = d[j];
        j++;
      end
    h = '0;
    for (int i = 0; i < m; i++) begin
      logic par;
      par = 1'b0;
      for (int p = 1; p <= n; p++)
        if (((p >> i) & 1) == 1 && (p & (p - 1)) != 0) par ^= w[p];
      h[i] = par;
    end
    return h;
  endfunction

  function automatic int popc(input logic [31:0] v);
    int c;
    c = 0;
    for (int i = 0; i < 32; i++) c += int'(v[i]);
    return c;
  endfunction

  // Distance between the word (d,h) and the codeword of data e.
  function automatic int dist_to(input logic [15:0] d, input logic [7:0] h,
                                 input logic [15:0] e, input int k);
    logic [15:0] dm;
    logic [7:0]  hm;
    dm = ((d ^ e) & ((16'd1 << k) - 1));
    hm = ((h ^ enc(e, k)) & ((8'd1 << m_of(k)) - 1));
    return popc({16'd0, dm}) + popc({24'd0, hm});
  endfunction

  // Data word of the nearest codeword (the first found at minimum distance).
  function automatic logic [15:0] correct(input logic [15:0] d, input logic [7:0] h, input int k);
    int best, bd;
    best = 0;
    bd   = 99;
    for (int e = 0; e < (1 << k); e++) begin
      int dd;
      dd = dist_to(d, h, 16'(e), k);
      if (dd < bd) begin
        bd   = dd;
        best = e;
      end
    end
    return 16'(best);
  endfunction

endpackage
