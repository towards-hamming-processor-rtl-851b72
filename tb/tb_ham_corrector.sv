// tb_ham_corrector: checks the single-error corrector.
//
// For the (7,4) code every data word is sent clean and with each of its 7
// bits flipped; the corrected data must equal the original and err must be
// high exactly when a bit was flipped. A second instance with K = 11 (the
// (15,11) code) is checked on random words with a random single flip.
// Reference codewords come from tb_ham_ref. Ends with the TB_RESULT line.
module tb_ham_corrector;
  import tb_ham_ref::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [3:0]  d4, dc4;
  logic [2:0]  h4;
  logic        err4;
  logic [10:0] d11, dc11;
  logic [3:0]  h11;
  logic        err11;

  ham_corrector #(.K(4))  dut4  (.c_d(d4),  .c_h(h4),  .dc(dc4),  .err(err4));
  ham_corrector #(.K(11)) dut11 (.c_d(d11), .c_h(h11), .dc(dc11), .err(err11));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      for (int e = -1; e < 7; e++) begin
        logic [6:0] cw, flip;
        cw   = {enc(16'(v), 4)[2:0], 4'(v)};
        flip = (e < 0) ? 7'd0 : 7'(1 << e);
        {h4, d4} = cw ^ flip;
        #1;
        check(dc4 == 4'(v), $sformatf("K=4 v=%0d flip=%0d dc=%h", v, e, dc4));
        check(err4 == (e >= 0), $sformatf("K=4 err v=%0d flip=%0d", v, e));
      end
    end
    for (int n = 0; n < 2000; n++) begin
      logic [10:0] v;
      logic [14:0] cw;
      int e;
      v  = 11'($urandom);
      e  = $urandom_range(15) - 1;
      cw = {enc(16'(v), 11)[3:0], v};
      if (e >= 0) cw[e] = ~cw[e];
      {h11, d11} = cw;
      #1;
      check(dc11 == v, $sformatf("K=11 v=%h flip=%0d", v, e));
      check(err11 == (e >= 0), "K=11 err");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
