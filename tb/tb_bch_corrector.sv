// tb_bch_corrector: checks the double-error-correcting BCH(15,7) decoder.
//
// Every data word is sent clean, with every single-bit error and with every
// double-bit error (1 + 15 + 105 patterns); the corrected data must equal the
// original and err must be high exactly when an error was added. Codewords
// come from the LFSR model of tb_bch_ref. Ends with the TB_RESULT line.
module tb_bch_corrector;
  import tb_bch_ref::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [14:0] c;
  logic [6:0]  dc;
  logic        err;

  bch_corrector dut (.c(c), .dc(dc), .err(err));

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
    for (int v = 0; v < 128; v++)
      for (int a = -1; a < 15; a++)
        for (int b = a + 1; b < 15; b++) begin
          logic [14:0] e;
          e = '0;
          if (a >= 0) e[a] = 1'b1;
          if (a >= 0 && b > a) e[b] = 1'b1;
          if (a < 0 && b > 0) continue;   // clean word only once
          c = codeword(7'(v)) ^ e;
          #1;
          check(dc == 7'(v), $sformatf("v=%h err bits %0d,%0d dc=%h", v, a, b, dc));
          check(err == (e != '0), $sformatf("err flag v=%h", v));
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
