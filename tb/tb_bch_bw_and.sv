// tb_bch_bw_and: checks the bit-wise AND of BCH(15,7) codewords.
//
// Random data words X and Y are encoded with the tb_bch_ref model and given
// 0, 1 or 2 bit errors in total, split at random between the two operands.
// The result must be within distance 2 of the codeword of
// E = Correct(X) AND Correct(Y), and must decode to E; its check bits must be
// exact, and its data bits must be the AND of the raw input data bits.
// Every data pair is also run clean against the exact codeword.
// Ends with the TB_RESULT line; a watchdog stops a hung run.
module tb_bch_bw_and;
  import tb_bch_ref::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [14:0] x, y, r;

  bch_bw_and dut (.x(x), .y(y), .r(r));

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
    for (int n = 0; n < 3000; n++) begin
      logic [6:0]  xv, yv, ev;
      logic [14:0] ex_cw;
      int nerr, nx;
      xv    = 7'($urandom);
      yv    = 7'($urandom);
      ev    = xv & yv;
      ex_cw = codeword(ev);
      nerr  = n % 3;
      nx    = $urandom_range(nerr);
      x = codeword(xv) ^ rand_err(nx);
      y = codeword(yv) ^ rand_err(nerr - nx);
      #1;
      if (nerr == 0) check(r == ex_cw, $sformatf("clean x=%h y=%h r=%h", xv, yv, r));
      check(hdist(r, ex_cw) <= 2 && decode(r) == ev,
            $sformatf("x=%h y=%h errors=%0d r=%h", xv, yv, nerr, r));
      check(r[7:0] == ex_cw[7:0], $sformatf("check bits x=%h y=%h", xv, yv));
      check(r[14:8] == (x[14:8] & y[14:8]), $sformatf("data gates x=%h y=%h", xv, yv));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
