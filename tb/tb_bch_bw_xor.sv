// tb_bch_bw_xor: checks bch_bw_xor on BCH(15,7) codewords.
//
// Random data words X and Y are encoded with the tb_bch_ref model and given
// 0, 1 or 2 bit errors in total, split at random between the two operands.
// The result must be within distance 2 of the codeword of
// E = xv ^ yv (on the corrected data words) and must decode to E.
// XOR corrects nothing: the input errors must appear at the same positions.
// Ends with the TB_RESULT line; a watchdog stops a hung run.
module tb_bch_bw_xor;
  import tb_bch_ref::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [14:0] x, y, r;

  bch_bw_xor dut (.x(x), .y(y), .r(r));

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
      logic [14:0] ex_cw, xe, ye;
      int nerr, nx;
      xv    = 7'($urandom);
      yv    = 7'($urandom);
      ev    = xv ^ yv;
      ex_cw = codeword(ev);
      nerr  = n % 3;
      nx    = $urandom_range(nerr);
      xe    = rand_err(nx);
      ye    = rand_err(nerr - nx);
      x = codeword(xv) ^ xe;
      y = codeword(yv) ^ ye;
      #1;
      if (nerr == 0) check(r == ex_cw, $sformatf("clean x=%h y=%h r=%h", xv, yv, r));
      check(hdist(r, ex_cw) <= 2 && decode(r) == ev,
            $sformatf("x=%h y=%h errors=%0d r=%h", xv, yv, nerr, r));
      check(r == (ex_cw ^ xe ^ ye), $sformatf("errors pass through x=%h y=%h", xv, yv));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
