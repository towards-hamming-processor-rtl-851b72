// tb_hshift: exhaustive check of hshift on the (7,4) code.
//
// Every data word X is applied clean and with each of its 7 codeword bits
// flipped. The expected result E = 4'(xv) << 1 is computed from the clean data word,
// and its codeword from the reference model tb_ham_ref.
// Default shift: left by one with zero fill. Hamming bits come from corrected
// operands and must be exact; data bits are the raw input bits moved up one.
// Ends with the TB_RESULT line; a watchdog stops a hung run.
module tb_hshift;
  import tb_ham_ref::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [3:0] x_d, r_d;
  logic [2:0] x_h, r_h;

  hshift #(.K(4)) dut (.x_d(x_d), .x_h(x_h), .r_d(r_d), .r_h(r_h));

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
    for (int xv = 0; xv < 16; xv++) begin
      for (int e = -1; e < 7; e++) begin
        logic [6:0] flip;
        logic [3:0] ex;
        logic [2:0] eh;
        flip = (e < 0) ? 7'd0 : 7'(1 << e);
        {x_h, x_d} = {enc(16'(xv), 4)[2:0], 4'(xv)} ^ flip;
        ex = 4'(xv) << 1;
        eh = enc(16'(ex), 4)[2:0];
        #1;
        check(dist_to(16'(r_d), 8'(r_h), 16'(ex), 4) <= 1,
              $sformatf("not correctable x=%0d flip=%0d r=%h/%h", xv, e, r_d, r_h));
        check(correct(16'(r_d), 8'(r_h), 4) == 16'(ex), $sformatf("corrects wrongly x=%0d flip=%0d", xv, e));
        check(r_h == eh, $sformatf("hamming bits x=%0d flip=%0d", xv, e));
        check(r_d == {x_d[2:0], 1'b0}, $sformatf("data wiring x=%0d flip=%0d", xv, e));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
