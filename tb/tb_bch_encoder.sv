// tb_bch_encoder: checks the BCH(15,7) encoder against the serial LFSR
// model of tb_bch_ref for all 128 data words, and checks the code's minimum
// distance property on its output: the codewords of two different data words
// differ in at least 5 bits. Ends with the TB_RESULT line.
module tb_bch_encoder;
  import tb_bch_ref::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [6:0] d;
  logic [7:0] p;
  logic [14:0] cw [128];

  bch_encoder dut (.d(d), .p(p));

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
    for (int v = 0; v < 128; v++) begin
      d = 7'(v);
      #1;
      check(p == parity(7'(v)), $sformatf("d=%h p=%h expected %h", v, p, parity(7'(v))));
      cw[v] = {d, p};
    end
    for (int a = 0; a < 128; a++)
      for (int b = a + 1; b < 128; b++)
        check(hdist(cw[a], cw[b]) >= 5, $sformatf("distance %0d/%0d", a, b));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
