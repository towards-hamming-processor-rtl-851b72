// tb_hbw_xor: exhaustive check of hbw_xor on the (7,4) code.
//
// Every pair of data words X, Y is applied clean and with each single bit
// of the two 7-bit codewords flipped (15 cases per pair). The expected
// result E = 4'(xv) ^ 4'(yv) is computed from the clean data words, and its
// codeword from the reference model tb_ham_ref.
// The XOR block corrects nothing, so the output must equal the expected
// codeword with the flipped input bit's position flipped.
// Ends with the TB_RESULT line; a watchdog stops a hung run.
module tb_hbw_xor;
  import tb_ham_ref::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [3:0] x_d, y_d, r_d;
  logic [2:0] x_h, y_h, r_h;

  hbw_xor #(.K(4)) dut (.x_d(x_d), .x_h(x_h), .y_d(y_d), .y_h(y_h), .r_d(r_d), .r_h(r_h));

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
      for (int yv = 0; yv < 16; yv++) begin
        for (int e = -1; e < 14; e++) begin
          logic [13:0] flip;
          logic [3:0]  ex;
          logic [2:0]  eh;
          flip = (e < 0) ? 14'd0 : 14'(1 << e);
          {y_h, y_d, x_h, x_d} = {enc(16'(yv), 4)[2:0], 4'(yv), enc(16'(xv), 4)[2:0], 4'(xv)} ^ flip;
          ex = 4'(xv) ^ 4'(yv);
          eh = enc(16'(ex), 4)[2:0];
          #1;
          check(dist_to(16'(r_d), 8'(r_h), 16'(ex), 4) <= 1,
                $sformatf("not correctable x=%0d y=%0d flip=%0d r=%h/%h", xv, yv, e, r_d, r_h));
          check(correct(16'(r_d), 8'(r_h), 4) == 16'(ex),
                $sformatf("corrects wrongly x=%0d y=%0d flip=%0d", xv, yv, e));
          // no correction: the input flip appears at the same output bit
          check({r_h, r_d} == ({eh, ex} ^ {flip[13:11] ^ flip[6:4], flip[10:7] ^ flip[3:0]}),
                $sformatf("exact x=%0d y=%0d flip=%0d", xv, yv, e));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
