// tb_hamming_alu: exhaustive check of the Hamming ALU on the (7,4) code.
//
// For all four opcodes and all pairs of data words, the operands and coded
// opcode are applied clean and with each single bit of X (7), Y (7) or the
// opcode (5) flipped. The result must be within distance 1 of the codeword of
// E = Correct(X) op Correct(Y) and must decode to E; with no flip it must be
// exactly that codeword. Then a faulty gate is emulated by forcing the
// corrected X inside one Hamming-bit channel of the adder to a wrong value:
// with clean inputs the ADD result must still decode to the right sum.
// A second instance with K = 11 (the (15,11) code, four Hamming bits) is run
// on random operands and opcodes with one random flipped bit.
// Reference codewords come from tb_ham_ref. Ends with the TB_RESULT line.
module tb_hamming_alu;
  import tb_ham_ref::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [3:0] x_d, y_d, r_d;
  logic [2:0] x_h, y_h, r_h;
  logic [1:0] op_e;
  logic [2:0] op_h;

  hamming_alu #(.K(4)) dut (
    .x_d(x_d), .x_h(x_h), .y_d(y_d), .y_h(y_h),
    .op_e(op_e), .op_h(op_h), .r_d(r_d), .r_h(r_h)
  );

  logic [10:0] x11_d, y11_d, r11_d;
  logic [3:0]  x11_h, y11_h, r11_h;
  logic [1:0]  op11_e;
  logic [2:0]  op11_h;

  hamming_alu #(.K(11)) dut11 (
    .x_d(x11_d), .x_h(x11_h), .y_d(y11_d), .y_h(y11_h),
    .op_e(op11_e), .op_h(op11_h), .r_d(r11_d), .r_h(r11_h)
  );

  function automatic logic [10:0] ref_op11(input int op, input logic [10:0] a, input logic [10:0] b);
    case (op)
      3:       return a ^ b;
      2:       return a & b;
      1:       return a + b;
      default: return a | b;
    endcase
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  function automatic logic [3:0] ref_op(input int op, input logic [3:0] a, input logic [3:0] b);
    case (op)
      3:       return a ^ b;   // BW_XOR
      2:       return a & b;   // BW_AND
      1:       return a + b;   // ADD
      default: return a | b;   // BW_OR
    endcase
  endfunction

  // Apply X, Y and opcode; flip one of the 19 bits (or none if flip < 0).
  task automatic apply(input int op, input int xv, input int yv, input int flip);
    logic [18:0] w;
    logic e1, e2;
    e1 = op[1];
    e2 = op[0];
    w = {e2, e1, e1 ^ e2, e1, e2,
         enc(16'(yv), 4)[2:0], 4'(yv), enc(16'(xv), 4)[2:0], 4'(xv)};
    if (flip >= 0) w[flip] = ~w[flip];
    {op_h, op_e, y_h, y_d, x_h, x_d} = w;
  endtask

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int op = 0; op < 4; op++)
      for (int xv = 0; xv < 16; xv++)
        for (int yv = 0; yv < 16; yv++)
          for (int f = -1; f < 19; f++) begin
            logic [3:0] ex;
            ex = ref_op(op, 4'(xv), 4'(yv));
            apply(op, xv, yv, f);
            #1;
            if (f < 0)
              check({r_h, r_d} == {enc(16'(ex), 4)[2:0], ex},
                    $sformatf("exact op=%0d x=%0d y=%0d", op, xv, yv));
            check(dist_to(16'(r_d), 8'(r_h), 16'(ex), 4) <= 1 &&
                  correct(16'(r_d), 8'(r_h), 4) == 16'(ex),
                  $sformatf("op=%0d x=%0d y=%0d flip=%0d r=%h/%h", op, xv, yv, f, r_d, r_h));
          end
    // Emulated faulty gate inside one Hamming-bit channel of the adder.
    force dut.u_add.g_h[1].u_ch.cx = 4'b1010;
    for (int xv = 0; xv < 16; xv++)
      for (int yv = 0; yv < 16; yv++) begin
        logic [3:0] ex;
        ex = ref_op(1, 4'(xv), 4'(yv));
        apply(1, xv, yv, -1);
        #1;
        check(dist_to(16'(r_d), 8'(r_h), 16'(ex), 4) <= 1 &&
              correct(16'(r_d), 8'(r_h), 4) == 16'(ex),
              $sformatf("gate fault: x=%0d y=%0d r=%h/%h", xv, yv, r_d, r_h));
      end
    release dut.u_add.g_h[1].u_ch.cx;
    for (int n = 0; n < 600; n++) begin
      int          op, f;
      logic [10:0] xv, yv, ex;
      logic [34:0] w;
      op = $urandom_range(3);
      xv = 11'($urandom);
      yv = 11'($urandom);
      f  = $urandom_range(35) - 1;
      w  = {op[0], op[1], op[1] ^ op[0], op[1], op[0],
            enc(16'(yv), 11)[3:0], yv, enc(16'(xv), 11)[3:0], xv};
      if (f >= 0) w[f] = ~w[f];
      {op11_h, op11_e, y11_h, y11_d, x11_h, x11_d} = w;
      ex = ref_op11(op, xv, yv);
      #1;
      check(dist_to(16'(r11_d), 8'(r11_h), 16'(ex), 11) <= 1 &&
            correct(16'(r11_d), 8'(r11_h), 11) == 16'(ex),
            $sformatf("K=11 op=%0d x=%h y=%h flip=%0d", op, xv, yv, f));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
