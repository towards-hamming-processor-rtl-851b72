// tb_opcode_selector: checks the protected opcode selection.
//
// For each of the four opcodes (XOR 11, AND 10, ADD 01, OR 00) the coded
// opcode {e1,e2,h1c,h2c,h3c} is applied clean and with each of its 5 bits
// flipped, with random candidate codewords; the output must equal the
// candidate of the intended operation. The opcode check bits are computed
// here from their definition h1c = e1^e2, h2c = e1, h3c = e2.
// A faulty gate is then emulated by forcing the corrected opcode inside one
// bit's selection circuit to a wrong value: only that output bit may differ.
// Ends with the TB_RESULT line; a watchdog stops a hung run.
module tb_opcode_selector;

  localparam int N = 7;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [1:0]   op_e;
  logic [2:0]   op_h;
  logic [N-1:0] c_xor, c_and, c_add, c_or, sel;

  opcode_selector #(.K(4)) dut (
    .op_e(op_e), .op_h(op_h), .cand_xor(c_xor), .cand_and(c_and),
    .cand_add(c_add), .cand_or(c_or), .sel(sel)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  function automatic logic [N-1:0] pick(input int op);
    case (op)
      3:       return c_xor;
      2:       return c_and;
      1:       return c_add;
      default: return c_or;
    endcase
  endfunction

  task automatic apply_op(input int op, input int flip);
    logic e1, e2;
    logic [4:0] w;
    e1 = op[1];
    e2 = op[0];
    w  = {e2, e1, e1 ^ e2, e1, e2};   // {h3c, h2c, h1c, e1, e2}
    if (flip >= 0) w[flip] = ~w[flip];
    {op_h, op_e} = w;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 200; rep++) begin
      for (int op = 0; op < 4; op++) begin
        for (int f = -1; f < 5; f++) begin
          c_xor = N'($urandom);
          c_and = N'($urandom);
          c_add = N'($urandom);
          c_or  = N'($urandom);
          apply_op(op, f);
          #1;
          check(sel == pick(op), $sformatf("op=%0d flip=%0d sel=%h", op, f, sel));
        end
      end
    end
    // Emulated fault: corrected opcode seen by the AND decoder of bit 2 is
    // stuck at 11, so with a correct XOR opcode two decoders of that bit fire.
    force dut.g_bit[2].u_sel.ec_and = 2'b11;
    for (int rep = 0; rep < 50; rep++) begin
      for (int op = 0; op < 4; op++) begin
        c_xor = N'($urandom);
        c_and = N'($urandom);
        c_add = N'($urandom);
        c_or  = N'($urandom);
        apply_op(op, -1);
        #1;
        check(((sel ^ pick(op)) & ~N'(1 << 2)) == '0,
              $sformatf("fault spread beyond bit 2: op=%0d sel=%h", op, sel));
      end
    end
    release dut.g_bit[2].u_sel.ec_and;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
