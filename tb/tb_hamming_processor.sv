// tb_hamming_processor: end-to-end test of the whole core at its default
// parameters (K = 4, the (7,4) code, and the BCH(15,7) unit).
//
// Each step applies random operands, a random coded opcode and random BCH
// operands, and injects at random one of: no error, a flipped bit in X, in Y
// or in the opcode (Hamming side), and 0, 1 or 2 errors spread over the BCH
// operands. Every output is compared with a reference computed here:
//   - ALU result: decodes to Correct(X) op Correct(Y), within distance 1,
//     and exact when nothing was flipped;
//   - NOT and shift of X: decode to ~X and X << 1;
//   - correct-nop: exactly the codeword of Correct(X);
//   - BCH AND, XOR, OR: decode to the result on the data words, within
//     distance 2; BCH ADD: exactly the codeword of the sum modulo 128.
// The testbench counts how often each mechanism was exercised (each opcode,
// each kind of corrected error, the correct-nop repairing a word, single and
// double BCH errors) and counts a failure for any that never happened.
// Ends with the TB_RESULT line; a watchdog stops a hung run.
module tb_hamming_processor;
  import tb_ham_ref::*;
  import tb_bch_ref::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [3:0]  x_d, y_d, r_d, not_d, shl_d, nop_d;
  logic [2:0]  x_h, y_h, r_h, not_h, shl_h, nop_h;
  logic [1:0]  op_e;
  logic [2:0]  op_h;
  logic [14:0] bx, by, br_and, br_xor, br_or, br_add;

  hamming_processor dut (
    .x_d(x_d), .x_h(x_h), .y_d(y_d), .y_h(y_h), .op_e(op_e), .op_h(op_h),
    .r_d(r_d), .r_h(r_h), .not_d(not_d), .not_h(not_h),
    .shl_d(shl_d), .shl_h(shl_h), .nop_d(nop_d), .nop_h(nop_h),
    .bx(bx), .by(by), .br_and(br_and), .br_xor(br_xor), .br_or(br_or), .br_add(br_add)
  );

  typedef enum int {
    EV_XOR, EV_AND, EV_ADD, EV_OR,
    EV_X_ERR, EV_Y_ERR, EV_OP_ERR, EV_NOP_REPAIR,
    EV_BCH_1ERR, EV_BCH_2ERR, EV_COUNT
  } event_e;
  int seen [EV_COUNT];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  function automatic logic [3:0] ref_op(input int op, input logic [3:0] a, input logic [3:0] b);
    case (op)
      3:       return a ^ b;
      2:       return a & b;
      1:       return a + b;
      default: return a | b;
    endcase
  endfunction

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 20000; n++) begin
      int          op, kind, flip, nb, nbx;
      logic [3:0]  xv, yv, ex, ex_not, ex_shl;
      logic [6:0]  bxv, byv;
      logic [18:0] w;
      op   = $urandom_range(3);
      xv   = 4'($urandom);
      yv   = 4'($urandom);
      kind = $urandom_range(3);           // 0 none, 1 X, 2 Y, 3 opcode
      w = {op[0], op[1], op[1] ^ op[0], op[1], op[0],
           enc(16'(yv), 4)[2:0], yv, enc(16'(xv), 4)[2:0], xv};
      case (kind)
        1: flip = $urandom_range(6);
        2: flip = 7 + $urandom_range(6);
        3: flip = 14 + $urandom_range(4);
        default: flip = -1;
      endcase
      if (flip >= 0) w[flip] = ~w[flip];
      {op_h, op_e, y_h, y_d, x_h, x_d} = w;
      bxv = 7'($urandom);
      byv = 7'($urandom);
      nb  = $urandom_range(2);
      nbx = $urandom_range(nb);
      bx  = codeword(bxv) ^ rand_err(nbx);
      by  = codeword(byv) ^ rand_err(nb - nbx);
      #1;

      ex     = ref_op(op, xv, yv);
      ex_not = ~xv;
      ex_shl = xv << 1;
      if (kind == 0)
        check({r_h, r_d} == {enc(16'(ex), 4)[2:0], ex}, $sformatf("exact op=%0d", op));
      check(dist_to(16'(r_d), 8'(r_h), 16'(ex), 4) <= 1 && correct(16'(r_d), 8'(r_h), 4) == 16'(ex),
            $sformatf("alu op=%0d x=%h y=%h flip=%0d r=%h/%h", op, xv, yv, flip, r_d, r_h));
      check(correct(16'(not_d), 8'(not_h), 4) == 16'(ex_not), "not");
      check(correct(16'(shl_d), 8'(shl_h), 4) == 16'(ex_shl), "shift");
      check({nop_h, nop_d} == {enc(16'(xv), 4)[2:0], xv}, "correct-nop");
      check(hdist(br_and, codeword(bxv & byv)) <= 2 && decode(br_and) == (bxv & byv),
            $sformatf("bch and x=%h y=%h errors=%0d", bxv, byv, nb));
      check(hdist(br_xor, codeword(bxv ^ byv)) <= 2 && decode(br_xor) == (bxv ^ byv),
            $sformatf("bch xor x=%h y=%h errors=%0d", bxv, byv, nb));
      check(hdist(br_or, codeword(bxv | byv)) <= 2 && decode(br_or) == (bxv | byv),
            $sformatf("bch or x=%h y=%h errors=%0d", bxv, byv, nb));
      check(br_add == codeword(bxv + byv), $sformatf("bch add x=%h y=%h errors=%0d", bxv, byv, nb));

      seen[3 - op]++;   // op 3 XOR, 2 AND, 1 ADD, 0 OR
      if (kind == 1) seen[EV_X_ERR]++;
      if (kind == 2) seen[EV_Y_ERR]++;
      if (kind == 3) seen[EV_OP_ERR]++;
      if (kind == 1 && {x_h, x_d} != {nop_h, nop_d}) seen[EV_NOP_REPAIR]++;
      if (nb == 1) seen[EV_BCH_1ERR]++;
      if (nb == 2) seen[EV_BCH_2ERR]++;
    end
    for (int e = 0; e < EV_COUNT; e++) begin
      $display("event %s: %0d", event_e'(e), seen[e]);
      check(seen[e] > 0, $sformatf("event %s never happened", event_e'(e)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
