// tb_gate_faults: single faulty gate inside the core, at default parameters.
//
// A faulty gate is emulated by forcing one internal node of hamming_processor
// to a wrong constant: a corrector output, an operation result or a decode
// gate inside one channel, or the output of one raw data gate. For each of
// the fault sites below, every opcode and every pair of (7,4) data words is
// applied with clean inputs, and all Hamming results must still decode to the
// right value within distance 1. The BCH sites are combined with one input
// error in X, since BCH(15,7) corrects two errors in total: the BCH results
// must decode to the right value within distance 2.
// Each site must also be observed: the fault has to change some output at
// least once, or the site counts a failure.
// Ends with the TB_RESULT line; a watchdog stops a hung run.
module tb_gate_faults;
  import tb_ham_ref::*;
  import tb_bch_ref::*;

  localparam int NSITES = 14;

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

  task automatic inject(input int site);
    case (site)
      0:  force dut.u_alu.u_add.g_d[0].u_ch.cx = 4'hF;
      1:  force dut.u_alu.u_add.g_d[3].u_ch.res = 4'h5;
      2:  force dut.u_alu.u_add.g_h[2].u_ch.cy = 4'h0;
      3:  force dut.u_alu.u_and.g_h[0].u_ch.res = 4'hF;
      4:  force dut.u_alu.u_or.g_h[1].u_ch.cx = 4'h0;
      5:  force dut.u_alu.u_sel.g_bit[0].u_sel.sel_xor = 1'b1;
      6:  force dut.u_alu.u_sel.g_bit[5].u_sel.sel_add = 1'b0;
      7:  force dut.u_alu.u_sel.g_bit[3].u_sel.ec_or = 2'b00;
      8:  force dut.u_alu.xor_d[1] = 1'b1;
      9:  force dut.u_alu.and_h[2] = 1'b1;
      10: force dut.u_nop.u_add.g_h[0].u_ch.cx = 4'hA;
      11: force dut.u_shl.g_h[1].u_ch.cx = 4'h7;
      12: force dut.u_bch_add.g_p[3].u_ch.cx = 7'h55;
      default: force dut.u_bch_and.g_p[0].cy = 7'h00;
    endcase
  endtask

  task automatic remove(input int site);
    case (site)
      0:  release dut.u_alu.u_add.g_d[0].u_ch.cx;
      1:  release dut.u_alu.u_add.g_d[3].u_ch.res;
      2:  release dut.u_alu.u_add.g_h[2].u_ch.cy;
      3:  release dut.u_alu.u_and.g_h[0].u_ch.res;
      4:  release dut.u_alu.u_or.g_h[1].u_ch.cx;
      5:  release dut.u_alu.u_sel.g_bit[0].u_sel.sel_xor;
      6:  release dut.u_alu.u_sel.g_bit[5].u_sel.sel_add;
      7:  release dut.u_alu.u_sel.g_bit[3].u_sel.ec_or;
      8:  release dut.u_alu.xor_d[1];
      9:  release dut.u_alu.and_h[2];
      10: release dut.u_nop.u_add.g_h[0].u_ch.cx;
      11: release dut.u_shl.g_h[1].u_ch.cx;
      12: release dut.u_bch_add.g_p[3].u_ch.cx;
      default: release dut.u_bch_and.g_p[0].cy;
    endcase
  endtask

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int site = 0; site < NSITES; site++) begin
      int observed;
      observed = 0;
      inject(site);
      for (int op = 0; op < 4; op++)
        for (int xv = 0; xv < 16; xv++)
          for (int yv = 0; yv < 16; yv++) begin
            logic [3:0]  ex, ex_not, ex_shl;
            logic [6:0]  bxv, byv, bex;
            logic [14:0] bexact;
            ex     = ref_op(op, 4'(xv), 4'(yv));
            ex_not = ~4'(xv);
            ex_shl = 4'(xv) << 1;
            {x_h, x_d} = {enc(16'(xv), 4)[2:0], 4'(xv)};
            {y_h, y_d} = {enc(16'(yv), 4)[2:0], 4'(yv)};
            op_e = 2'(op);
            op_h = {op[0], op[1], op[1] ^ op[0]};
            bxv  = 7'($urandom);
            byv  = 7'($urandom);
            bx   = codeword(bxv) ^ rand_err(1);
            by   = codeword(byv);
            #1;
            check(dist_to(16'(r_d), 8'(r_h), 16'(ex), 4) <= 1 &&
                  correct(16'(r_d), 8'(r_h), 4) == 16'(ex),
                  $sformatf("site %0d alu op=%0d x=%0d y=%0d r=%h/%h", site, op, xv, yv, r_d, r_h));
            check(dist_to(16'(nop_d), 8'(nop_h), 16'(xv), 4) <= 1 &&
                  correct(16'(nop_d), 8'(nop_h), 4) == 16'(xv), $sformatf("site %0d nop", site));
            check(correct(16'(shl_d), 8'(shl_h), 4) == 16'(ex_shl), $sformatf("site %0d shift", site));
            check(correct(16'(not_d), 8'(not_h), 4) == 16'(ex_not), $sformatf("site %0d not", site));
            bex    = bxv + byv;
            bexact = codeword(bex);
            check(hdist(br_add, bexact) <= 2 && decode(br_add) == bex, $sformatf("site %0d bch add", site));
            bex = bxv & byv;
            check(hdist(br_and, codeword(bex)) <= 2 && decode(br_and) == bex, $sformatf("site %0d bch and", site));
            if ({r_h, r_d} != {enc(16'(ex), 4)[2:0], ex} ||
                {nop_h, nop_d} != {enc(16'(xv), 4)[2:0], 4'(xv)} ||
                shl_h != enc(16'(ex_shl), 4)[2:0] ||
                br_add != bexact ||
                br_and[7:0] != codeword(bxv & byv)[7:0])
              observed++;
          end
      remove(site);
      $display("fault site %0d changed an output in %0d of 1024 steps", site, observed);
      check(observed > 0, $sformatf("fault site %0d never changed an output", site));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
