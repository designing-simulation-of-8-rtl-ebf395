// tb_execute: drives random decoded instructions (and bubbles) into the
// execution stage. The test bench plays the register file, written from the
// stage's write-back outputs one edge after each result, so back-to-back
// dependent instructions only get the right operand through the bypass.
// Results, write-back register, Z and C are checked against an
// instruction-level model; bypass use is counted and must occur.
module tb_execute;
  import mips8_pkg::*;
  import mips8_ref_pkg::*;

  logic   clk = 0, rst_n = 0;
  ctrl_t  ctrl;
  raddr_t ra1, ra2, wbrd;
  data_t  rd1, rd2, res;
  logic   wben, zwe, zn, cwe, cn, ba, bb, flag_c = 0;
  data_t  rf [8];
  int     checks = 0, failures = 0, n_byp = 0;

  execute dut (.clk(clk), .rst_n(rst_n), .ctrl(ctrl), .ra1(ra1), .ra2(ra2), .rd1(rd1), .rd2(rd2),
    .flag_c(flag_c), .result_q(res), .wb_en(wben), .wb_rd(wbrd), .z_we(zwe), .z_next(zn),
    .c_we(cwe), .c_next(cn), .bypass_a(ba), .bypass_b(bb));

  always #5 clk = ~clk;
  assign rd1 = (ra1 == 0) ? '0 : rf[ra1];
  assign rd2 = (ra2 == 0) ? '0 : rf[ra2];

  // register file and flag register played by the test bench
  always_ff @(posedge clk) begin
    if (wben && wbrd != 0) rf[wbrd] <= res;
    if (cwe) flag_c <= cn;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_state_t s;
    ref_wb_t    wb;
    raddr_t     prev;
    ref_reset(s);
    for (int i = 0; i < 8; i++) rf[i] = '0;
    ctrl = CTRL_BUBBLE;
    prev = 3'd1;
    #12 rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      instr_t w;
      bit     bubble, wr;
      logic   z_exp, c_exp;
      @(negedge clk);
      bubble = ($urandom_range(0, 9) == 0);
      w = instr_t'($urandom);
      w[18] = 1'b0;
      if ($urandom_range(0, 1)) w[10:8] = prev;
      if ($urandom_range(0, 1)) w[7:5]  = prev;
      ctrl         = CTRL_BUBBLE;
      ctrl.valid   = !bubble;
      ctrl.fn      = fn_e'(w[16:14]);
      ctrl.rd      = w[13:11];
      ctrl.r1      = w[10:8];
      ctrl.r2      = w[7:5];
      ctrl.imm     = w[7:0];
      ctrl.use_imm = w[17];
      ctrl.shl     = w[3];
      ctrl.shamt   = w[2:0];
      ctrl.wr_en   = !bubble && (w[13:11] != 0);
      #1;
      if (ba || bb) n_byp++;
      if (!bubble) begin
        wr = ref_step(s, w, wb);
        z_exp = s.z; c_exp = s.c;
        check(zwe && zn == z_exp, $sformatf("Z for %05h", w));
        if (w[16:14] <= 3) check(cwe && cn == c_exp, $sformatf("C for %05h", w));
        else               check(!cwe, $sformatf("C written by %05h", w));
        prev = w[13:11];
      end else begin
        check(!zwe && !cwe, "bubble wrote a flag");
      end
      @(posedge clk); #1;
      if (!bubble) check(res == wb.val && wben == wr && (!wr || wbrd == wb.rd),
                         $sformatf("result of %05h: %02h expected %02h", w, res, wb.val));
      else         check(!wben, "bubble wrote back");
    end
    check(n_byp > 0, "bypass never used");
    $display("bypasses: %0d", n_byp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
