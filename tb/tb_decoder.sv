// tb_decoder: decodes random instruction words of all four format codes,
// with and without a pending interrupt, in both builds (with the decode
// register: result one edge later; without: same cycle). Fields are checked
// against slices computed in the test bench.
module tb_decoder;
  import mips8_pkg::*;

  logic   clk = 0, rst_n = 0, v = 0, irq = 0, ins = 0;
  instr_t w = '0;
  pc_t    wpc = '0;
  logic   take_r, take_c;
  ctrl_t  cr, cc;
  int     checks = 0, failures = 0, n_take = 0;

  decoder #(.REGISTERED(1'b1)) dut_r (.clk(clk), .rst_n(rst_n), .instr(w), .instr_pc(wpc),
    .instr_valid(v), .irq(irq), .irq_in_service(ins), .take_irq(take_r), .ctrl(cr));
  decoder #(.REGISTERED(1'b0)) dut_c (.clk(clk), .rst_n(rst_n), .instr(w), .instr_pc(wpc),
    .instr_valid(v), .irq(irq), .irq_in_service(ins), .take_irq(take_c), .ctrl(cc));

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  function automatic bit same(ctrl_t c, instr_t x, pc_t p, bit ev);
    bit ok;
    ok = (c.valid == ev);
    if (ev) begin
      ok &= (c.fn == fn_e'(x[16:14])) && (c.rd == x[13:11]) && (c.r1 == x[10:8])
         && (c.r2 == x[7:5]) && (c.imm == x[7:0]) && (c.shl == x[3])
         && (c.shamt == x[2:0]) && (c.use_imm == (x[18:17] == 2'b01)) && (c.pc == p)
         && (c.wr_en == (x[13:11] != 0));
    end else begin
      ok &= !c.wr_en;
    end
    return ok;
  endfunction

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #12;
    check(!cr.valid, "decode register not cleared by reset");
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      bit et, ev;
      @(negedge clk);
      w   = instr_t'($urandom);
      wpc = pc_t'($urandom);
      v   = ($urandom_range(0, 5) != 0);
      irq = ($urandom_range(0, 3) == 0);
      ins = 1'($urandom);
      et  = irq && !ins && v;
      ev  = v && !et && (w[18] == 1'b0);
      #1;
      if (et) n_take++;
      check(take_c == et && take_r == et, "take_irq");
      check(same(cc, w, wpc, ev), $sformatf("comb decode of %05h", w));
      @(posedge clk); #1;
      check(same(cr, w, wpc, ev), $sformatf("registered decode of %05h", w));
    end
    check(n_take > 0, "interrupt never taken");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
