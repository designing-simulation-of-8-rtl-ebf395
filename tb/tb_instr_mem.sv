// tb_instr_mem: loads random words, then reads every address (and some
// beyond the memory) through both builds of the memory: with the instruction
// register (result one edge later, flush gives a bubble) and combinational
// (result in the same cycle).
module tb_instr_mem;
  import mips8_pkg::*;

  logic   clk = 0, rst_n = 0, ld = 0, flush = 0;
  pc_t    la = '0, addr = '0;
  instr_t ldat = '0, q_r, q_c;
  pc_t    pc_r, pc_c;
  logic   v_r, v_c;
  instr_t model [36];
  int     checks = 0, failures = 0;

  instr_mem #(.DEPTH(36), .REGISTERED(1'b1)) dut_r (
    .clk(clk), .rst_n(rst_n), .ld_en(ld), .ld_addr(la), .ld_data(ldat),
    .addr(addr), .flush(flush), .instr(q_r), .instr_pc(pc_r), .instr_valid(v_r));
  instr_mem #(.DEPTH(36), .REGISTERED(1'b0)) dut_c (
    .clk(clk), .rst_n(rst_n), .ld_en(ld), .ld_addr(la), .ld_data(ldat),
    .addr(addr), .flush(flush), .instr(q_c), .instr_pc(pc_c), .instr_valid(v_c));

  always #5 clk = ~clk;

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
    for (int a = 0; a < 36; a++) begin
      @(negedge clk);
      model[a] = instr_t'($urandom); if (model[a] == 0) model[a] = 19'h1;
      ld = 1; la = pc_t'(a); ldat = model[a];
    end
    @(negedge clk);
    ld = 0;
    // a load beyond the memory must not alias onto a stored word
    ld = 1; la = pc_t'(36); ldat = '1;
    @(negedge clk);
    ld = 0;
    #1 check(!v_r && q_r == 0, "instruction register not cleared by reset");
    rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      instr_t e;
      logic   f;
      @(negedge clk);
      addr  = pc_t'($urandom_range(0, 47));
      f     = ($urandom_range(0, 7) == 0);
      flush = f;
      e     = (addr < 36) ? model[addr] : '0;
      #1;
      check(q_c == e && pc_c == addr && v_c, $sformatf("comb read %0d = %05h", addr, q_c));
      @(posedge clk); #1;
      if (f) check(!v_r && q_r == 0, "flush did not give a bubble");
      else   check(v_r && q_r == e && pc_r == addr,
                   $sformatf("registered read %0d = %05h expected %05h", addr, q_r, e));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
