// tb_mips8_program: a short hand-written program in register-direct and
// immediate mode on the processor at its default parameters. It adds two
// 16-bit numbers with add / add-with-carry, then uses xor, both shifts,
// subtract, subtract-with-borrow, and, a compare into r0 and or. Every
// expected value below was worked out by hand. The test checks each
// write-back in order and the clock edge it appears on (instruction k's
// result is in EXE_REG_OUT after edge k + 3), the Z flag after the compare,
// and the final register file and flags.
module tb_mips8_program;
  import mips8_pkg::*;

  logic   clk = 0, rst_n = 0, irq = 0;
  logic   ld_en = 0;
  pc_t    ld_addr = '0;
  instr_t ld_data = '0;
  pc_t    pc, ret_pc;
  instr_t ir;
  data_t  exe, dbg_data;
  logic   wb_en, fz, fc, fif, sz, sc, ev_c, ev_b, ev_i;
  raddr_t wb_rd, dbg_addr = '0;
  int     checks = 0, failures = 0;

  mips8_cpu dut (
    .clk(clk), .rst_n(rst_n), .irq(irq),
    .imem_ld_en(ld_en), .imem_ld_addr(ld_addr), .imem_ld_data(ld_data),
    .pc(pc), .ir(ir), .exe_reg_out(exe), .exe_wb_en(wb_en), .exe_wb_rd(wb_rd),
    .flag_z(fz), .flag_c(fc), .flag_if(fif),
    .irq_ret_pc(ret_pc), .irq_saved_z(sz), .irq_saved_c(sc),
    .ev_complete(ev_c), .ev_bypass(ev_b), .ev_irq(ev_i),
    .dbg_addr(dbg_addr), .dbg_data(dbg_data)
  );

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int N = 14;
  instr_t prog [N];
  // expected write-back of each instruction: {writes, rd, value}
  logic [11:0] exp_wb [N];

  initial begin
    prog[0]  = enc_imm(FN_ADD,   3'd1, 3'd0, 8'h34);        exp_wb[0]  = {1'b1, 3'd1, 8'h34};
    prog[1]  = enc_imm(FN_ADD,   3'd2, 3'd0, 8'h12);        exp_wb[1]  = {1'b1, 3'd2, 8'h12};
    prog[2]  = enc_imm(FN_ADD,   3'd3, 3'd0, 8'hF0);        exp_wb[2]  = {1'b1, 3'd3, 8'hF0};
    prog[3]  = enc_imm(FN_ADD,   3'd4, 3'd0, 8'h20);        exp_wb[3]  = {1'b1, 3'd4, 8'h20};
    prog[4]  = enc_reg(FN_ADD,   3'd5, 3'd1, 3'd3);         exp_wb[4]  = {1'b1, 3'd5, 8'h24}; // C=1
    prog[5]  = enc_reg(FN_ADC,   3'd6, 3'd2, 3'd4);         exp_wb[5]  = {1'b1, 3'd6, 8'h33}; // 0x1234+0x20F0
    prog[6]  = enc_imm(FN_XOR,   3'd7, 3'd6, 8'hFF);        exp_wb[6]  = {1'b1, 3'd7, 8'hCC};
    prog[7]  = enc_imm(FN_SHIFT, 3'd7, 3'd7, 8'b0000_1001); exp_wb[7]  = {1'b1, 3'd7, 8'h98}; // << 1
    prog[8]  = enc_imm(FN_SHIFT, 3'd1, 3'd7, 8'b0000_0011); exp_wb[8]  = {1'b1, 3'd1, 8'h13}; // >> 3
    prog[9]  = enc_reg(FN_SUB,   3'd2, 3'd1, 3'd5);         exp_wb[9]  = {1'b1, 3'd2, 8'hEF}; // borrow
    prog[10] = enc_reg(FN_SBB,   3'd3, 3'd0, 3'd0);         exp_wb[10] = {1'b1, 3'd3, 8'hFF};
    prog[11] = enc_imm(FN_AND,   3'd4, 3'd3, 8'h0F);        exp_wb[11] = {1'b1, 3'd4, 8'h0F};
    prog[12] = enc_imm(FN_SUB,   3'd0, 3'd4, 8'h0F);        exp_wb[12] = {1'b0, 3'd0, 8'h00}; // compare
    prog[13] = enc_reg(FN_OR,    3'd5, 3'd4, 3'd2);         exp_wb[13] = {1'b1, 3'd5, 8'hEF};

    @(negedge clk);
    for (int a = 0; a < 36; a++) begin
      ld_en = 1; ld_addr = pc_t'(a); ld_data = (a < N) ? prog[a] : '0;
      @(negedge clk);
    end
    ld_en = 0;
    rst_n = 1;
    for (int e = 1; e <= N + 4; e++) begin
      @(posedge clk); #1;
      if (e >= 3 && e - 3 < N) begin
        int k;
        k = e - 3;  // instruction whose result entered EXE_REG_OUT at edge k + 3
        if (exp_wb[k][11])
          check(wb_en && wb_rd == exp_wb[k][10:8] && exe == exp_wb[k][7:0],
                $sformatf("instruction %0d: wb_en=%0b r%0d=%02h expected r%0d=%02h",
                          k, wb_en, wb_rd, exe, exp_wb[k][10:8], exp_wb[k][7:0]));
        else
          check(!wb_en && fz && !fc, $sformatf("compare %0d: wb_en=%0b Z=%0b C=%0b", k, wb_en, fz, fc));
      end else if (e < 3) begin
        check(!wb_en, $sformatf("write-back before edge 3 (edge %0d)", e));
      end
    end
    begin
      data_t fin [8] = '{8'h00, 8'h13, 8'hEF, 8'hFF, 8'h0F, 8'hEF, 8'h33, 8'h98};
      for (int r = 0; r < 8; r++) begin
        dbg_addr = raddr_t'(r); #1;
        check(dbg_data == fin[r], $sformatf("r%0d=%02h expected %02h", r, dbg_data, fin[r]));
      end
    end
    check(fz && !fc, "final flags after the trailing no-ops");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
