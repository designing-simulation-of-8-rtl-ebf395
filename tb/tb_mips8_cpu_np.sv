// tb_mips8_cpu_np: the end-to-end test of tb_mips8_cpu, run on the processor
// built in non-pipelined mode (PIPELINED = 0): one instruction per long clock
// cycle, first result one edge after reset, one bubble per interrupt entry.
// Each round loads a random program (main code at 0..31, an interrupt
// handler at 32..35), runs it, optionally raises irq for three cycles, and
// compares against the instruction-level model in mips8_ref_pkg: the
// sequence of register write-backs seen in EXE_REG_OUT, the final register
// file, the Z/C flags, the interrupt return address and saved flags, the
// number of completed instructions, and the latency of the first result
// (three clock edges after reset in pipelined mode, one in non-pipelined).
// It also counts how often each mechanism happened (bypass, interrupt entry,
// carry-in use, immediate operands, left and right shifts, writes to r0,
// reserved-format bubbles) and fails if any never did.
module tb_mips8_cpu_np;
  import mips8_pkg::*;
  import mips8_ref_pkg::*;

  localparam bit PIPE   = 1'b0;
  localparam int ROUNDS = 40;
  localparam int RUN    = 60;      // clock edges per round after reset

  logic   clk = 0, rst_n = 0, irq = 0;
  logic   ld_en = 0;
  pc_t    ld_addr = '0;
  instr_t ld_data = '0;
  pc_t    pc, ret_pc;
  instr_t ir;
  data_t  exe, dbg_data;
  logic   wb_en, fz, fc, fif, sz, sc, ev_c, ev_b, ev_i;
  raddr_t wb_rd, dbg_addr = '0;

  mips8_cpu #(.PIPELINED(1'b0)) dut (
    .clk(clk), .rst_n(rst_n), .irq(irq),
    .imem_ld_en(ld_en), .imem_ld_addr(ld_addr), .imem_ld_data(ld_data),
    .pc(pc), .ir(ir), .exe_reg_out(exe), .exe_wb_en(wb_en), .exe_wb_rd(wb_rd),
    .flag_z(fz), .flag_c(fc), .flag_if(fif),
    .irq_ret_pc(ret_pc), .irq_saved_z(sz), .irq_saved_c(sc),
    .ev_complete(ev_c), .ev_bypass(ev_b), .ev_irq(ev_i),
    .dbg_addr(dbg_addr), .dbg_data(dbg_data)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cnt_bypass = 0, cnt_irq = 0, cnt_carry = 0, cnt_r0 = 0, cnt_rsv = 0;
  int cnt_shl = 0, cnt_shr = 0, cnt_imm = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #2_000_000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic instr_t rand_instr(raddr_t prev_rd, bit force_write);
    logic [1:0] fmt;
    logic [2:0] fn, rd, r1, r2;
    logic [7:0] k;
    fmt = ($urandom_range(0, 9) == 0) ? 2'b10 + 2'($urandom_range(0, 1))
                                       : 2'($urandom_range(0, 1));
    fn  = 3'($urandom);
    rd  = 3'($urandom);
    r1  = ($urandom_range(0, 1) == 0) ? prev_rd : 3'($urandom);
    r2  = ($urandom_range(0, 1) == 0) ? prev_rd : 3'($urandom);
    k   = 8'($urandom);
    if (force_write) begin
      fmt = 2'b01;
      if (rd == 0) rd = 3'd1;
    end
    if (fmt[0]) return {fmt, fn, rd, r1, k};
    return {fmt, fn, rd, r1, r2, 5'($urandom)};
  endfunction

  instr_t    prog [36];
  ref_wb_t   exp_wb [$];
  ref_wb_t   got_wb [$];

  initial begin
    for (int round = 0; round < ROUNDS; round++) begin
      ref_state_t s;
      ref_wb_t    wb;
      int irq_edge, ret_exp, edge_n, first_wb, n_complete, n_irq, n_steps;
      logic       saved_z, saved_c;
      raddr_t     prev;

      // ---- program
      prev = 3'd1;
      for (int a = 0; a < 36; a++) begin
        prog[a] = rand_instr(prev, a == 0);
        if (prog[a][18] == 1'b0) prev = prog[a][13:11];
      end
      irq_edge = (round % 2 == 1) ? $urandom_range(4, 28) : -1;

      // ---- load while in reset
      rst_n = 0; irq = 0;
      @(negedge clk);
      for (int a = 0; a < 36; a++) begin
        ld_en = 1; ld_addr = pc_t'(a); ld_data = prog[a];
        @(negedge clk);
      end
      ld_en = 0;

      // ---- reference: the instruction slots the processor completes in RUN
      // edges are RUN-2 (pipelined: two edges to fill the pipeline) or RUN,
      // less the bubbles an interrupt entry costs (2 pipelined, 1 otherwise)
      ref_reset(s);
      ret_exp = (irq_edge < 0) ? -1 : (PIPE ? irq_edge - 1 : irq_edge);
      n_steps = (PIPE ? RUN - 2 : RUN) - ((irq_edge < 0) ? 0 : (PIPE ? 2 : 1));
      exp_wb.delete();
      begin
        int a;
        a = 0;
        for (int step = 0; step < n_steps; step++) begin
          if (a == ret_exp) begin
            saved_z = s.z; saved_c = s.c;
            a = 32;
          end
          if (ref_step(s, (a < 36) ? prog[a] : 19'd0, wb)) exp_wb.push_back(wb);
          a++;
        end
      end

      // ---- run
      got_wb.delete();
      first_wb = -1; n_complete = 0; n_irq = 0;
      rst_n = 1;
      for (edge_n = 1; edge_n <= RUN; edge_n++) begin
        // events of the cycle that ends at this edge
        #1;
        if (ev_c) n_complete++;
        if (ev_b) cnt_bypass++;
        if (ev_i) n_irq++;
        @(posedge clk);
        @(negedge clk);
        if (wb_en) begin
          got_wb.push_back('{rd: wb_rd, val: exe});
          if (first_wb < 0) first_wb = edge_n;
        end
        // irq is high during the cycle that follows edge irq_edge
        if (irq_edge >= 0) irq = (edge_n >= irq_edge && edge_n < irq_edge + 3);
      end
      irq = 0;
      cnt_irq += n_irq;

      // ---- compare
      check(first_wb == (PIPE ? 3 : 1),
            $sformatf("round %0d: first result after %0d edges", round, first_wb));
      for (int i = 0; i < got_wb.size(); i++) begin
        check(i < exp_wb.size() && got_wb[i].rd == exp_wb[i].rd && got_wb[i].val == exp_wb[i].val,
              $sformatf("round %0d: write-back %0d r%0d=%02h expected r%0d=%02h", round, i,
                        got_wb[i].rd, got_wb[i].val,
                        i < exp_wb.size() ? exp_wb[i].rd : 0, i < exp_wb.size() ? exp_wb[i].val : 0));
      end
      check(got_wb.size() == exp_wb.size(),
            $sformatf("round %0d: %0d write-backs expected %0d", round, got_wb.size(), exp_wb.size()));
      for (int r = 0; r < 8; r++) begin
        dbg_addr = raddr_t'(r);
        #1;
        check(dbg_data == s.r[r], $sformatf("round %0d: r%0d=%02h expected %02h",
                                            round, r, dbg_data, s.r[r]));
      end
      check(fz == s.z && fc == s.c, $sformatf("round %0d: flags Z=%0b C=%0b expected %0b %0b",
                                              round, fz, fc, s.z, s.c));
      check(n_complete == n_steps - s.n_reserved,
            $sformatf("round %0d: %0d instructions completed, expected %0d",
                      round, n_complete, n_steps - s.n_reserved));
      cnt_carry += s.n_carry_in; cnt_r0 += s.n_r0_write; cnt_rsv += s.n_reserved;
      cnt_shl   += s.n_shl;      cnt_shr += s.n_shr;     cnt_imm += s.n_imm;
      if (irq_edge >= 0) begin
        check(n_irq == 1, $sformatf("round %0d: %0d interrupts taken", round, n_irq));
        check(int'(ret_pc) == ret_exp, $sformatf("round %0d: return address %0d expected %0d",
                                                 round, ret_pc, ret_exp));
        check(sz == saved_z && sc == saved_c, $sformatf("round %0d: saved flags", round));
        check(!fif, $sformatf("round %0d: IF still set after irq dropped", round));
      end else begin
        check(n_irq == 0, $sformatf("round %0d: unexpected interrupt", round));
      end
    end

    $display("mechanisms: bypass=%0d irq=%0d carry_in=%0d imm=%0d shl=%0d shr=%0d r0_write=%0d reserved=%0d",
             cnt_bypass, cnt_irq, cnt_carry, cnt_imm, cnt_shl, cnt_shr, cnt_r0, cnt_rsv);
    check(cnt_bypass > 0, "bypass never used");
    check(cnt_irq > 0, "interrupt never taken");
    check(cnt_carry > 0, "carry-in never used");
    check(cnt_imm > 0, "immediate operand never used");
    check(cnt_shl > 0 && cnt_shr > 0, "a shift direction never used");
    check(cnt_r0 > 0, "write to r0 never tried");
    check(cnt_rsv > 0, "reserved format never seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
