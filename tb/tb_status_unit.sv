// tb_status_unit: random flag updates and interrupt events against a model:
// Z and C follow their write enables, IF sets on take_irq and clears once irq
// is low, the interrupt register captures the return address and the flags
// as updated in that same cycle.
module tb_status_unit;
  import mips8_pkg::*;

  logic clk = 0, rst_n = 0;
  logic zwe = 0, zn = 0, cwe = 0, cn = 0, irq = 0, take = 0;
  pc_t  rpc = '0, orpc;
  logic fz, fc, fif, sz, sc;
  logic mz, mc, mif, msz, msc;
  pc_t  mrpc;
  int   checks = 0, failures = 0, n_take = 0;

  status_unit dut (.clk(clk), .rst_n(rst_n), .z_we(zwe), .z_next(zn), .c_we(cwe), .c_next(cn),
    .irq(irq), .take_irq(take), .ret_pc(rpc), .flag_z(fz), .flag_c(fc), .flag_if(fif),
    .irq_ret_pc(orpc), .irq_saved_z(sz), .irq_saved_c(sc));

  always #5 clk = ~clk;

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mz = 0; mc = 0; mif = 0; msz = 0; msc = 0; mrpc = '0;
    #12 rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      zwe = 1'($urandom); zn = 1'($urandom); cwe = 1'($urandom); cn = 1'($urandom);
      irq = ($urandom_range(0, 2) == 0);
      take = irq && !mif && ($urandom_range(0, 1) == 0);
      rpc = pc_t'($urandom);
      @(posedge clk); #1;
      if (zwe) mz = zn;
      if (cwe) mc = cn;
      if (take) begin mif = 1; mrpc = rpc; msz = mz; msc = mc; n_take++; end
      else if (!irq) mif = 0;
      checks++;
      if ({fz, fc, fif, sz, sc} != {mz, mc, mif, msz, msc} || orpc != mrpc) begin
        failures++;
        if (failures < 10) $display("FAIL step %0d: %b %0d expected %b %0d", i,
                                    {fz, fc, fif, sz, sc}, orpc, {mz, mc, mif, msz, msc}, mrpc);
      end
    end
    checks++; if (n_take == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
