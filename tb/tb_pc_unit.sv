// tb_pc_unit: checks the reset address, the count-by-one sequence with wrap
// at 4096, and the load of the interrupt vector.
module tb_pc_unit;
  import mips8_pkg::*;

  logic clk = 0, rst_n = 0, take = 0;
  pc_t  pc, exp_pc;
  int   checks = 0, failures = 0;

  pc_unit #(.IRQ_VECTOR(pc_t'(32))) dut (.clk(clk), .rst_n(rst_n), .take_irq(take),
                                         .pc(pc));

  always #5 clk = ~clk;

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #12;
    checks++; if (pc != 0) failures++;
    @(negedge clk);
    rst_n = 1;
    exp_pc = '0;
    for (int i = 0; i < 5000; i++) begin
      take = (i >= 4200) && ($urandom_range(0, 9) == 0);
      @(posedge clk); #1;
      exp_pc = take ? pc_t'(32) : pc_t'((int'(exp_pc) + 1) % 4096);
      checks++;
      if (pc != exp_pc) begin
        failures++;
        if (failures < 10) $display("FAIL step %0d pc=%0d expected %0d", i, pc, exp_pc);
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
