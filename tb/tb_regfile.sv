// tb_regfile: random writes and reads on all three read ports against an
// array model; checks reset to zero, that r0 stays zero after writes, and
// that a write becomes visible only after the clock edge.
module tb_regfile;
  import mips8_pkg::*;

  logic   clk = 0, rst_n = 0, we = 0;
  raddr_t ra1 = '0, ra2 = '0, wa = '0, da = '0;
  data_t  rd1, rd2, wd = '0, dd;
  data_t  model [8];
  int     checks = 0, failures = 0;

  regfile dut (.clk(clk), .rst_n(rst_n), .ra1(ra1), .rd1(rd1), .ra2(ra2), .rd2(rd2),
               .we(we), .wa(wa), .wd(wd), .dbg_addr(da), .dbg_data(dd));

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
    for (int i = 0; i < 8; i++) model[i] = '0;
    #12 rst_n = 1;
    for (int r = 0; r < 8; r++) begin
      ra1 = raddr_t'(r); #1;
      check(rd1 == 0, $sformatf("r%0d not zero after reset", r));
    end
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      we = 1'($urandom); wa = raddr_t'($urandom); wd = data_t'($urandom);
      ra1 = raddr_t'($urandom); ra2 = (i % 5 == 0) ? wa : raddr_t'($urandom);
      da  = raddr_t'($urandom);
      #1;
      check(rd1 == model[ra1] && rd2 == model[ra2] && dd == model[da],
            $sformatf("read r%0d=%02h r%0d=%02h r%0d=%02h", ra1, rd1, ra2, rd2, da, dd));
      @(posedge clk);
      if (we && wa != 0) model[wa] = wd;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
