// regfile: eight 8-bit general purpose registers r0..r7.
//
// Two asynchronous read ports feed the execution stage; one synchronous write
// port is written on the rising clock edge from the execution result
// register. r0 always reads zero and ignores writes, as in the original description. A
// third read port (dbg_*) lets a test bench or debugger inspect registers.
// Clearing all registers on reset is this design's choice. A read of a
// register in the same cycle that it is written returns the old value; the
// execution stage covers that case with its bypass.
module regfile
  import mips8_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  raddr_t ra1,
  output data_t  rd1,
  input  raddr_t ra2,
  output data_t  rd2,
  input  logic   we,
  input  raddr_t wa,
  input  data_t  wd,
  input  raddr_t dbg_addr,
  output data_t  dbg_data
);

  data_t regs [NREG];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NREG; i++) regs[i] <= '0;
    end else if (we && wa != '0) begin
      regs[wa] <= wd;
    end
  end

  assign rd1      = (ra1 == '0) ? '0 : regs[ra1];
  assign rd2      = (ra2 == '0) ? '0 : regs[ra2];
  assign dbg_data = (dbg_addr == '0) ? '0 : regs[dbg_addr];

endmodule
