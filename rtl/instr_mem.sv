// instr_mem: instruction memory (DEPTH words of 19 bits) and the instruction
// register that follows it.
//
// The memory holds the program. It is filled through the load port (ld_*),
// one word per clock, while the processor is held in reset. A read at an
// address at or beyond DEPTH returns the all-zero word, which is the
// instruction "r0 = r0 + r0" and does nothing.
// With REGISTERED = 1 (pipelined processor) the word read at addr is captured
// in the instruction register on the rising edge, together with its address
// and a valid bit, as a single-port block RAM with a registered output would;
// flush replaces the captured word with a bubble. With REGISTERED = 0
// (non-pipelined processor) the read is combinational, the outputs follow
// addr in the same cycle and flush is not used: the decoder itself turns the
// instruction into a bubble when it takes an interrupt.
// The 36 x 19-bit size and the instruction register are the original design's; the
// load port, the out-of-range behaviour and the valid bit are this design's.
module instr_mem
  import mips8_pkg::*;
#(
  parameter int unsigned DEPTH      = 36,
  parameter bit          REGISTERED = 1'b1
) (
  input  logic   clk,
  input  logic   rst_n,
  // program load port
  input  logic   ld_en,
  input  pc_t    ld_addr,
  input  instr_t ld_data,
  // fetch port
  input  pc_t    addr,
  input  logic   flush,
  output instr_t instr,
  output pc_t    instr_pc,
  output logic   instr_valid
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  instr_t mem [DEPTH];
  instr_t word;

  always_ff @(posedge clk) begin
    if (ld_en && ld_addr < pc_t'(DEPTH)) mem[ld_addr[AW-1:0]] <= ld_data;
  end

  always_comb word = (addr < pc_t'(DEPTH)) ? mem[addr[AW-1:0]] : '0;

  if (REGISTERED) begin : g_ir
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        instr       <= '0;
        instr_pc    <= '0;
        instr_valid <= 1'b0;
      end else if (flush) begin
        instr       <= '0;
        instr_pc    <= addr;
        instr_valid <= 1'b0;
      end else begin
        instr       <= word;
        instr_pc    <= addr;
        instr_valid <= 1'b1;
      end
    end
  end else begin : g_comb
    always_comb begin
      instr       = word;
      instr_pc    = addr;
      instr_valid = 1'b1;   // a taken interrupt is squashed by the decoder
    end
  end

endmodule
