// pc_unit: program counter and its updating logic.
//
// The 12-bit program counter addresses the instruction memory one word per
// step: it advances by one each clock cycle and is loaded with IRQ_VECTOR in
// the cycle that an interrupt is taken. The 12-bit width is the original design's;
// counting words instead of bytes (the instruction memory holds 19-bit words
// indexed directly by the counter), the interrupt vector address and the
// reset address of zero are this design's choices. No branch or jump
// instruction is defined, so there is no other source for the next address.
// Timing: pc changes on the rising clock edge; reset is asynchronous, active low.
module pc_unit
  import mips8_pkg::*;
#(
  parameter pc_t IRQ_VECTOR = pc_t'(32)
) (
  input  logic clk,
  input  logic rst_n,
  input  logic take_irq,   // load the interrupt vector
  output pc_t  pc
);

  pc_t pc_next;

  always_comb pc_next = take_irq ? IRQ_VECTOR : pc + pc_t'(1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) pc <= '0;
    else        pc <= pc_next;
  end

endmodule
