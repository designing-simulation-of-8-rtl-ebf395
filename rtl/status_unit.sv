// status_unit: the Z, C and IF flags and the interrupt register.
//
// Z (result was zero) and C (carry or borrow) are written by the execution
// stage on the rising edge when it completes an instruction that updates
// them; C feeds back into add-with-carry and subtract-with-borrow.
// IF is set when an interrupt is taken and cleared once the interrupt input
// has gone low again, so one assertion of irq is taken once. In the cycle an
// interrupt is taken the interrupt register captures the return address
// (address of the first instruction that did not complete) together with the
// flag values that include the instruction completing in that cycle; it
// offers them to the PC logic and to the outside.
// The three flags and the interrupt register are the original design's; what is
// saved and when IF clears are this design's choices, since the original description
// defines no interrupt-return instruction. All registers reset to zero.
module status_unit
  import mips8_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  // flag updates from the execution stage
  input  logic z_we,
  input  logic z_next,
  input  logic c_we,
  input  logic c_next,
  // interrupt
  input  logic irq,
  input  logic take_irq,
  input  pc_t  ret_pc,
  output logic flag_z,
  output logic flag_c,
  output logic flag_if,
  output pc_t  irq_ret_pc,
  output logic irq_saved_z,
  output logic irq_saved_c
);

  logic z_d, c_d;

  always_comb begin
    z_d = z_we ? z_next : flag_z;
    c_d = c_we ? c_next : flag_c;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      flag_z      <= 1'b0;
      flag_c      <= 1'b0;
      flag_if     <= 1'b0;
      irq_ret_pc  <= '0;
      irq_saved_z <= 1'b0;
      irq_saved_c <= 1'b0;
    end else begin
      flag_z <= z_d;
      flag_c <= c_d;
      if (take_irq) begin
        flag_if     <= 1'b1;
        irq_ret_pc  <= ret_pc;
        irq_saved_z <= z_d;
        irq_saved_c <= c_d;
      end else if (!irq) begin
        flag_if <= 1'b0;
      end
    end
  end

endmodule
