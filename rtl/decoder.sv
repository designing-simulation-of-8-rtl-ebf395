// decoder: instruction decoder, interrupt entry and decode register.
//
// Splits the 19-bit instruction into its fields (see mips8_pkg) and forms the
// control record for the execution stage: register or immediate second
// operand, ALU function, shift amount and direction, destination register and
// whether it is written (never for r0). Format codes 10 and 11 are not
// defined and become bubbles.
// The interrupt input enters here, as drawn in the original description: when irq is high,
// no interrupt is in service and a valid instruction is being decoded, the
// decoder raises take_irq (combinational) and replaces that instruction with a
// bubble; the PC unit then jumps to the vector and the status unit saves the
// squashed instruction's address as the return address.
// With REGISTERED = 1 (pipelined) the record is held in the decode register
// and reaches the execution stage one clock later; with REGISTERED = 0 it
// passes through in the same cycle. The formats, the Interrupt input and the
// Decode Register are the original design's; the interrupt rule is this design's.
module decoder
  import mips8_pkg::*;
#(
  parameter bit REGISTERED = 1'b1
) (
  input  logic   clk,
  input  logic   rst_n,
  input  instr_t instr,
  input  pc_t    instr_pc,
  input  logic   instr_valid,
  input  logic   irq,
  input  logic   irq_in_service,   // IF flag
  output logic   take_irq,
  output ctrl_t  ctrl
);

  fmt_e  fmt;
  ctrl_t dec;

  always_comb begin
    fmt      = fmt_e'(instr[18:17]);
    take_irq = irq && !irq_in_service && instr_valid;

    dec         = CTRL_BUBBLE;
    dec.fn      = fn_e'(instr[16:14]);
    dec.rd      = instr[13:11];
    dec.r1      = instr[10:8];
    dec.r2      = instr[7:5];
    dec.imm     = instr[7:0];
    dec.shl     = instr[3];
    dec.shamt   = instr[2:0];
    dec.pc      = instr_pc;
    dec.use_imm = (fmt == FMT_IMM);
    dec.valid   = instr_valid && !take_irq && (fmt == FMT_REG || fmt == FMT_IMM);
    dec.wr_en   = dec.valid && (dec.rd != '0);
  end

  if (REGISTERED) begin : g_dreg
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) ctrl <= CTRL_BUBBLE;
      else        ctrl <= dec;
    end
  end else begin : g_comb
    always_comb ctrl = dec;
  end

endmodule
