// execute: execution stage with its result register EXE_REG_OUT.
//
// Operands come from the register file. Each register operand has a bypass
// multiplexer: if EXE_REG_OUT holds a result for the register being read that
// has not yet been written back, that result is used instead of the register
// file's stale copy. The second ALU operand is then either that register or
// the 8-bit constant. The shifter works on the first operand with the 3-bit
// shift amount; the ALU works on both. A result multiplexer picks the shifter
// for fn = FN_SHIFT and the ALU otherwise, and the choice is clocked into
// EXE_REG_OUT together with the destination register. EXE_REG_OUT is written
// back to the register file on the next rising edge (wb_* outputs), which is
// why the bypass is needed for the next instruction.
// Z and C updates go to the status unit (z_*, c_*) in the same cycle.
// The structure (operand multiplexers, shifter with a 3-bit immediate, ALU,
// result multiplexer, EXE_REG_OUT feeding back to the operand multiplexers)
// is the original design's. Reading that feedback path as a result bypass, and the
// write-back timing, are this design's.
// A bubble (ctrl.valid = 0) leaves EXE_REG_OUT's value and writes nothing.
module execute
  import mips8_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  ctrl_t  ctrl,
  // register file read ports
  output raddr_t ra1,
  output raddr_t ra2,
  input  data_t  rd1,
  input  data_t  rd2,
  input  logic   flag_c,
  // EXE_REG_OUT and write-back
  output data_t  result_q,
  output logic   wb_en,
  output raddr_t wb_rd,
  // flag updates
  output logic   z_we,
  output logic   z_next,
  output logic   c_we,
  output logic   c_next,
  // bypass activity, for observation
  output logic   bypass_a,
  output logic   bypass_b
);

  data_t op_a, op_b_reg, op_b, sh_y, alu_y, result;
  logic  alu_c, alu_cw;

  assign ra1 = ctrl.r1;
  assign ra2 = ctrl.r2;

  always_comb begin
    bypass_a = ctrl.valid && wb_en && (wb_rd == ctrl.r1);
    bypass_b = ctrl.valid && !ctrl.use_imm && ctrl.fn != FN_SHIFT
               && wb_en && (wb_rd == ctrl.r2);
    op_a     = (wb_en && wb_rd == ctrl.r1) ? result_q : rd1;
    op_b_reg = (wb_en && wb_rd == ctrl.r2) ? result_q : rd2;
    op_b     = ctrl.use_imm ? ctrl.imm : op_b_reg;
  end

  shifter u_shifter (
    .a     (op_a),
    .shamt (ctrl.shamt),
    .left  (ctrl.shl),
    .y     (sh_y)
  );

  alu u_alu (
    .fn      (ctrl.fn),
    .a       (op_a),
    .b       (op_b),
    .c_in    (flag_c),
    .y       (alu_y),
    .c_out   (alu_c),
    .c_write (alu_cw)
  );

  always_comb begin
    result = (ctrl.fn == FN_SHIFT) ? sh_y : alu_y;
    z_we   = ctrl.valid;
    z_next = (result == '0);
    c_we   = ctrl.valid && alu_cw;
    c_next = alu_c;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      result_q <= '0;
      wb_en    <= 1'b0;
      wb_rd    <= '0;
    end else if (ctrl.valid) begin
      result_q <= result;
      wb_en    <= ctrl.wr_en;
      wb_rd    <= ctrl.rd;
    end else begin
      wb_en    <= 1'b0;
    end
  end

endmodule
