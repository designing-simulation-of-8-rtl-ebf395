// mips8_cpu: 8-bit RISC processor with a 19-bit instruction word, eight
// registers (r0 reads zero), register-register and register-immediate
// arithmetic, logic and shift instructions, Z/C flags and one interrupt input.
//
// Three steps make up each instruction: instruction fetch (PC unit and
// instruction memory), instruction decode (decoder) and execution (register
// read, shifter/ALU, EXE_REG_OUT). EXE_REG_OUT is written back to the
// register file on the following clock edge.
// PIPELINED = 1 (default): the instruction register and the decode register
//   are clocked, so the three steps work on three instructions at once. One
//   instruction completes per cycle; an instruction fetched at address A
//   (in the cycle the PC equals A) has its result in EXE_REG_OUT two rising
//   edges after that fetch cycle ends, i.e. three edges after the PC took A.
// PIPELINED = 0: both registers become transparent, an instruction goes from
//   the PC to EXE_REG_OUT in one (longer) clock cycle.
// In both modes the result of one instruction reaches the next through the
// bypass in the execution stage; there are no stalls.
// Interrupt: when irq is seen high and IF is clear, the instruction being
// decoded is squashed (pipelined mode also drops the one being fetched), the
// PC jumps to IRQ_VECTOR, and the squashed instruction's address is kept in
// the interrupt register (irq_ret_pc). No return instruction is defined.
// The program is loaded through imem_ld_* while rst_n is low. Reset is
// asynchronous and active low. dbg_addr/dbg_data read any register.
// The stage split, the widths and the block structure follow the original description;
// the instruction encoding of fn, the interrupt rules, the load port and the
// word-addressed PC are this design's choices (see mips8_pkg and the blocks).
module mips8_cpu
  import mips8_pkg::*;
#(
  parameter bit          PIPELINED  = 1'b1,
  parameter int unsigned IMEM_DEPTH = 36,
  parameter pc_t         IRQ_VECTOR = pc_t'(32)
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   irq,
  // program load
  input  logic   imem_ld_en,
  input  pc_t    imem_ld_addr,
  input  instr_t imem_ld_data,
  // observation
  output pc_t    pc,
  output instr_t ir,            // instruction register (word being decoded)
  output data_t  exe_reg_out,
  output logic   exe_wb_en,
  output raddr_t exe_wb_rd,
  output logic   flag_z,
  output logic   flag_c,
  output logic   flag_if,
  output pc_t    irq_ret_pc,
  output logic   irq_saved_z,
  output logic   irq_saved_c,
  output logic   ev_complete,   // an instruction completed execution this cycle
  output logic   ev_bypass,     // an operand came from EXE_REG_OUT this cycle
  output logic   ev_irq,        // an interrupt was taken this cycle
  input  raddr_t dbg_addr,
  output data_t  dbg_data
);

  pc_t    ir_pc;
  logic   ir_valid;
  logic   take_irq;
  ctrl_t  ctrl;
  raddr_t ra1, ra2;
  data_t  rd1, rd2;
  logic   z_we, z_next, c_we, c_next;
  logic   byp_a, byp_b;

  pc_unit #(.IRQ_VECTOR(IRQ_VECTOR)) u_pc (
    .clk      (clk),
    .rst_n    (rst_n),
    .take_irq (take_irq),
    .pc       (pc)
  );

  instr_mem #(.DEPTH(IMEM_DEPTH), .REGISTERED(PIPELINED)) u_imem (
    .clk         (clk),
    .rst_n       (rst_n),
    .ld_en       (imem_ld_en),
    .ld_addr     (imem_ld_addr),
    .ld_data     (imem_ld_data),
    .addr        (pc),
    .flush       (take_irq),
    .instr       (ir),
    .instr_pc    (ir_pc),
    .instr_valid (ir_valid)
  );

  decoder #(.REGISTERED(PIPELINED)) u_dec (
    .clk            (clk),
    .rst_n          (rst_n),
    .instr          (ir),
    .instr_pc       (ir_pc),
    .instr_valid    (ir_valid),
    .irq            (irq),
    .irq_in_service (flag_if),
    .take_irq       (take_irq),
    .ctrl           (ctrl)
  );

  regfile u_rf (
    .clk      (clk),
    .rst_n    (rst_n),
    .ra1      (ra1),
    .rd1      (rd1),
    .ra2      (ra2),
    .rd2      (rd2),
    .we       (exe_wb_en),
    .wa       (exe_wb_rd),
    .wd       (exe_reg_out),
    .dbg_addr (dbg_addr),
    .dbg_data (dbg_data)
  );

  execute u_ex (
    .clk      (clk),
    .rst_n    (rst_n),
    .ctrl     (ctrl),
    .ra1      (ra1),
    .ra2      (ra2),
    .rd1      (rd1),
    .rd2      (rd2),
    .flag_c   (flag_c),
    .result_q (exe_reg_out),
    .wb_en    (exe_wb_en),
    .wb_rd    (exe_wb_rd),
    .z_we     (z_we),
    .z_next   (z_next),
    .c_we     (c_we),
    .c_next   (c_next),
    .bypass_a (byp_a),
    .bypass_b (byp_b)
  );

  status_unit u_st (
    .clk         (clk),
    .rst_n       (rst_n),
    .z_we        (z_we),
    .z_next      (z_next),
    .c_we        (c_we),
    .c_next      (c_next),
    .irq         (irq),
    .take_irq    (take_irq),
    .ret_pc      (ir_pc),
    .flag_z      (flag_z),
    .flag_c      (flag_c),
    .flag_if     (flag_if),
    .irq_ret_pc  (irq_ret_pc),
    .irq_saved_z (irq_saved_z),
    .irq_saved_c (irq_saved_c)
  );

  // Rules of the interrupt and write-back interplay.
  a_irq_once: assert property (@(posedge clk) disable iff (!rst_n) take_irq |-> !flag_if)
    else $error("interrupt taken while one is in service");
  a_no_r0_wb: assert property (@(posedge clk) disable iff (!rst_n) exe_wb_en |-> exe_wb_rd != '0)
    else $error("write-back to r0 scheduled");
  a_irq_ret: assert property (@(posedge clk) disable iff (!rst_n) take_irq |=> irq_ret_pc == $past(ir_pc))
    else $error("interrupt register did not capture the return address");

  assign ev_complete = ctrl.valid;
  assign ev_bypass   = byp_a || byp_b;
  assign ev_irq      = take_irq;

endmodule
