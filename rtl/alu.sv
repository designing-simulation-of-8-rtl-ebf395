// alu: 8-bit arithmetic and logic unit of the execution stage.
//
// It combines the small operation decoder drawn next to the ALU and the ALU
// itself. The fn code selects add, add with carry in, subtract, subtract with
// borrow in, and, or or xor; the arithmetic operations are done on 9 bits so
// that the ninth bit is the carry (add) or the borrow (subtract), matching
// the 9-bit adders and subtractors with carry/borrow in that the synthesis
// summary lists. The encoding of fn, and which operations change the carry,
// are this design's choice: arithmetic operations write C, logic operations
// and the shift (fn = FN_SHIFT, done by the shifter) leave it unchanged.
// Z is produced for every operation by the execution stage, not here.
// Purely combinational.
module alu
  import mips8_pkg::*;
(
  input  fn_e   fn,
  input  data_t a,
  input  data_t b,
  input  logic  c_in,      // carry flag, used by ADC and SBB
  output data_t y,
  output logic  c_out,     // carry (add) or borrow (subtract)
  output logic  c_write    // operation updates the carry flag
);

  logic [XLEN:0] wide;

  always_comb begin
    wide    = '0;
    c_write = 1'b0;
    unique case (fn)
      FN_ADD: begin wide = {1'b0, a} + {1'b0, b};                  c_write = 1'b1; end
      FN_ADC: begin wide = {1'b0, a} + {1'b0, b} + (XLEN+1)'(c_in); c_write = 1'b1; end
      FN_SUB: begin wide = {1'b0, a} - {1'b0, b};                  c_write = 1'b1; end
      FN_SBB: begin wide = {1'b0, a} - {1'b0, b} - (XLEN+1)'(c_in); c_write = 1'b1; end
      FN_AND: wide = {1'b0, a & b};
      FN_OR:  wide = {1'b0, a | b};
      FN_XOR: wide = {1'b0, a ^ b};
      default: wide = {1'b0, a};
    endcase
    y     = wide[XLEN-1:0];
    c_out = wide[XLEN];
  end

endmodule
