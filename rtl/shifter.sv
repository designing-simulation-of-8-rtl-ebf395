// shifter: 8-bit logical shifter of the execution stage.
//
// Shifts the first operand left or right by 0 to 7 places, filling with
// zeros. The 3-bit immediate shift amount and the 8-bit data path are the
// document's; the logical left and right shifts match the shifters of its
// synthesis summary. Taking the direction from one instruction bit is this
// design's choice. Purely combinational.
module shifter
  import mips8_pkg::*;
(
  input  data_t      a,
  input  logic [2:0] shamt,
  input  logic       left,    // 1 = shift left, 0 = shift right
  output data_t      y
);

  always_comb begin
    if (left) y = a << shamt;
    else      y = a >> shamt;
  end

endmodule
