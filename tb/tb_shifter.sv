// tb_shifter: exhaustive check of the shifter, all 256 values, all eight
// amounts, both directions, against multiplication and division by 2^n.
module tb_shifter;
  import mips8_pkg::*;

  data_t      a, y;
  logic [2:0] sh;
  logic       left;
  int         checks = 0, failures = 0;

  shifter dut (.a(a), .shamt(sh), .left(left), .y(y));

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++)
      for (int n = 0; n < 8; n++)
        for (int d = 0; d < 2; d++) begin
          int e;
          a = data_t'(v); sh = 3'(n); left = 1'(d);
          #1;
          e = d ? (v * (1 << n)) % 256 : v / (1 << n);
          checks++;
          if (int'(y) != e) begin
            failures++;
            if (failures < 10) $display("FAIL a=%02h n=%0d left=%0d y=%02h exp=%02h", v, n, d, y, e);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
