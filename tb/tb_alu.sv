// tb_alu: checks every ALU function on random and corner operands, with both
// carry-in values, against arithmetic done on integers in the test bench.
module tb_alu;
  import mips8_pkg::*;

  fn_e   fn;
  data_t a, b, y;
  logic  cin, cout, cw;
  int    checks = 0, failures = 0;

  alu dut (.fn(fn), .a(a), .b(b), .c_in(cin), .y(y), .c_out(cout), .c_write(cw));

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4000; i++) begin
      int ia, ib, ic, ey, ec;
      bit ew;
      fn  = fn_e'(i % 8);
      a   = (i < 64) ? data_t'((i % 4 == 0) ? 0 : 255) : data_t'($urandom);
      b   = (i < 64) ? data_t'((i % 3 == 0) ? 255 : 1) : data_t'($urandom);
      cin = 1'($urandom);
      #1;
      ia = int'(a); ib = int'(b); ic = int'(cin);
      ew = 1; ec = int'(cout);
      case (i % 8)
        0: begin ey = ia + ib;      ec = (ey > 255);        end
        1: begin ey = ia + ib + ic; ec = (ey > 255);        end
        2: begin ey = ia - ib;      ec = (ia < ib);         end
        3: begin ey = ia - ib - ic; ec = (ia < ib + ic);    end
        4: begin ey = ia & ib; ew = 0; end
        5: begin ey = ia | ib; ew = 0; end
        6: begin ey = ia ^ ib; ew = 0; end
        default: begin ey = ia; ew = 0; end
      endcase
      checks++;
      if (int'(y) != (ey & 255) || cw != ew || (ew && int'(cout) != ec)) begin
        failures++;
        if (failures < 10)
          $display("FAIL fn=%0d a=%02h b=%02h cin=%0b: y=%02h c=%0b cw=%0b", i % 8, a, b, cin, y, cout, cw);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
