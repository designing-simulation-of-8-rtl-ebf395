// mips8_ref_pkg: instruction-level reference model of the 8-bit processor,
// used by the processor test benches. It is written from the instruction set
// description only (fields, operations, flags), not from the RTL blocks.
package mips8_ref_pkg;

  typedef struct {
    logic [7:0] r [8];
    logic       z;
    logic       c;
    // counts of what the executed program exercised
    int         n_exec;
    int         n_carry_in;   // ADC/SBB executed with C = 1
    int         n_r0_write;   // instruction targeting r0
    int         n_reserved;   // reserved format skipped
    int         n_shl;
    int         n_shr;
    int         n_imm;
  } ref_state_t;

  typedef struct {
    logic [2:0] rd;
    logic [7:0] val;
  } ref_wb_t;

  function automatic void ref_reset(ref ref_state_t s);
    for (int i = 0; i < 8; i++) s.r[i] = 8'h00;
    s.z = 0; s.c = 0;
    s.n_exec = 0; s.n_carry_in = 0; s.n_r0_write = 0; s.n_reserved = 0;
    s.n_shl = 0; s.n_shr = 0; s.n_imm = 0;
  endfunction

  // Executes one 19-bit instruction word. Returns 1 and fills wb when the
  // instruction writes a register other than r0.
  function automatic bit ref_step(ref ref_state_t s, input logic [18:0] w,
                                  output ref_wb_t wb);
    int a, b, res;
    bit cin;
    logic [2:0] fn, rd, r1, r2;
    bit wr;
    wb = '{rd: 3'd0, val: 8'd0};
    if (w[18] == 1'b1) begin
      s.n_reserved++;
      return 0;
    end
    fn = w[16:14]; rd = w[13:11]; r1 = w[10:8]; r2 = w[7:5];
    a   = int'(s.r[r1]);
    b   = w[17] ? int'(w[7:0]) : int'(s.r[r2]);
    cin = s.c;
    if (w[17]) s.n_imm++;
    case (fn)
      3'd0: begin res = a + b;       s.c = res[8]; end
      3'd1: begin res = a + b + int'(cin); s.c = res[8]; if (cin) s.n_carry_in++; end
      3'd2: begin res = a - b;       s.c = (a < b); end
      3'd3: begin res = a - b - int'(cin); s.c = (a < b + int'(cin)); if (cin) s.n_carry_in++; end
      3'd4: res = a & b;
      3'd5: res = a | b;
      3'd6: res = a ^ b;
      default: begin
        if (w[3]) begin res = (a * (1 << w[2:0])) % 256; s.n_shl++; end
        else      begin res = a / (1 << w[2:0]);         s.n_shr++; end
      end
    endcase
    res = res & 255;
    s.z = (res == 0);
    s.n_exec++;
    wr = (rd != 0);
    if (!wr) s.n_r0_write++;
    else s.r[rd] = res[7:0];
    wb = '{rd: rd, val: res[7:0]};
    return wr;
  endfunction

endpackage
