// tb_special_unit2: self-checking testbench for special_unit2. Operand B selection: register, even half-width elements widened, and the u5, s5, i8, s10 and m immediates replicated into every element.
`include "tb_common.svh"
module tb_special_unit2;
  import msa_pkg::*;
  import msa_ref_pkg::*;
  `TB_COUNTERS
  logic clk = 0;
  always #5 clk = ~clk;
  `TB_WATCHDOG(clk, 400000)
  vec_t b, y; df_e df; logic sgn; bsrc_e sel; logic [9:0] imm;
  special_unit2 dut (.b(b), .df(df), .sgn(sgn), .sel(sel), .imm(imm), .y(y));
  initial begin
    for (int t = 0; t < 3000; t++) begin
      vec_t e; int f;
      f = t % 4; b = rand_elem(f); df = df_e'(f); sgn = t[2]; imm = 10'($urandom);
      sel = bsrc_e'($urandom_range(0, 6));
      if (sel == BSRC_M) imm[9:6] = 0;
      #1;
      case (sel)
        BSRC_VREG: e = b;
        BSRC_EVEN: begin
          e = b;
          if (f > 0) for (int i = 0; i < ne(f); i++) e = put(e, f, i, 64'(val(get(b, f-1, 2*i), ew(f)/2, sgn)));
        end
        BSRC_U5:  e = splat(f, 64'(imm[4:0]));
        BSRC_S5:  e = splat(f, 64'(signed'(imm[4:0])));
        BSRC_I8:  e = splat(0, 64'(imm[7:0]));
        BSRC_S10: e = splat(f, 64'(signed'(imm)));
        default:  e = splat(f, 64'(imm[5:0]));
      endcase
      `CHECK(y === e, $sformatf("sel=%0d df=%0d imm=%h y=%h", sel, f, imm, y))
    end
    `TB_FINISH
  end
endmodule
