// tb_special_unit1: self-checking testbench for special_unit1. Odd half-width elements of operand A must be sign- or zero-extended to full width for H, W and D; with widen low or df = B the operand passes unchanged.
`include "tb_common.svh"
module tb_special_unit1;
  import msa_pkg::*;
  import msa_ref_pkg::*;
  `TB_COUNTERS
  logic clk = 0;
  always #5 clk = ~clk;
  `TB_WATCHDOG(clk, 400000)
  vec_t a, y; df_e df; logic sgn, widen;
  special_unit1 dut (.a(a), .df(df), .sgn(sgn), .widen(widen), .y(y));
  initial begin
    for (int t = 0; t < 2000; t++) begin
      vec_t e; int f;
      f = t % 4; a = rand_elem($urandom_range(0, 3)); df = df_e'(f); sgn = t[2]; widen = (t % 9 != 0);
      #1;
      e = a;
      if (widen && f > 0)
        for (int i = 0; i < ne(f); i++) e = put(e, f, i, 64'(val(get(a, f-1, 2*i+1), ew(f)/2, sgn)));
      `CHECK(y === e, $sformatf("df=%0d sgn=%0d a=%h y=%h", f, sgn, a, y))
    end
    `TB_FINISH
  end
endmodule
