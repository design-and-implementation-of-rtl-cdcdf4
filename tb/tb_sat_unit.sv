// tb_sat_unit: self-checking testbench for sat_unit. Random and corner-value operands
// for every operation and data format are compared with the reference model
// in msa_ref_pkg.
`include "tb_common.svh"
module tb_sat_unit;
  import msa_pkg::*;
  import msa_ref_pkg::*;
  `TB_COUNTERS
  logic clk = 0;
  always #5 clk = ~clk;
  `TB_WATCHDOG(clk, 200000)

  vec_t a, y, exp_y; df_e df; logic [5:0] m; logic sgn;
  sat_unit dut (.a(a), .df(df), .m(m), .sgn(sgn), .y(y));
  initial begin
    for (int f = 0; f < 4; f++) for (int k = 0; k < 2; k++) for (int t = 0; t < 150; t++) begin
      df = df_e'(f); sgn = (k == 0);
      m = 6'($urandom_range(0, (8 << f) - 1));
      a = rand_elem(f);
      #1 exp_y = vec(sgn ? "SAT_S" : "SAT_U", f, a, splat(f, 64'(m)), 0);
      `CHECK(y === exp_y, $sformatf("SAT sgn=%0d df=%0d m=%0d a=%h y=%h exp=%h", sgn, f, m, a, y, exp_y))
    end
    `TB_FINISH
  end
endmodule
