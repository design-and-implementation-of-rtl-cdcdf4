// tb_dotp_unit: self-checking testbench for dotp_unit. Random and corner-value operands
// for every operation and data format are compared with the reference model
// in msa_ref_pkg.
`include "tb_common.svh"
module tb_dotp_unit;
  import msa_pkg::*;
  import msa_ref_pkg::*;
  `TB_COUNTERS
  logic clk = 0;
  always #5 clk = ~clk;
  `TB_WATCHDOG(clk, 200000)

  vec_t a, b, c, y, exp_y; df_e df; subop_t op; logic sgn;
  dotp_unit dut (.a(a), .b(b), .c(c), .df(df), .op(op), .sgn(sgn), .y(y));
  initial begin
    for (int f = 1; f < 4; f++) for (int k = 0; k < 3; k++) for (int t = 0; t < 100; t++) begin
      df = df_e'(f); op = subop_t'(k); sgn = t[0];
      a = rand_elem(f - 1); b = rand_elem(f - 1); c = rand128();
      #1 exp_y = dotp(k, sgn, f, a, b, c);
      `CHECK(y === exp_y, $sformatf("DOTP kind=%0d s=%0d df=%0d y=%h exp=%h", k, sgn, f, y, exp_y))
    end
    `TB_FINISH
  end
endmodule
