// tb_minmax_unit: self-checking testbench for minmax_unit. Random and corner-value operands
// for every operation and data format are compared with the reference model
// in msa_ref_pkg.
`include "tb_common.svh"
module tb_minmax_unit;
  import msa_pkg::*;
  import msa_ref_pkg::*;
  `TB_COUNTERS
  logic clk = 0;
  always #5 clk = ~clk;
  `TB_WATCHDOG(clk, 200000)

  vec_t a, b, y, exp_y; df_e df; subop_t op; logic sgn;
  minmax_unit dut (.a(a), .b(b), .df(df), .op(op), .sgn(sgn), .y(y));
  string names [6] = {"MAX_S", "MAX_U", "MIN_S", "MIN_U", "MAX_A", "MIN_A"};
  subop_t ops [6] = {MM_MAX, MM_MAX, MM_MIN, MM_MIN, MM_MAXA, MM_MINA};
  logic   sg  [6] = {1, 0, 1, 0, 1, 1};
  initial begin
    for (int f = 0; f < 4; f++) for (int k = 0; k < 6; k++) for (int t = 0; t < 100; t++) begin
      df = df_e'(f); op = ops[k]; sgn = sg[k];
      a = rand_elem(f); b = rand_elem(f);
      #1 exp_y = vec(names[k], f, a, b, 0);
      `CHECK(y === exp_y, $sformatf("%s df=%0d a=%h b=%h y=%h exp=%h", names[k], f, a, b, y, exp_y))
    end
    `TB_FINISH
  end
endmodule
