// tb_count_unit: self-checking testbench for count_unit. Random and corner-value operands
// for every operation and data format are compared with the reference model
// in msa_ref_pkg.
`include "tb_common.svh"
module tb_count_unit;
  import msa_pkg::*;
  import msa_ref_pkg::*;
  `TB_COUNTERS
  logic clk = 0;
  always #5 clk = ~clk;
  `TB_WATCHDOG(clk, 200000)

  vec_t a, y, exp_y; df_e df; subop_t op;
  count_unit dut (.a(a), .df(df), .op(op), .y(y));
  string names [3] = {"PCNT", "NLOC", "NLZC"};
  subop_t ops [3] = {CN_PCNT, CN_NLOC, CN_NLZC};
  initial begin
    for (int f = 0; f < 4; f++) for (int k = 0; k < 3; k++) for (int t = 0; t < 100; t++) begin
      df = df_e'(f); op = ops[k];
      a = rand_elem(f);
      if (t % 3 == 1) a = a >> $urandom_range(0, 127);
      if (t % 3 == 2) a = ~(a >> $urandom_range(0, 127));
      #1 exp_y = vec(names[k], f, a, 0, 0);
      `CHECK(y === exp_y, $sformatf("%s df=%0d a=%h y=%h exp=%h", names[k], f, a, y, exp_y))
    end
    `TB_FINISH
  end
endmodule
