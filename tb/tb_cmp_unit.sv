// tb_cmp_unit: self-checking testbench for cmp_unit. Random and corner-value operands
// for every operation and data format are compared with the reference model
// in msa_ref_pkg.
`include "tb_common.svh"
module tb_cmp_unit;
  import msa_pkg::*;
  import msa_ref_pkg::*;
  `TB_COUNTERS
  logic clk = 0;
  always #5 clk = ~clk;
  `TB_WATCHDOG(clk, 200000)

  vec_t a, b, y, exp_y; df_e df; subop_t op; logic sgn;
  cmp_unit dut (.a(a), .b(b), .df(df), .op(op), .sgn(sgn), .y(y));
  string names [5] = {"CEQ", "CLT_S", "CLT_U", "CLE_S", "CLE_U"};
  subop_t ops [5] = {CMP_EQ, CMP_LT, CMP_LT, CMP_LE, CMP_LE};
  logic   sg  [5] = {1, 1, 0, 1, 0};
  initial begin
    for (int f = 0; f < 4; f++) for (int k = 0; k < 5; k++) for (int t = 0; t < 100; t++) begin
      df = df_e'(f); op = ops[k]; sgn = sg[k];
      a = rand_elem(f); b = (t % 4 == 0) ? a : rand_elem(f);
      #1 exp_y = vec(names[k], f, a, b, 0);
      `CHECK(y === exp_y, $sformatf("%s df=%0d a=%h b=%h y=%h exp=%h", names[k], f, a, b, y, exp_y))
    end
    `TB_FINISH
  end
endmodule
