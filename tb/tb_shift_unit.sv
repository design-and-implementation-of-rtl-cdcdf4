// tb_shift_unit: self-checking testbench for shift_unit. Random and corner-value operands
// for every operation and data format are compared with the reference model
// in msa_ref_pkg.
`include "tb_common.svh"
module tb_shift_unit;
  import msa_pkg::*;
  import msa_ref_pkg::*;
  `TB_COUNTERS
  logic clk = 0;
  always #5 clk = ~clk;
  `TB_WATCHDOG(clk, 200000)

  vec_t a, b, y, exp_y; df_e df; subop_t op;
  shift_unit dut (.a(a), .b(b), .df(df), .op(op), .y(y));
  string names [5] = {"SLL", "SRA", "SRL", "SRAR", "SRLR"};
  subop_t ops [5] = {SH_SLL, SH_SRA, SH_SRL, SH_SRAR, SH_SRLR};
  initial begin
    for (int f = 0; f < 4; f++) for (int k = 0; k < 5; k++) for (int t = 0; t < 100; t++) begin
      df = df_e'(f); op = ops[k];
      a = rand_elem(f); b = rand128();
      #1 exp_y = vec(names[k], f, a, b, 0);
      `CHECK(y === exp_y, $sformatf("%s df=%0d a=%h b=%h y=%h exp=%h", names[k], f, a, b, y, exp_y))
    end
    `TB_FINISH
  end
endmodule
