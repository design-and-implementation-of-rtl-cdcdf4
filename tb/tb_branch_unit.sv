// tb_branch_unit: self-checking testbench for branch_unit. Random and corner-value operands
// for every operation and data format are compared with the reference model
// in msa_ref_pkg.
`include "tb_common.svh"
module tb_branch_unit;
  import msa_pkg::*;
  import msa_ref_pkg::*;
  `TB_COUNTERS
  logic clk = 0;
  always #5 clk = ~clk;
  `TB_WATCHDOG(clk, 200000)

  vec_t v; df_e df; brc_e cond; logic taken, exp_t;
  branch_unit dut (.v(v), .df(df), .cond(cond), .taken(taken));
  initial begin
    for (int f = 0; f < 4; f++) for (int k = 0; k < 4; k++) for (int t = 0; t < 100; t++) begin
      bit anyz;
      df = df_e'(f); cond = brc_e'(k);
      v = rand128();
      if (t % 4 == 1) v = put(v, f, $urandom_range(0, ne(f) - 1), 0);
      if (t % 4 == 2) v = 0;
      if (t % 4 == 3) v = 128'(1) << $urandom_range(0, 127);
      anyz = 0;
      for (int i = 0; i < ne(f); i++) if (get(v, f, i) == 0) anyz = 1;
      #1;
      case (k)
        0: exp_t = (v == 0);
        1: exp_t = (v != 0);
        2: exp_t = anyz;
        default: exp_t = !anyz;
      endcase
      `CHECK(taken === exp_t, $sformatf("branch cond=%0d df=%0d v=%h taken=%0d", k, f, v, taken))
    end
    `TB_FINISH
  end
endmodule
