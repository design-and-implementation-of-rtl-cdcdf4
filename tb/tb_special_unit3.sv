// tb_special_unit3: self-checking testbench for special_unit3. Operand C is either the register value or a GPR replicated into every element (sign-extended for D).
`include "tb_common.svh"
module tb_special_unit3;
  import msa_pkg::*;
  import msa_ref_pkg::*;
  `TB_COUNTERS
  logic clk = 0;
  always #5 clk = ~clk;
  `TB_WATCHDOG(clk, 400000)
  vec_t c, y; df_e df; logic use_gpr; logic [31:0] gpr;
  special_unit3 dut (.c(c), .gpr(gpr), .df(df), .use_gpr(use_gpr), .y(y));
  initial begin
    for (int t = 0; t < 2000; t++) begin
      vec_t e; int f;
      f = t % 4; c = rand128(); gpr = $urandom; df = df_e'(f); use_gpr = t[2];
      if (t % 5 == 0) gpr[31] = 1'b1;
      #1;
      e = use_gpr ? splat(f, 64'(signed'(gpr))) : c;
      `CHECK(y === e, $sformatf("df=%0d gpr=%h y=%h", f, gpr, y))
    end
    `TB_FINISH
  end
endmodule
