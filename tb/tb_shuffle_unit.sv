// tb_shuffle_unit: self-checking testbench for shuffle_unit. Random and corner-value operands
// for every operation and data format are compared with the reference model
// in msa_ref_pkg.
`include "tb_common.svh"
module tb_shuffle_unit;
  import msa_pkg::*;
  import msa_ref_pkg::*;
  `TB_COUNTERS
  logic clk = 0;
  always #5 clk = ~clk;
  `TB_WATCHDOG(clk, 200000)

  vec_t a, b, c, y, exp_y; df_e df; subop_t op; logic [31:0] n; logic [7:0] i8;
  shuffle_unit dut (.a(a), .b(b), .c(c), .df(df), .op(op), .n(n), .imm8(i8), .y(y));
  string names [10] = {"SLD", "SPLAT", "PCKEV", "PCKOD", "ILVL", "ILVR", "ILVEV", "ILVOD", "VSHF", "SHF"};
  initial begin
    for (int f = 0; f < 4; f++) for (int k = 0; k < 10; k++) for (int t = 0; t < 60; t++) begin
      df = df_e'(f); op = subop_t'(k);
      a = rand128(); b = rand128(); c = rand128(); n = $urandom; i8 = 8'($urandom);
      if (k == 8 && t % 2 == 0) for (int i = 0; i < 16; i++) c[i*8 +: 8] = c[i*8 +: 8] & 8'h3f;
      if (k == 9 && f == 3) continue;
      #1 exp_y = shuf(names[k], f, a, b, c, n, i8);
      `CHECK(y === exp_y, $sformatf("%s df=%0d n=%0d y=%h exp=%h", names[k], f, n, y, exp_y))
    end
    `TB_FINISH
  end
endmodule
