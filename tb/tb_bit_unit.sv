// tb_bit_unit: self-checking testbench for bit_unit. Random and corner-value operands
// for every operation and data format are compared with the reference model
// in msa_ref_pkg.
`include "tb_common.svh"
module tb_bit_unit;
  import msa_pkg::*;
  import msa_ref_pkg::*;
  `TB_COUNTERS
  logic clk = 0;
  always #5 clk = ~clk;
  `TB_WATCHDOG(clk, 200000)

  vec_t a, b, c, y, exp_y; df_e df; subop_t op;
  bit_unit dut (.a(a), .b(b), .c(c), .df(df), .op(op), .y(y));
  string names [5] = {"BCLR", "BSET", "BNEG", "BINSL", "BINSR"};
  subop_t ops [5] = {BT_CLR, BT_SET, BT_NEG, BT_INSL, BT_INSR};
  initial begin
    for (int f = 0; f < 4; f++) for (int k = 0; k < 5; k++) for (int t = 0; t < 100; t++) begin
      df = df_e'(f); op = ops[k];
      a = rand128(); b = rand128(); c = rand128();
      #1 exp_y = vec(names[k], f, a, b, c);
      `CHECK(y === exp_y, $sformatf("%s df=%0d a=%h b=%h c=%h y=%h exp=%h", names[k], f, a, b, c, y, exp_y))
    end
    `TB_FINISH
  end
endmodule
