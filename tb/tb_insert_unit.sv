// tb_insert_unit: self-checking testbench for insert_unit. Random and corner-value operands
// for every operation and data format are compared with the reference model
// in msa_ref_pkg.
`include "tb_common.svh"
module tb_insert_unit;
  import msa_pkg::*;
  import msa_ref_pkg::*;
  `TB_COUNTERS
  logic clk = 0;
  always #5 clk = ~clk;
  `TB_WATCHDOG(clk, 200000)

  vec_t a, c, y, exp_y; logic [31:0] gpr, elem, exp_e; df_e df; subop_t op; logic [3:0] n; logic cs;
  insert_unit dut (.a(a), .c(c), .gpr(gpr), .df(df), .op(op), .n(n), .copy_sgn(cs), .y(y), .elem(elem));
  initial begin
    for (int f = 0; f < 4; f++) for (int t = 0; t < 200; t++) begin
      int idx; logic [63:0] e;
      df = df_e'(f); op = subop_t'(t % 2); cs = t[2];
      a = rand128(); c = rand128(); gpr = $urandom; n = 4'($urandom);
      idx = int'(n) % ne(f);
      #1;
      exp_y = put(c, f, idx, (t % 2 == 0) ? 64'(gpr) : get(a, f, 0));
      e = get(a, f, idx);
      exp_e = (f >= 2) ? e[31:0] : (cs ? 32'(val(e, ew(f), 1)) : e[31:0]);
      `CHECK(y === exp_y, $sformatf("INSERT/INSVE df=%0d n=%0d y=%h exp=%h", f, n, y, exp_y))
      `CHECK(elem === exp_e, $sformatf("COPY df=%0d n=%0d s=%0d elem=%h exp=%h", f, n, cs, elem, exp_e))
    end
    `TB_FINISH
  end
endmodule
