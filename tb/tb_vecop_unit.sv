// tb_vecop_unit: self-checking testbench for vecop_unit. Random and corner-value operands
// for every operation and data format are compared with the reference model
// in msa_ref_pkg.
`include "tb_common.svh"
module tb_vecop_unit;
  import msa_pkg::*;
  import msa_ref_pkg::*;
  `TB_COUNTERS
  logic clk = 0;
  always #5 clk = ~clk;
  `TB_WATCHDOG(clk, 200000)

  vec_t a, b, c, y, exp_y; subop_t op;
  vecop_unit dut (.a(a), .b(b), .c(c), .op(op), .y(y));
  initial begin
    for (int k = 0; k < 7; k++) for (int t = 0; t < 100; t++) begin
      op = subop_t'(k);
      a = rand128(); b = rand128(); c = rand128();
      #1;
      case (k)
        0: exp_y = a & b;
        1: exp_y = a | b;
        2: exp_y = ~(a | b);
        3: exp_y = a ^ b;
        // bit by bit: BMNZ takes a where b is set, BMZ where b is clear,
        // BSEL takes b where c is set
        default: for (int i = 0; i < 128; i++)
          exp_y[i] = (k == 4) ? (b[i] ? a[i] : c[i]) :
                     (k == 5) ? (b[i] ? c[i] : a[i]) : (c[i] ? b[i] : a[i]);
      endcase
      `CHECK(y === exp_y, $sformatf("vecop %0d a=%h b=%h c=%h y=%h exp=%h", k, a, b, c, y, exp_y))
    end
    `TB_FINISH
  end
endmodule
