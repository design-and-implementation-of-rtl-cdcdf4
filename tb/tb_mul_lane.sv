// tb_mul_lane: self-checking testbench for mul_lane. MULV, MADDV and MSUBV on 16- and 64-bit lanes against the reference model.
`include "tb_common.svh"
module tb_mul_lane;
  import msa_pkg::*;
  import msa_ref_pkg::*;
  `TB_COUNTERS
  logic clk = 0;
  always #5 clk = ~clk;
  `TB_WATCHDOG(clk, 200000)
  lop_e op;
  logic [15:0] a16, b16, c16, y16;
  logic [63:0] a64, b64, c64, y64;
  mul_lane #(.W(16)) d16 (.a(a16), .b(b16), .c(c16), .op(op), .y(y16));
  mul_lane #(.W(64)) d64 (.a(a64), .b(b64), .c(c64), .op(op), .y(y64));
  string names [3] = {"MULV", "MADDV", "MSUBV"};
  lop_e  ops [3] = {LOP_MUL, LOP_MADD, LOP_MSUB};
  initial begin
    for (int k = 0; k < 3; k++) for (int t = 0; t < 500; t++) begin
      v128 r, s;
      r = rand_elem(3); s = rand128();
      op = ops[k]; a64 = r[63:0]; b64 = r[127:64]; c64 = s[63:0];
      a16 = r[15:0]; b16 = r[79:64]; c16 = s[79:64];
      #1;
      `CHECK(64'(y16) == elem(names[k], 1, 64'(a16), 64'(b16), 64'(c16)), $sformatf("%s w16", names[k]))
      `CHECK(y64 == elem(names[k], 3, a64, b64, c64), $sformatf("%s w64 %h %h %h -> %h", names[k], a64, b64, c64, y64))
    end
    `TB_FINISH
  end
endmodule
