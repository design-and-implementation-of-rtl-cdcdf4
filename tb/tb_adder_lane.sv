// tb_adder_lane: self-checking testbench for adder_lane. Every adder-lane operation, signed and unsigned, saturated or not, is compared with the reference model for 8-, 16-, 32- and 64-bit lanes.
`include "tb_common.svh"
module tb_adder_lane;
  import msa_pkg::*;
  import msa_ref_pkg::*;
  `TB_COUNTERS
  logic clk = 0;
  always #5 clk = ~clk;
  `TB_WATCHDOG(clk, 200000)
  lop_e op; logic sgn, sat;
  logic [7:0]  a8,  b8,  y8;
  logic [15:0] a16, b16, y16;
  logic [31:0] a32, b32, y32;
  logic [63:0] a64, b64, y64;
  adder_lane #(.W(8))  d8  (.a(a8),  .b(b8),  .op(op), .sgn(sgn), .sat(sat), .y(y8));
  adder_lane #(.W(16)) d16 (.a(a16), .b(b16), .op(op), .sgn(sgn), .sat(sat), .y(y16));
  adder_lane #(.W(32)) d32 (.a(a32), .b(b32), .op(op), .sgn(sgn), .sat(sat), .y(y32));
  adder_lane #(.W(64)) d64 (.a(a64), .b(b64), .op(op), .sgn(sgn), .sat(sat), .y(y64));
  typedef struct { string name; lop_e op; logic sgn; logic sat; } tc_t;
  tc_t tcs [20] = '{
    '{"ADDV", LOP_ADD, 0, 0}, '{"SUBV", LOP_SUB, 0, 0}, '{"ADD_A", LOP_ADDA, 0, 0},
    '{"ADDS_A", LOP_ADDA, 0, 1}, '{"ADDS_S", LOP_ADD, 1, 1}, '{"ADDS_U", LOP_ADD, 0, 1},
    '{"AVE_S", LOP_AVE, 1, 0}, '{"AVE_U", LOP_AVE, 0, 0}, '{"AVER_S", LOP_AVER, 1, 0},
    '{"AVER_U", LOP_AVER, 0, 0}, '{"SUBS_S", LOP_SUB, 1, 1}, '{"SUBS_U", LOP_SUB, 0, 1},
    '{"SUBSUS_U", LOP_SUBSUS, 0, 0}, '{"SUBSUU_S", LOP_SUBSUU, 0, 0},
    '{"ASUB_S", LOP_ASUB, 1, 0}, '{"ASUB_U", LOP_ASUB, 0, 0},
    '{"ADDV", LOP_ADD, 1, 0}, '{"SUBV", LOP_SUB, 1, 0}, '{"ASUB_U", LOP_ASUB, 0, 0}, '{"ADDV", LOP_ADD, 0, 0}};
  initial begin
    for (int k = 0; k < 20; k++) for (int t = 0; t < 300; t++) begin
      v128 va, vb;
      op = tcs[k].op; sgn = tcs[k].sgn; sat = tcs[k].sat;
      va = rand_elem(3); vb = rand_elem(3);
      if (t < 256) begin va[7:0] = 8'(t); vb[7:0] = 8'($urandom); end
      {a8, a16, a32, a64} = {va[7:0], va[15:0], va[31:0], va[63:0]};
      {b8, b16, b32, b64} = {vb[7:0], vb[15:0], vb[31:0], vb[63:0]};
      a16 = va[79:64]; b16 = vb[79:64]; a32 = va[127:96]; b32 = vb[127:96];
      #1;
      `CHECK(64'(y8)  == elem(tcs[k].name, 0, 64'(a8),  64'(b8),  0), $sformatf("%s w8 %h %h -> %h", tcs[k].name, a8, b8, y8))
      `CHECK(64'(y16) == elem(tcs[k].name, 1, 64'(a16), 64'(b16), 0), $sformatf("%s w16 %h %h -> %h", tcs[k].name, a16, b16, y16))
      `CHECK(64'(y32) == elem(tcs[k].name, 2, 64'(a32), 64'(b32), 0), $sformatf("%s w32 %h %h -> %h", tcs[k].name, a32, b32, y32))
      `CHECK(y64 == elem(tcs[k].name, 3, a64, b64, 0), $sformatf("%s w64 %h %h -> %h", tcs[k].name, a64, b64, y64))
    end
    `TB_FINISH
  end
endmodule
