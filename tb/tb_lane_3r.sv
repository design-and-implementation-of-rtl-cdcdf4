// tb_lane_3r: self-checking testbench for lane_3r. Adder, multiplier and divider operations through one 16-bit 3R lane; the divider result is taken when done rises and must arrive 4 cycles after start.
`include "tb_common.svh"
module tb_lane_3r;
  import msa_pkg::*;
  import msa_ref_pkg::*;
  `TB_COUNTERS
  logic clk = 0;
  always #5 clk = ~clk;
  `TB_WATCHDOG(clk, 200000)
  logic rst, start, sgn, sat, done;
  lop_e op;
  logic [15:0] a, b, c, y;
  lane_3r #(.W(16), .DIV_LAT(4)) dut (.clk(clk), .rst(rst), .a(a), .b(b), .c(c), .op(op),
                                      .sgn(sgn), .sat(sat), .start(start), .y(y), .done(done));
  typedef struct { string name; lop_e op; logic sgn; logic sat; } tc_t;
  tc_t tcs [10] = '{ '{"ADDV", LOP_ADD, 0, 0}, '{"ADDS_S", LOP_ADD, 1, 1}, '{"AVER_U", LOP_AVER, 0, 0},
    '{"ASUB_S", LOP_ASUB, 1, 0}, '{"MULV", LOP_MUL, 0, 0}, '{"MSUBV", LOP_MSUB, 0, 0},
    '{"DIV_S", LOP_DIV, 1, 0}, '{"DIV_U", LOP_DIV, 0, 0}, '{"MOD_S", LOP_MOD, 1, 0}, '{"MOD_U", LOP_MOD, 0, 0}};
  initial begin
    rst = 1; start = 0; {a, b, c} = '0; op = LOP_ADD; sgn = 0; sat = 0;
    repeat (2) @(posedge clk);
    rst = 0;
    for (int k = 0; k < 10; k++) for (int t = 0; t < 60; t++) begin
      v128 r; int n;
      r = rand_elem(1);
      @(negedge clk);
      op = tcs[k].op; sgn = tcs[k].sgn; sat = tcs[k].sat; a = r[15:0]; b = r[31:16]; c = r[47:32];
      if (op == LOP_DIV || op == LOP_MOD) begin
        start = 1; @(negedge clk); start = 0; n = 1;
        while (!done && n < 20) begin @(negedge clk); n++; end
        `CHECK(n == 4, $sformatf("divide took %0d cycles", n))
      end else #1;
      `CHECK(64'(y) == elem(tcs[k].name, 1, 64'(a), 64'(b), 64'(c)), $sformatf("%s %h %h %h -> %h", tcs[k].name, a, b, c, y))
    end
    `TB_FINISH
  end
endmodule
