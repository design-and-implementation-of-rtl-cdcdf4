// tb_div_lane: self-checking testbench for div_lane. DIV_S/U and MOD_S/U on 8- and 32-bit lanes, one new division per cycle; each result must appear exactly LAT=4 cycles after its start.
`include "tb_common.svh"
module tb_div_lane;
  import msa_pkg::*;
  import msa_ref_pkg::*;
  `TB_COUNTERS
  logic clk = 0;
  always #5 clk = ~clk;
  `TB_WATCHDOG(clk, 200000)
  logic rst, start, sgn, rem;
  logic [7:0]  a8,  b8,  y8;
  logic [31:0] a32, b32, y32;
  logic done8, done32;
  div_lane #(.W(8),  .LAT(4)) d8  (.clk(clk), .rst(rst), .start(start), .a(a8),  .b(b8),  .sgn(sgn), .rem(rem), .y(y8),  .done(done8));
  div_lane #(.W(32), .LAT(4)) d32 (.clk(clk), .rst(rst), .start(start), .a(a32), .b(b32), .sgn(sgn), .rem(rem), .y(y32), .done(done32));
  logic [63:0] exp8 [$], exp32 [$];
  int sent, got;
  initial begin
    rst = 1; start = 0; sgn = 0; rem = 0; a8 = 0; b8 = 0; a32 = 0; b32 = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int t = 0; t < 2000; t++) begin
      v128 r; string nm;
      r = rand_elem(2);
      @(negedge clk);
      start = (t % 7 != 3); sgn = t[0]; rem = t[1];
      a8 = r[7:0]; b8 = r[15:8]; a32 = r[63:32]; b32 = r[95:64];
      if (t % 50 == 0) begin b8 = 0; b32 = 0; end
      if (t % 50 == 1) begin a8 = 8'h80; b8 = 8'hff; end
      nm = rem ? (sgn ? "MOD_S" : "MOD_U") : (sgn ? "DIV_S" : "DIV_U");
      if (start) begin
        exp8.push_back(elem(nm, 0, 64'(a8), 64'(b8), 0));
        exp32.push_back(elem(nm, 2, 64'(a32), 64'(b32), 0));
        sent++;
      end
    end
    @(negedge clk) start = 0;
    repeat (8) @(posedge clk);
    `CHECK(got == sent, $sformatf("results %0d of %0d", got, sent))
    `TB_FINISH
  end
  // latency: done must rise exactly 4 cycles after start
  logic [3:0] start_hist;
  always_ff @(posedge clk) start_hist <= rst ? '0 : {start_hist[2:0], start};
  always @(negedge clk) if (!rst) begin
    `CHECK(done8 == start_hist[3] && done32 == start_hist[3], "latency of 4 cycles")
    if (done8) begin
      got++;
      `CHECK(64'(y8) == exp8.pop_front(), $sformatf("w8 result %h", y8))
      `CHECK(64'(y32) == exp32.pop_front(), $sformatf("w32 result %h", y32))
    end
  end
endmodule
