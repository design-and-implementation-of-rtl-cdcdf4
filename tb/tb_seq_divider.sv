// tb_seq_divider: self-checking testbench of the sequential (restoring)
// divider, at the four element widths 8, 16, 32 and 64, plus a 32-bit
// div_lane built with SEQ = 1 to cover the lane's selection of it.
//
// How: random dividends and divisors (with extra weight on zero divisors,
// -1, the most negative value and small numbers), signed and unsigned,
// quotient and remainder. The expected value is computed with 128-bit
// signed or unsigned arithmetic, so it cannot overflow, and truncated to
// the element width; division by zero expects a quotient of all ones and a
// remainder equal to the dividend. Timing: after each start the testbench
// counts cycles until done and checks it is exactly W (one quotient bit per
// clock), that done is a single-cycle pulse, and that y holds afterwards.
`include "tb_common.svh"
module tb_seq_divider;
  `TB_COUNTERS
  logic clk = 0;
  always #5 clk = ~clk;
  `TB_WATCHDOG(clk, 2000000)
  logic rst;

  function automatic logic [63:0] pick(int w);
    logic [63:0] v, m;
    m = (w == 64) ? '1 : ((64'd1 << w) - 1);
    case ($urandom_range(0, 9))
      0: v = 0;
      1: v = m;                          // -1
      2: v = 64'd1 << (w - 1);           // most negative
      3: v = 64'($urandom_range(1, 9));
      default: v = {$urandom, $urandom};
    endcase
    return v & m;
  endfunction

  function automatic logic [63:0] ref_div(int w, logic [63:0] a, logic [63:0] b, bit sgn, bit rem);
    logic [63:0] m;
    logic signed [127:0] sa, sb, q, r;
    m = (w == 64) ? '1 : ((64'd1 << w) - 1);
    if (b == 0) return rem ? a : m;
    if (sgn) begin
      sa = a[w-1] ? -128'(((~a) & m) + 1) : 128'(a);
      sb = b[w-1] ? -128'(((~b) & m) + 1) : 128'(b);
    end else begin
      sa = 128'(a); sb = 128'(b);
    end
    q = sa / sb; r = sa % sb;
    return (rem ? r[63:0] : q[63:0]) & m;
  endfunction

  // one instance per width, driven and checked by the same task
  logic        st8, st16, st32, st64, stl;
  logic [7:0]  a8, b8, y8;    logic [15:0] a16, b16, y16;
  logic [31:0] a32, b32, y32, al, bl, yl;  logic [63:0] a64, b64, y64;
  logic        sg, rm, d8, d16, d32, d64, dl;

  seq_divider #(.W(8))  u8  (.clk, .rst, .start(st8),  .a(a8),  .b(b8),  .sgn(sg), .rem(rm), .y(y8),  .done(d8));
  seq_divider #(.W(16)) u16 (.clk, .rst, .start(st16), .a(a16), .b(b16), .sgn(sg), .rem(rm), .y(y16), .done(d16));
  seq_divider #(.W(32)) u32 (.clk, .rst, .start(st32), .a(a32), .b(b32), .sgn(sg), .rem(rm), .y(y32), .done(d32));
  seq_divider #(.W(64)) u64 (.clk, .rst, .start(st64), .a(a64), .b(b64), .sgn(sg), .rem(rm), .y(y64), .done(d64));
  div_lane #(.W(32), .SEQ(1'b1)) ul (.clk, .rst, .start(stl), .a(al), .b(bl), .sgn(sg), .rem(rm), .y(yl), .done(dl));

  function automatic logic [63:0] yof(int w, bit lane);
    if (lane) return 64'(yl);
    case (w) 8: return 64'(y8); 16: return 64'(y16); 32: return 64'(y32); default: return y64; endcase
  endfunction
  function automatic logic dof(int w, bit lane);
    if (lane) return dl;
    case (w) 8: return d8; 16: return d16; 32: return d32; default: return d64; endcase
  endfunction

  task automatic one(int w, bit lane);
    logic [63:0] a, b, e; int n; bit s, r;
    a = pick(w); b = pick(w); s = $urandom_range(0, 1); r = $urandom_range(0, 1);
    e = ref_div(w, a, b, s, r);
    @(negedge clk);
    sg = s; rm = r;
    a8 = 8'(a); b8 = 8'(b); a16 = 16'(a); b16 = 16'(b); a32 = 32'(a); b32 = 32'(b); a64 = a; b64 = b;
    al = 32'(a); bl = 32'(b);
    st8 = (w == 8) && !lane; st16 = (w == 16) && !lane; st32 = (w == 32) && !lane;
    st64 = (w == 64) && !lane; stl = lane;
    @(negedge clk);
    st8 = 0; st16 = 0; st32 = 0; st64 = 0; stl = 0;
    // scramble the inputs: the divider must have latched them
    a8 = $urandom; b8 = $urandom; a16 = $urandom; b16 = $urandom; a32 = $urandom; b32 = $urandom;
    a64 = {$urandom, $urandom}; b64 = {$urandom, $urandom}; al = $urandom; bl = $urandom;
    sg = $urandom; rm = $urandom;
    n = 0;   // cycles after the edge that sampled start
    while (!dof(w, lane) && n < 200) begin @(negedge clk); n++; end
    `CHECK(n == w, $sformatf("W=%0d latency %0d", w, n))
    `CHECK(yof(w, lane) == e, $sformatf("W=%0d %s%s %h / %h = %h expected %h", w, s ? "S" : "U",
                                       r ? " MOD" : " DIV", a, b, yof(w, lane), e))
    @(negedge clk);
    `CHECK(!dof(w, lane) && yof(w, lane) == e, $sformatf("W=%0d done pulse / y hold", w))
  endtask

  initial begin
    rst = 1; st8 = 0; st16 = 0; st32 = 0; st64 = 0; stl = 0; sg = 0; rm = 0;
    a8 = 0; b8 = 0; a16 = 0; b16 = 0; a32 = 0; b32 = 0; a64 = 0; b64 = 0; al = 0; bl = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 600; i++) begin
      one(8, 0); one(16, 0); one(32, 0); one(64, 0);
      if (i % 4 == 0) one(32, 1);
    end
    `TB_FINISH
  end
endmodule
