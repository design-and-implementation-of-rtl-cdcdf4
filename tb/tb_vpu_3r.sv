// tb_vpu_3r: self-checking testbench for vpu_3r. All 3R operations on full 128-bit vectors in every format through the 30 lanes; divides must complete in 4 cycles.
`include "tb_common.svh"
module tb_vpu_3r;
  import msa_pkg::*;
  import msa_ref_pkg::*;
  `TB_COUNTERS
  logic clk = 0;
  always #5 clk = ~clk;
  `TB_WATCHDOG(clk, 200000)
  logic rst, start, sgn, sat, done;
  lop_e op; df_e df;
  vec_t a, b, c, y;
  vpu_3r #(.DIV_LAT(4)) dut (.clk(clk), .rst(rst), .a(a), .b(b), .c(c), .df(df), .op(op),
                             .sgn(sgn), .sat(sat), .start(start), .y(y), .done(done));
  typedef struct { string name; lop_e op; logic sgn; logic sat; } tc_t;
  tc_t tcs [23] = '{
    '{"ADDV", LOP_ADD, 0, 0}, '{"SUBV", LOP_SUB, 0, 0}, '{"ADD_A", LOP_ADDA, 0, 0},
    '{"ADDS_A", LOP_ADDA, 0, 1}, '{"ADDS_S", LOP_ADD, 1, 1}, '{"ADDS_U", LOP_ADD, 0, 1},
    '{"AVE_S", LOP_AVE, 1, 0}, '{"AVE_U", LOP_AVE, 0, 0}, '{"AVER_S", LOP_AVER, 1, 0},
    '{"AVER_U", LOP_AVER, 0, 0}, '{"SUBS_S", LOP_SUB, 1, 1}, '{"SUBS_U", LOP_SUB, 0, 1},
    '{"SUBSUS_U", LOP_SUBSUS, 0, 0}, '{"SUBSUU_S", LOP_SUBSUU, 0, 0},
    '{"ASUB_S", LOP_ASUB, 1, 0}, '{"ASUB_U", LOP_ASUB, 0, 0},
    '{"MULV", LOP_MUL, 0, 0}, '{"MADDV", LOP_MADD, 0, 0}, '{"MSUBV", LOP_MSUB, 0, 0},
    '{"DIV_S", LOP_DIV, 1, 0}, '{"DIV_U", LOP_DIV, 0, 0}, '{"MOD_S", LOP_MOD, 1, 0}, '{"MOD_U", LOP_MOD, 0, 0}};
  initial begin
    rst = 1; start = 0; {a, b, c} = '0; op = LOP_ADD; sgn = 0; sat = 0; df = DF_B;
    repeat (2) @(posedge clk);
    rst = 0;
    for (int f = 0; f < 4; f++) for (int k = 0; k < 23; k++) for (int t = 0; t < 12; t++) begin
      int n; vec_t e;
      @(negedge clk);
      df = df_e'(f); op = tcs[k].op; sgn = tcs[k].sgn; sat = tcs[k].sat;
      a = rand_elem(f); b = rand_elem(f); c = rand128();
      if (op == LOP_DIV || op == LOP_MOD) begin
        start = 1; @(negedge clk); start = 0; n = 1;
        while (!done && n < 20) begin @(negedge clk); n++; end
        `CHECK(n == 4, $sformatf("divide took %0d cycles", n))
      end else #1;
      e = vec(tcs[k].name, f, a, b, c);
      `CHECK(y === e, $sformatf("%s df=%0d a=%h b=%h y=%h exp=%h", tcs[k].name, f, a, b, y, e))
    end
    `TB_FINISH
  end
endmodule
