// tb_fdct: runs an integer forward DCT (the JPEG "islow" integer FDCT:
// 8-point butterflies, 13-bit fixed-point constants, 2 extra bits of
// precision between the passes, rounding shifts) on a 16x16 matrix of
// 32-bit values, as four 8x8 blocks, on the whole system (msa_soc) at its
// default size.
//
// How: the program is generated here, fully unrolled, because the scalar
// core that would run the loops is not part of the design. A behavioural
// core fetches it, holds base addresses (r1: input matrix, r2: scratch and
// output) and the twelve multiplication constants (r8..r19) in GPRs, and
// computes load/store addresses GPR[rs] + (s10 << 2). Each vector holds four
// 32-bit elements, so one pass of the 1-D transform works on a strip of four
// columns at once ("vertical" pass). Per 8x8 block:
//   1. transpose the block into scratch S1 (4x4 word transposes with
//      ILVR.W/ILVL.W/ILVR.D/ILVL.D),
//   2. vertical pass 1 on both 4-column strips of S1 (= the row pass),
//   3. transpose S1 into S2,
//   4. vertical pass 2 on S2 (= the column pass), written to the output.
// Constants are brought in with FILL.W from the GPRs (path B), products with
// MULV.W, the descaling with SRARI.W (a rounding arithmetic shift) and SLLI.W.
// The result is read back through the core's data port and compared with
// the same transform computed here in plain integer arithmetic. The input is
// random in -1024..1023 so no intermediate value overflows 32 bits.
//
// Timing: the test checks that every instruction retires and reports the
// cycle and stall counts.
`include "tb_common.svh"
module tb_fdct;
  import msa_pkg::*;
  import msa_ref_pkg::*;
  `TB_COUNTERS
  logic clk = 0;
  always #5 clk = ~clk;
  `TB_WATCHDOG(clk, 100000)

  localparam int N      = 16;
  localparam int MROW   = N * 4;    // bytes per row of the 16x16 matrices
  localparam int SROW   = 8 * 4;    // bytes per row of the 8x8 scratch blocks
  localparam int IN_B   = 0;        // input matrix, r1 = 0
  localparam int R2     = 1024;     // r2
  localparam int S1_O   = 0;        // offsets from r2
  localparam int S2_O   = 256;
  localparam int OUT_O  = 512;
  localparam int NPMAX  = 4000;
  localparam int CONST_BITS = 13, PASS1_BITS = 2;
  localparam int FIXC [12] = '{4433, 6270, -15137, 9633, 2446, 16819, 25172, 12299,
                               -7373, -20995, -16069, -3196};

  logic        rst;
  logic [31:0] core_pc;
  logic        core_fetch;
  logic [31:0] id_instr;
  logic        id_valid;
  logic        imem_we;
  logic [16:0] imem_waddr;
  logic [31:0] imem_wdata;
  logic        core_stall;
  logic        msa_stall_id, msa_stall_ex, msa_br_valid, msa_br_taken;
  logic [4:0]  gpr_raddr, gpr_waddr;
  logic        gpr_rd, gpr_we;
  logic [31:0] gpr_rdata, gpr_wdata;
  logic [31:0] core_daddr, core_dwdata;
  logic        core_drd;
  logic [4:0]  core_dwr_bytes;
  vec_t        dmem_rdata;
  logic        ev_fwd_mem, ev_retire;

  msa_soc dut (.*);

  // ---------------- program ----------------
  logic [31:0] prog [NPMAX];
  int          prs  [NPMAX];
  int          poff [NPMAX];
  int          nprog;

  function automatic void emit(logic [31:0] w, int rs = 0, int off = 0);
    prog[nprog] = w; prs[nprog] = rs; poff[nprog] = off; nprog++;
  endfunction
  function automatic void ld(int wd, int rs, int boff);  emit(emi10(1, 2, boff / 4, rs, wd), rs, boff / 4); endfunction
  function automatic void st(int wsrc, int rs, int boff); emit(emi10(0, 2, boff / 4, rs, wsrc), rs, boff / 4); endfunction
  function automatic void add(int d, int s, int t) ; emit(e3r(6'h0E, 0, 2, t, s, d)); endfunction
  function automatic void sub(int d, int s, int t) ; emit(e3r(6'h0E, 1, 2, t, s, d)); endfunction
  function automatic void mul(int d, int s, int t) ; emit(e3r(6'h12, 0, 2, t, s, d)); endfunction
  function automatic void ilvr(int d, int df, int s, int t); emit(e3r(6'h14, 5, df, t, s, d)); endfunction
  function automatic void ilvl(int d, int df, int s, int t); emit(e3r(6'h14, 4, df, t, s, d)); endfunction
  function automatic void srari(int d, int s, int m); emit(ebit(6'h0A, 2, 2, m, s, d)); endfunction
  function automatic void slli(int d, int s, int m) ; emit(ebit(6'h09, 0, 2, m, s, d)); endfunction
  function automatic void mulc(int d, int s, int c) ; emit(e2r(0, 2, 8 + c, 25)); mul(d, s, 25); endfunction

  // transpose the 8x8 block at (srs, sbase, sstride) into (drs, dbase, dstride)
  function automatic void transpose(int srs, int sbase, int sstride, int drs, int dbase, int dstride);
    for (int br = 0; br < 2; br++)
      for (int bc = 0; bc < 2; bc++) begin
        for (int i = 0; i < 4; i++) ld(26 + i, srs, sbase + (4 * br + i) * sstride + 16 * bc);
        ilvr(8, 2, 27, 26); ilvr(9, 2, 29, 28); ilvl(10, 2, 27, 26); ilvl(11, 2, 29, 28);
        ilvr(12, 3, 9, 8);  ilvl(13, 3, 9, 8);  ilvr(14, 3, 11, 10); ilvl(15, 3, 11, 10);
        for (int j = 0; j < 4; j++) st(12 + j, drs, dbase + (4 * bc + j) * dstride + 16 * br);
      end
  endfunction

  // one 1-D 8-point pass on w0..w7 (four columns at once), result in w0..w7
  function automatic void pass(bit second);
    int n; n = second ? CONST_BITS + PASS1_BITS : CONST_BITS - PASS1_BITS;
    add(8, 0, 7); sub(15, 0, 7); add(9, 1, 6); sub(14, 1, 6);
    add(10, 2, 5); sub(13, 2, 5); add(11, 3, 4); sub(12, 3, 4);
    add(16, 8, 11); sub(19, 8, 11); add(17, 9, 10); sub(18, 9, 10);
    add(0, 16, 17); sub(4, 16, 17);
    if (second) begin srari(0, 0, PASS1_BITS); srari(4, 4, PASS1_BITS); end
    else begin slli(0, 0, PASS1_BITS); slli(4, 4, PASS1_BITS); end
    add(20, 18, 19); mulc(20, 20, 0);
    mulc(2, 19, 1); add(2, 2, 20); srari(2, 2, n);
    mulc(6, 18, 2); add(6, 6, 20); srari(6, 6, n);
    add(20, 12, 15); add(21, 13, 14); add(22, 12, 14); add(23, 13, 15);
    add(24, 22, 23); mulc(24, 24, 3);
    mulc(12, 12, 4); mulc(13, 13, 5); mulc(14, 14, 6); mulc(15, 15, 7);
    mulc(20, 20, 8); mulc(21, 21, 9); mulc(22, 22, 10); mulc(23, 23, 11);
    add(22, 22, 24); add(23, 23, 24);
    add(7, 12, 20); add(7, 7, 22); srari(7, 7, n);
    add(5, 13, 21); add(5, 5, 23); srari(5, 5, n);
    add(3, 14, 21); add(3, 3, 22); srari(3, 3, n);
    add(1, 15, 20); add(1, 1, 23); srari(1, 1, n);
  endfunction

  function automatic void build();
    nprog = 0;
    for (int bi = 0; bi < 2; bi++)
      for (int bj = 0; bj < 2; bj++) begin
        transpose(1, IN_B + bi * 8 * MROW + bj * 32, MROW, 2, S1_O, SROW);
        for (int s = 0; s < 2; s++) begin
          for (int r = 0; r < 8; r++) ld(r, 2, S1_O + r * SROW + 16 * s);
          pass(0);
          for (int r = 0; r < 8; r++) st(r, 2, S1_O + r * SROW + 16 * s);
        end
        transpose(2, S1_O, SROW, 2, S2_O, SROW);
        for (int s = 0; s < 2; s++) begin
          for (int r = 0; r < 8; r++) ld(r, 2, S2_O + r * SROW + 16 * s);
          pass(1);
          for (int r = 0; r < 8; r++) st(r, 2, OUT_O + (bi * 8 + r) * MROW + bj * 32 + 16 * s);
        end
      end
  endfunction

  // ---------------- reference transform ----------------
  int X [N][N], Y [N][N];

  function automatic int descale(int x, int n); return (x + (1 << (n - 1))) >>> n; endfunction

  // 1-D pass on d[0..7]
  function automatic void fdct1(ref int d [8], input bit second);
    int t0, t1, t2, t3, t4, t5, t6, t7, t10, t11, t12, t13, z1, z2, z3, z4, z5, n;
    n = second ? CONST_BITS + PASS1_BITS : CONST_BITS - PASS1_BITS;
    t0 = d[0] + d[7]; t7 = d[0] - d[7]; t1 = d[1] + d[6]; t6 = d[1] - d[6];
    t2 = d[2] + d[5]; t5 = d[2] - d[5]; t3 = d[3] + d[4]; t4 = d[3] - d[4];
    t10 = t0 + t3; t13 = t0 - t3; t11 = t1 + t2; t12 = t1 - t2;
    d[0] = second ? descale(t10 + t11, PASS1_BITS) : (t10 + t11) << PASS1_BITS;
    d[4] = second ? descale(t10 - t11, PASS1_BITS) : (t10 - t11) << PASS1_BITS;
    z1 = (t12 + t13) * FIXC[0];
    d[2] = descale(z1 + t13 * FIXC[1], n);
    d[6] = descale(z1 + t12 * FIXC[2], n);
    z1 = t4 + t7; z2 = t5 + t6; z3 = t4 + t6; z4 = t5 + t7;
    z5 = (z3 + z4) * FIXC[3];
    t4 = t4 * FIXC[4]; t5 = t5 * FIXC[5]; t6 = t6 * FIXC[6]; t7 = t7 * FIXC[7];
    z1 = z1 * FIXC[8]; z2 = z2 * FIXC[9]; z3 = z3 * FIXC[10]; z4 = z4 * FIXC[11];
    z3 += z5; z4 += z5;
    d[7] = descale(t4 + z1 + z3, n); d[5] = descale(t5 + z2 + z4, n);
    d[3] = descale(t6 + z2 + z3, n); d[1] = descale(t7 + z1 + z4, n);
  endfunction

  function automatic void reference();
    int d [8];
    for (int bi = 0; bi < N; bi += 8)
      for (int bj = 0; bj < N; bj += 8) begin
        for (int r = 0; r < 8; r++) begin
          for (int c = 0; c < 8; c++) d[c] = X[bi + r][bj + c];
          fdct1(d, 0);
          for (int c = 0; c < 8; c++) Y[bi + r][bj + c] = d[c];
        end
        for (int c = 0; c < 8; c++) begin
          for (int r = 0; r < 8; r++) d[r] = Y[bi + r][bj + c];
          fdct1(d, 1);
          for (int r = 0; r < 8; r++) Y[bi + r][bj + c] = d[r];
        end
      end
  endfunction

  // ---------------- behavioural core ----------------
  logic [31:0] CG [32];
  logic id_present, run, halt, adv;
  int   id_idx, f_idx;
  logic [31:0] ex_addr, mem_addr;

  always_comb begin
    id_valid   = id_present;
    adv        = id_valid && !msa_stall_id && !msa_stall_ex && !core_stall;
    halt       = f_idx >= nprog + 8;
    core_fetch = run && !halt && (!id_present || adv);
    core_pc    = 32'(f_idx) << 2;
    gpr_rdata  = CG[gpr_raddr];
  end

  always @(posedge clk) if (run) begin
    if (core_fetch) begin
      id_present <= 1'b1;
      id_idx     <= f_idx;
      f_idx      <= f_idx + 1;
    end else if (adv) id_present <= 1'b0;
    if (!msa_stall_ex) begin
      ex_addr  <= (adv && id_idx < nprog && prs[id_idx] != 0) ? CG[prs[id_idx]] + 32'(poff[id_idx] << 2) : 32'd0;
      mem_addr <= ex_addr;
    end
  end

  int n_stall, n_retire, n_fwd, n_cycles, n_gpr_rd;
  always @(posedge clk) if (run && !rst) begin
    n_cycles++;
    if (msa_stall_id || msa_stall_ex) n_stall++;
    if (ev_retire) n_retire++;
    if (ev_fwd_mem) n_fwd++;
    if (adv && gpr_rd) n_gpr_rd++;
  end

  // ---------------- stimulus and checks ----------------
  initial begin
    rst = 1; run = 0; core_stall = 0; id_present = 0; id_idx = 0; f_idx = 0;
    ex_addr = 0; mem_addr = 0;
    imem_we = 0; imem_waddr = 0; imem_wdata = 0;
    core_drd = 0; core_dwr_bytes = 0; core_dwdata = 0; core_daddr = 0;
    for (int r = 0; r < 32; r++) CG[r] = 0;
    CG[1] = IN_B; CG[2] = R2;
    for (int c = 0; c < 12; c++) CG[8 + c] = FIXC[c];
    build();
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) X[i][j] = int'($urandom_range(0, 2047)) - 1024;
    reference();
    for (int i = 0; i < nprog; i++) begin
      @(negedge clk); imem_we = 1; imem_waddr = 17'(i); imem_wdata = prog[i];
    end
    @(negedge clk); imem_we = 0;
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        @(negedge clk); core_daddr = 32'(IN_B + i * MROW + j * 4); core_dwr_bytes = 4; core_dwdata = X[i][j];
      end
    @(negedge clk); core_dwr_bytes = 0;
    repeat (40) @(negedge clk);
    rst = 0; run = 1;
    while (!(halt && !id_present)) begin
      @(negedge clk);
      core_daddr = mem_addr;
    end
    repeat (8) @(negedge clk);
    run = 0;
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j += 4) begin
        @(negedge clk); core_drd = 1; core_daddr = 32'(R2 + OUT_O + i * MROW + j * 4);
        @(negedge clk); core_drd = 0;
        for (int t = 0; t < 4; t++)
          `CHECK($signed(dmem_rdata[t*32 +: 32]) == Y[i][j + t],
                 $sformatf("Y[%0d][%0d] = %0d expected %0d", i, j + t, $signed(dmem_rdata[t*32 +: 32]), Y[i][j + t]))
      end
    $display("fdct 16x16: %0d instructions, %0d cycles, %0d stall cycles, %0d MEM forwards, %0d GPR reads",
             n_retire, n_cycles, n_stall, n_fwd, n_gpr_rd);
    `CHECK(n_retire == nprog, $sformatf("retired %0d of %0d", n_retire, nprog))
    `CHECK(n_gpr_rd == 4 * 4 * 12, $sformatf("GPR reads %0d expected %0d", n_gpr_rd, 4 * 4 * 12))
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
