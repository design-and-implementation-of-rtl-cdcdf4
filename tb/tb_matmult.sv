// tb_matmult: runs a 20x20 matrix multiplication of 32-bit integers,
// C = A * B, on the whole system (msa_soc) at its default size.
//
// How: the program is generated here, fully unrolled, because the scalar
// core that would run the loops is not part of the design. A behavioural
// core fetches it (one instruction per cycle), holds the three base
// addresses in GPRs r1 (A), r2 (B), r3 (C) and computes each load/store
// address GPR[rs] + (s10 << 2), driving it when the access reaches MEM.
// A, B and C are stored row by row (80 bytes per row), so most vector
// accesses are unaligned. For every row i and every group of four columns
// j..j+3 the program does
//   LDI.W   w0, 0                       accumulator
//   for each k-block of four:  LD.W w1, A[i][k..k+3]
//     for each k in the block: LD.W w2, B[k][j..j+3]
//                              SPLATI.W w3, w1[k mod 4]
//                              MADDV.W w0, w3, w2
//   ST.W    w0, C[i][j..j+3]
// (67 instructions per group, 6700 in all). C is read back through the
// core's data port and compared with a product computed here in plain
// integer arithmetic.
//
// Timing: every SPLATI is followed directly by the MADDV that uses it (one
// EX-hazard stall), and the loads of A feed a SPLATI two instructions later
// while still in MEM (one load-use stall): 26 stall cycles per group. The
// test checks that the hardware stalls exactly 2600 cycles and retires all
// 6700 instructions.
`include "tb_common.svh"
module tb_matmult;
  import msa_pkg::*;
  import msa_ref_pkg::*;
  `TB_COUNTERS
  logic clk = 0;
  always #5 clk = ~clk;
  `TB_WATCHDOG(clk, 100000)

  localparam int N      = 20;
  localparam int ROWB   = N * 4;        // bytes per matrix row
  localparam int A_BASE = 0;
  localparam int B_BASE = N * ROWB;
  localparam int C_BASE = 2 * N * ROWB;
  localparam int NPROG  = N * (N / 4) * 67;

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
  logic [31:0] prog [NPROG];
  int          prs  [NPROG];   // GPR used for the address (0: not a memory access)
  int          poff [NPROG];   // s10 word offset

  task automatic emit(inout int n, input logic [31:0] w, input int rs, input int off);
    prog[n] = w; prs[n] = rs; poff[n] = off; n++;
  endtask

  task automatic build();
    int n; n = 0;
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j += 4) begin
        emit(n, eldi(2, 0, 0), 0, 0);
        for (int kb = 0; kb < N; kb += 4) begin
          emit(n, emi10(1, 2, (i * ROWB + kb * 4) / 4, 1, 1), 1, (i * ROWB + kb * 4) / 4);
          for (int t = 0; t < 4; t++) begin
            int k; k = kb + t;
            emit(n, emi10(1, 2, (k * ROWB + j * 4) / 4, 2, 2), 2, (k * ROWB + j * 4) / 4);
            emit(n, eelm(1, 2, t, 1, 3), 0, 0);                 // SPLATI.W w3, w1[t]
            emit(n, e3r(6'h12, 1, 2, 2, 3, 0), 0, 0);           // MADDV.W w0, w3, w2
          end
        end
        emit(n, emi10(0, 2, (i * ROWB + j * 4) / 4, 3, 0), 3, (i * ROWB + j * 4) / 4);
      end
    if (n != NPROG) $fatal(1, "program length %0d", n);
  endtask

  // ---------------- behavioural core ----------------
  logic [31:0] CG [32];
  logic id_present, run, halt, adv;
  int   id_idx, f_idx;
  logic [31:0] ex_addr, mem_addr;

  always_comb begin
    id_valid   = id_present;
    adv        = id_valid && !msa_stall_id && !msa_stall_ex && !core_stall;
    halt       = f_idx >= NPROG + 8;
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
      ex_addr  <= (adv && id_idx < NPROG && prs[id_idx] != 0) ? CG[prs[id_idx]] + 32'(poff[id_idx] << 2) : 32'd0;
      mem_addr <= ex_addr;
    end
  end

  // ---------------- counters ----------------
  int n_stall, n_retire, n_fwd, n_cycles;
  always @(posedge clk) if (run && !rst) begin
    n_cycles++;
    if (msa_stall_id || msa_stall_ex) n_stall++;
    if (ev_retire) n_retire++;
    if (ev_fwd_mem) n_fwd++;
  end

  // ---------------- stimulus and checks ----------------
  logic signed [31:0] A [N][N], Bm [N][N], C [N][N];

  initial begin
    rst = 1; run = 0; core_stall = 0; id_present = 0; id_idx = 0; f_idx = 0;
    ex_addr = 0; mem_addr = 0;
    imem_we = 0; imem_waddr = 0; imem_wdata = 0;
    core_drd = 0; core_dwr_bytes = 0; core_dwdata = 0; core_daddr = 0;
    for (int r = 0; r < 32; r++) CG[r] = 0;
    CG[1] = A_BASE; CG[2] = B_BASE; CG[3] = C_BASE;
    build();
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        A[i][j]  = 32'($signed($urandom_range(0, 65535)) - 32768);
        Bm[i][j] = 32'($signed($urandom_range(0, 65535)) - 32768);
      end
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        C[i][j] = 0;
        for (int k = 0; k < N; k++) C[i][j] += A[i][k] * Bm[k][j];
      end
    for (int i = 0; i < NPROG; i++) begin
      @(negedge clk); imem_we = 1; imem_waddr = 17'(i); imem_wdata = prog[i];
    end
    @(negedge clk); imem_we = 0;
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        @(negedge clk); core_daddr = 32'(A_BASE + i * ROWB + j * 4); core_dwr_bytes = 4; core_dwdata = A[i][j];
        @(negedge clk); core_daddr = 32'(B_BASE + i * ROWB + j * 4); core_dwr_bytes = 4; core_dwdata = Bm[i][j];
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
        @(negedge clk); core_drd = 1; core_daddr = 32'(C_BASE + i * ROWB + j * 4);
        @(negedge clk); core_drd = 0;
        for (int t = 0; t < 4; t++)
          `CHECK(dmem_rdata[t*32 +: 32] == C[i][j + t],
                 $sformatf("C[%0d][%0d] = %0d expected %0d", i, j + t, $signed(dmem_rdata[t*32 +: 32]), C[i][j + t]))
      end
    $display("matmult %0dx%0d: %0d instructions, %0d cycles, %0d stall cycles, %0d MEM forwards",
             N, N, n_retire, n_cycles, n_stall, n_fwd);
    `CHECK(n_retire == NPROG, $sformatf("retired %0d of %0d", n_retire, NPROG))
    `CHECK(n_stall == N * (N / 4) * 26, $sformatf("stall cycles %0d expected %0d", n_stall, N * (N / 4) * 26))
    `CHECK(n_fwd > 0, "MEM forwarding never happened")
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
