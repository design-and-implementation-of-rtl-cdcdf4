// tb_msa_soc: end-to-end testbench of the whole SIMD system (instruction
// memory, SIMD unit, data memory) at its default (full) size.
//
// How: a random program of a few thousand MSA instructions is generated and
// written into the instruction memory through its load port; the data memory
// is filled with random bytes through the core's 32-bit store port. A
// behavioural model of the scalar core then runs the program: it fetches
// (one instruction per cycle, MIPS branch delay slot), holds the GPRs,
// supplies GPR values to the SIMD unit, computes load/store addresses
// GPR[rs] + (s10 << df) and drives them when the access reaches MEM, takes
// branch decisions from the SIMD unit, writes COPY/CFCMSA results into its
// GPRs, inserts bubbles while a GPR it needs is still being produced, and
// raises core_stall at random. The same program is executed sequentially by
// an instruction-level model built on msa_ref_pkg. At the end the vector
// registers, GPRs, MSACSR and data memory (read back through the core's read
// port) must match.
//
// Every pipeline mechanism is counted: EX-hazard stall, load-use stall,
// divider stall, MEM->ID forwarding, WB write-through, taken and not-taken
// branches, aligned and unaligned loads and stores, GPR reads and writes,
// GPR-hazard bubbles, core stalls, control register moves. The test fails
// if any of them never happens.
`include "tb_common.svh"
module tb_msa_soc;
  import msa_pkg::*;
  import msa_ref_pkg::*;
  `TB_COUNTERS
  logic clk = 0;
  always #5 clk = ~clk;
  `TB_WATCHDOG(clk, 400000)

  localparam int NPROG = 4000;
  localparam int MEMB  = 2048;     // bytes of data memory used by the program

  // ---------------- DUT ----------------
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
  typedef enum {K_E3R, K_EI5, K_BIT, K_LDI, K_I8V, K_SHF, K_VEC, K_2R, K_FILL, K_DOTP, K_HOP,
                K_SHUF, K_SLDG, K_SPLATG, K_SLDI, K_SPLATI, K_COPY, K_INSERT, K_INSVE, K_MOVE,
                K_CTC, K_CFC, K_LD, K_ST, K_BR} kind_e;
  typedef struct {
    kind_e kind; string nm; int df, ws, wt, wd, imm, g, sgn, op; logic [31:0] word;
  } ins_t;
  ins_t prog [NPROG];

  typedef struct { string nm; logic [5:0] mi; int op3; int s5; } e_t;
  e_t e3r_t [45] = '{
    '{"ADDV",6'h0E,0,0}, '{"SUBV",6'h0E,1,0}, '{"MAX_S",6'h0E,2,0}, '{"MAX_U",6'h0E,3,0},
    '{"MIN_S",6'h0E,4,0}, '{"MIN_U",6'h0E,5,0}, '{"MAX_A",6'h0E,6,0}, '{"MIN_A",6'h0E,7,0},
    '{"CEQ",6'h0F,0,0}, '{"CLT_S",6'h0F,2,0}, '{"CLT_U",6'h0F,3,0}, '{"CLE_S",6'h0F,4,0},
    '{"CLE_U",6'h0F,5,0}, '{"ADD_A",6'h10,0,0}, '{"ADDS_A",6'h10,1,0}, '{"ADDS_S",6'h10,2,0},
    '{"ADDS_U",6'h10,3,0}, '{"AVE_S",6'h10,4,0}, '{"AVE_U",6'h10,5,0}, '{"AVER_S",6'h10,6,0},
    '{"AVER_U",6'h10,7,0}, '{"SUBS_S",6'h11,0,0}, '{"SUBS_U",6'h11,1,0}, '{"SUBSUS_U",6'h11,2,0},
    '{"SUBSUU_S",6'h11,3,0}, '{"ASUB_S",6'h11,4,0}, '{"ASUB_U",6'h11,5,0}, '{"MULV",6'h12,0,0},
    '{"MADDV",6'h12,1,0}, '{"MSUBV",6'h12,2,0}, '{"DIV_S",6'h12,4,0}, '{"DIV_U",6'h12,5,0},
    '{"MOD_S",6'h12,6,0}, '{"MOD_U",6'h12,7,0}, '{"SLL",6'h0D,0,0}, '{"SRA",6'h0D,1,0},
    '{"SRL",6'h0D,2,0}, '{"BCLR",6'h0D,3,0}, '{"BSET",6'h0D,4,0}, '{"BNEG",6'h0D,5,0},
    '{"BINSL",6'h0D,6,0}, '{"BINSR",6'h0D,7,0}, '{"SRAR",6'h15,1,0}, '{"SRLR",6'h15,2,0},
    '{"DIV_U",6'h12,5,0}};
  e_t ei5_t [11] = '{
    '{"ADDV",6'h06,0,0}, '{"SUBV",6'h06,1,0}, '{"MAX_S",6'h06,2,1}, '{"MAX_U",6'h06,3,0},
    '{"MIN_S",6'h06,4,1}, '{"MIN_U",6'h06,5,0}, '{"CEQ",6'h07,0,1}, '{"CLT_S",6'h07,2,1},
    '{"CLT_U",6'h07,3,0}, '{"CLE_S",6'h07,4,1}, '{"CLE_U",6'h07,5,0}};
  e_t bit_t [12] = '{
    '{"SLL",6'h09,0,0}, '{"SRA",6'h09,1,0}, '{"SRL",6'h09,2,0}, '{"BCLR",6'h09,3,0},
    '{"BSET",6'h09,4,0}, '{"BNEG",6'h09,5,0}, '{"BINSL",6'h09,6,0}, '{"BINSR",6'h09,7,0},
    '{"SAT_S",6'h0A,0,0}, '{"SAT_U",6'h0A,1,0}, '{"SRAR",6'h0A,2,0}, '{"SRLR",6'h0A,3,0}};
  string shuf_t [7] = '{"VSHF", "PCKEV", "PCKOD", "ILVL", "ILVR", "ILVEV", "ILVOD"};
  string vec_names [7] = '{"AND", "OR", "NOR", "XOR", "BMNZ", "BMZ", "BSEL"};
  string cnt_names [4] = '{"FILL", "PCNT", "NLOC", "NLZC"};

  function automatic int vr();   // mostly a few registers, so hazards are frequent
    return ($urandom_range(0, 9) < 8) ? $urandom_range(0, 5) : $urandom_range(0, 31);
  endfunction
  function automatic int gsrc(); return $urandom_range(0, 1) ? $urandom_range(16, 18) : $urandom_range(8, 23); endfunction
  function automatic int gdst(); return $urandom_range(16, 19); endfunction

  function automatic ins_t gen(int idx, bit allow_br);
    ins_t x; int r;
    x.df = $urandom_range(0, 3); x.ws = vr(); x.wt = vr(); x.wd = vr();
    x.imm = 0; x.g = 0; x.sgn = 0; x.op = 0; x.nm = "";
    r = $urandom_range(0, 99);
    if (idx < 32) begin  // fill every register from memory first
      x.kind = K_LD; x.wd = idx; x.g = $urandom_range(1, 7); x.imm = $urandom_range(0, 127) - 64;
    end else if (r < 24) begin
      int k; k = $urandom_range(0, 44);
      if (e3r_t[k].mi == 6'h12 && e3r_t[k].op3 >= 4 && $urandom_range(0, 2) != 0) k = 0;  // fewer divides
      x.kind = K_E3R; x.nm = e3r_t[k].nm;
      x.word = e3r(e3r_t[k].mi, e3r_t[k].op3, x.df, x.wt, x.ws, x.wd);
    end else if (r < 30) begin
      int k; k = $urandom_range(0, 10);
      x.kind = K_EI5; x.nm = ei5_t[k].nm; x.imm = $urandom_range(0, 31); x.sgn = ei5_t[k].s5;
      x.word = e3r(ei5_t[k].mi, ei5_t[k].op3, x.df, x.imm, x.ws, x.wd);
    end else if (r < 36) begin
      int k; k = $urandom_range(0, 11);
      x.kind = K_BIT; x.nm = bit_t[k].nm; x.imm = $urandom_range(0, ew(x.df) - 1);
      x.word = ebit(bit_t[k].mi, bit_t[k].op3, x.df, x.imm, x.ws, x.wd);
    end else if (r < 38) begin
      x.kind = K_LDI; x.imm = $urandom_range(0, 1023); x.word = eldi(x.df, x.imm, x.wd);
    end else if (r < 40) begin
      x.kind = K_I8V; x.op = $urandom_range(0, 6); x.imm = $urandom_range(0, 255);
      x.word = ei8(x.op < 4 ? 6'h00 : 6'h01, x.op % 4, x.imm, x.ws, x.wd);
    end else if (r < 41) begin
      x.kind = K_SHF; x.df = $urandom_range(0, 2); x.imm = $urandom_range(0, 255);
      x.word = ei8(6'h02, x.df, x.imm, x.ws, x.wd);
    end else if (r < 44) begin
      x.kind = K_VEC; x.op = $urandom_range(0, 6); x.word = evec(x.op, x.wt, x.ws, x.wd);
    end else if (r < 46) begin
      x.kind = K_2R; x.op = $urandom_range(1, 3); x.word = e2r(x.op, x.df, x.ws, x.wd);
    end else if (r < 48) begin
      x.kind = K_FILL; x.g = gsrc(); x.word = e2r(0, x.df, x.g, x.wd);
    end else if (r < 50) begin
      x.kind = K_DOTP; x.df = $urandom_range(1, 3); x.op = $urandom_range(0, 5);
      x.word = e3r(6'h13, x.op, x.df, x.wt, x.ws, x.wd);
    end else if (r < 51) begin
      x.kind = K_HOP; x.df = $urandom_range(1, 3); x.op = $urandom_range(4, 7);
      x.word = e3r(6'h15, x.op, x.df, x.wt, x.ws, x.wd);
    end else if (r < 54) begin
      x.kind = K_SHUF; x.op = $urandom_range(0, 6); x.nm = shuf_t[x.op];
      x.word = (x.op == 0) ? e3r(6'h15, 0, x.df, x.wt, x.ws, x.wd) : e3r(6'h14, x.op + 1, x.df, x.wt, x.ws, x.wd);
    end else if (r < 55) begin
      x.kind = K_SLDG; x.g = gsrc(); x.word = e3r(6'h14, 0, x.df, x.g, x.ws, x.wd);
    end else if (r < 56) begin
      x.kind = K_SPLATG; x.g = gsrc(); x.word = e3r(6'h14, 1, x.df, x.g, x.ws, x.wd);
    end else if (r < 57) begin
      x.kind = K_SLDI; x.imm = $urandom_range(0, ne(x.df) - 1); x.word = eelm(0, x.df, x.imm, x.ws, x.wd);
    end else if (r < 58) begin
      x.kind = K_SPLATI; x.imm = $urandom_range(0, ne(x.df) - 1); x.word = eelm(1, x.df, x.imm, x.ws, x.wd);
    end else if (r < 62) begin
      x.kind = K_COPY; x.df = $urandom_range(0, 2); x.sgn = $urandom_range(0, 1);
      x.imm = $urandom_range(0, ne(x.df) - 1); x.g = gdst();
      x.word = eelm(x.sgn ? 2 : 3, x.df, x.imm, x.ws, x.g);
    end else if (r < 65) begin
      x.kind = K_INSERT; x.df = $urandom_range(0, 2); x.imm = $urandom_range(0, ne(x.df) - 1);
      x.g = gsrc(); x.word = eelm(4, x.df, x.imm, x.g, x.wd);
    end else if (r < 66) begin
      x.kind = K_INSVE; x.imm = $urandom_range(0, ne(x.df) - 1); x.word = eelm(5, x.df, x.imm, x.ws, x.wd);
    end else if (r < 67) begin
      x.kind = K_MOVE; x.word = ectl(2, x.ws, x.wd);
    end else if (r < 68) begin
      x.kind = K_CTC; x.g = gsrc(); x.word = ectl(0, x.g, 1);
    end else if (r < 69) begin
      x.kind = K_CFC; x.g = gdst(); x.imm = $urandom_range(0, 1); x.word = ectl(1, x.imm, x.g);
    end else if (r < 79) begin
      x.kind = K_LD; x.g = $urandom_range(1, 7); x.imm = $urandom_range(0, 127) - 64;
    end else if (r < 88 || !allow_br) begin
      x.kind = K_ST; x.g = $urandom_range(1, 7); x.imm = $urandom_range(0, 127) - 64;
    end else begin
      x.kind = K_BR; x.op = $urandom_range(0, 3);
      x.imm = $urandom_range(1, 3);     // offset in words from the delay slot
      x.word = ebr(x.op == 0 ? 8'h0B : x.op == 1 ? 8'h0F : x.op == 2 ? 8'h18 + x.df : 8'h1C + x.df,
                   x.wt, x.imm);
    end
    if (x.kind == K_LD || x.kind == K_ST) x.word = emi10(x.kind == K_LD, x.df, x.imm, x.g, x.wd);
    return x;
  endfunction

  // ---------------- instruction-level model ----------------
  v128         V [32];
  logic [31:0] G [32];
  logic [7:0]  M [MEMB];
  logic [31:0] csr;
  int          ref_taken, ref_branches;
  // expected register writes in program order, checked as the hardware
  // writes back
  typedef struct { int idx; int r; v128 v; } wr_t;
  wr_t vq [$], gq [$];
  int  cur;

  function automatic v128 vecop(int op, v128 a, v128 b, v128 c);
    case (op)
      0: return a & b;
      1: return a | b;
      2: return ~(a | b);
      3: return a ^ b;
      4: return (a & b) | (c & ~b);
      5: return (a & ~b) | (c & b);
      default: return (a & ~c) | (b & c);
    endcase
  endfunction

  function automatic logic [31:0] addr_of(ins_t x);
    return G[x.g] + 32'(x.imm <<< x.df);
  endfunction

  function automatic bit br_cond(ins_t x);
    v128 v; bit anyz;
    v = V[x.wt]; anyz = 0;
    for (int i = 0; i < ne(x.df); i++) if (get(v, x.df, i) == 0) anyz = 1;
    case (x.op)
      0: return v == '0;
      1: return v != '0;
      2: return anyz;
      default: return !anyz;
    endcase
  endfunction

  task automatic execute(ins_t x);
    v128 a, b, c; a = V[x.ws]; b = V[x.wt]; c = V[x.wd];
    exec1(x, a, b, c);
    if (x.kind inside {K_COPY, K_CFC}) gq.push_back('{cur, x.g, v128'(G[x.g])});
    else if (!(x.kind inside {K_CTC, K_ST, K_BR})) vq.push_back('{cur, x.wd, V[x.wd]});
  endtask

  task automatic exec1(ins_t x, v128 a, v128 b, v128 c);
    case (x.kind)
      K_E3R:  V[x.wd] = vec(x.nm, x.df, a, b, c);
      K_EI5:  V[x.wd] = vec(x.nm, x.df, a, splat(x.df, x.sgn ? 64'(signed'(5'(x.imm))) : 64'(x.imm)), c);
      K_BIT:  V[x.wd] = vec(x.nm, x.df, a, splat(x.df, 64'(x.imm)), c);
      K_LDI:  V[x.wd] = splat(x.df, 64'(signed'(10'(x.imm))));
      K_I8V:  V[x.wd] = vecop(x.op, a, splat(0, 64'(x.imm)), c);
      K_SHF:  V[x.wd] = shuf("SHF", x.df, a, 0, 0, 0, 8'(x.imm));
      K_VEC:  V[x.wd] = vecop(x.op, a, b, c);
      K_2R:   V[x.wd] = vec(cnt_names[x.op], x.df, a, 0, 0);
      K_FILL: V[x.wd] = splat(x.df, 64'(signed'(G[x.g])));
      K_DOTP: V[x.wd] = dotp(x.op / 2, !x.op[0], x.df, a, b, c);
      K_HOP:  V[x.wd] = hop(x.op[1], !x.op[0], x.df, a, b);
      K_SHUF: V[x.wd] = shuf(x.nm, x.df, a, b, c, 0, 0);
      K_SLDG: V[x.wd] = shuf("SLD", x.df, a, 0, c, G[x.g], 0);
      K_SPLATG: V[x.wd] = shuf("SPLAT", x.df, a, 0, 0, G[x.g], 0);
      K_SLDI: V[x.wd] = shuf("SLD", x.df, a, 0, c, x.imm, 0);
      K_SPLATI: V[x.wd] = shuf("SPLAT", x.df, a, 0, 0, x.imm, 0);
      K_COPY: begin
        logic [63:0] e; e = get(a, x.df, x.imm);
        G[x.g] = x.sgn ? 32'(val(e, ew(x.df), 1)) : 32'(e);
      end
      K_INSERT: V[x.wd] = put(c, x.df, x.imm, 64'(G[x.g]));
      K_INSVE:  V[x.wd] = put(c, x.df, x.imm, get(a, x.df, 0));
      K_MOVE:   V[x.wd] = a;
      K_CTC:    csr = G[x.g];
      K_CFC:    G[x.g] = x.imm ? csr : 32'h100;
      K_LD: begin
        logic [31:0] ad; ad = addr_of(x);
        for (int k = 0; k < 16; k++) V[x.wd][k*8 +: 8] = M[ad + k];
      end
      K_ST: begin
        logic [31:0] ad; ad = addr_of(x);
        for (int k = 0; k < 16; k++) M[ad + k] = c[k*8 +: 8];
      end
      default: ;
    endcase
  endtask

  // ---------------- core model ----------------
  logic [31:0] CG [32];            // the core's GPR file
  int  pend [32];                  // outstanding SIMD writes per GPR
  logic id_present, run, halt;
  int  id_idx, f_idx;
  logic [31:0] ex_addr, mem_addr;
  logic gpr_haz, adv;
  ins_t idx_ins;

  function automatic int reads_gpr(ins_t x);
    return (x.kind inside {K_FILL, K_SLDG, K_SPLATG, K_INSERT, K_CTC}) ? x.g : 0;
  endfunction

  always_comb begin
    idx_ins = prog[(id_idx >= 0 && id_idx < NPROG) ? id_idx : 0];
    gpr_haz = id_present && id_idx < NPROG && reads_gpr(idx_ins) != 0 && pend[reads_gpr(idx_ins)] != 0;
    id_valid = id_present && !gpr_haz;
    adv = id_valid && !msa_stall_id && !msa_stall_ex && !core_stall;
    halt = f_idx >= NPROG + 8;
    core_fetch = run && !core_stall && !halt && (!id_present || adv);
    core_pc = 32'(f_idx) << 2;
    gpr_rdata = CG[gpr_raddr];
  end

  always @(posedge clk) begin
    if (run) begin
      if (core_fetch) begin
        id_present <= 1'b1;
        id_idx     <= f_idx;
        f_idx      <= (adv && msa_br_taken) ? id_idx + 1 + idx_ins.imm : f_idx + 1;
      end else if (adv) id_present <= 1'b0;
      if (!core_stall && !msa_stall_ex) begin
        ex_addr  <= (adv && id_idx < NPROG) ? G_core_addr(idx_ins) : 32'd0;
        mem_addr <= ex_addr;
      end
      for (int r = 0; r < 32; r++)
        pend[r] <= pend[r]
                 + ((adv && id_idx < NPROG && idx_ins.kind inside {K_COPY, K_CFC} && idx_ins.g == r) ? 1 : 0)
                 - ((gpr_we && int'(gpr_waddr) == r) ? 1 : 0);
      if (gpr_we) CG[gpr_waddr] <= gpr_wdata;
    end
  end

  function automatic logic [31:0] G_core_addr(ins_t x);
    return CG[x.g] + 32'(x.imm <<< x.df);
  endfunction

  // in-order write-back check
  always @(posedge clk) if (run && !rst) begin
    if (dut.u_msa.wb_we) begin
      wr_t w; w = vq.pop_front();
      `CHECK(dut.u_msa.wb_q.d.wd == 5'(w.r) && dut.u_msa.wb_data == w.v,
             $sformatf("instr %0d (%h): w%0d <= %h expected w%0d <= %h", w.idx, prog[w.idx].word,
                       dut.u_msa.wb_q.d.wd, dut.u_msa.wb_data, w.r, w.v))
    end
    if (gpr_we) begin
      wr_t w; w = gq.pop_front();
      `CHECK(gpr_waddr == 5'(w.r) && gpr_wdata == 32'(w.v),
             $sformatf("instr %0d (%h): r%0d <= %h expected r%0d <= %h", w.idx, prog[w.idx].word,
                       gpr_waddr, gpr_wdata, w.r, 32'(w.v)))
    end
  end

  // ---------------- mechanism counters ----------------
  int n_stall_ex_haz, n_loaduse, n_divstall, n_fwd, n_wt, n_taken, n_ntaken, n_ld_al, n_ld_un,
      n_st_al, n_st_un, n_gpr_rd, n_gpr_wr, n_gpr_haz, n_core_stall, n_ctc, n_cfc, n_div, n_retire;
  always @(posedge clk) if (run) begin
    if (core_stall) n_core_stall++;
    if (gpr_haz) n_gpr_haz++;
    if (!core_stall) begin
      if (msa_stall_id && !msa_stall_ex && dut.u_msa.haz_ex) n_stall_ex_haz++;
      if (msa_stall_id && !msa_stall_ex && dut.u_msa.haz_mem && !dut.u_msa.haz_ex) n_loaduse++;
      if (msa_stall_ex) n_divstall++;
      if (ev_fwd_mem) n_fwd++;
      if (ev_retire) n_retire++;
      if (adv && dut.u_msa.wb_we &&
          ((dut.u_msa.d_id.rd_a && dut.u_msa.d_id.ws == dut.u_msa.wb_q.d.wd) ||
           (dut.u_msa.d_id.rd_b && dut.u_msa.d_id.wt == dut.u_msa.wb_q.d.wd) ||
           (dut.u_msa.d_id.rd_c && dut.u_msa.d_id.wd == dut.u_msa.wb_q.d.wd))) n_wt++;
      if (adv && msa_br_valid) begin if (msa_br_taken) n_taken++; else n_ntaken++; end
      if (dut.u_msa.mem_ld) begin if (core_daddr[3:0] == 0) n_ld_al++; else n_ld_un++; end
      if (dut.u_msa.mem_st) begin if (core_daddr[3:0] == 0) n_st_al++; else n_st_un++; end
      if (adv && gpr_rd) n_gpr_rd++;
      if (gpr_we) n_gpr_wr++;
      if (adv && id_idx < NPROG && idx_ins.kind == K_CTC) n_ctc++;
      if (adv && id_idx < NPROG && idx_ins.kind == K_CFC) n_cfc++;
      if (adv && dut.u_msa.d_id.is_div) n_div++;
    end
  end

  // ---------------- stimulus and checks ----------------
  initial begin
    rst = 1; run = 0; core_stall = 0; id_present = 0; id_idx = 0; f_idx = 0;
    ex_addr = 0; mem_addr = 0;
    imem_we = 0; imem_waddr = 0; imem_wdata = 0;
    core_drd = 0; core_dwr_bytes = 0; core_dwdata = 0;
    for (int i = 0; i < 32; i++) begin
      V[i] = '0; pend[i] = 0;
      G[i] = (i >= 1 && i <= 7) ? 32'($urandom_range(600, 1400)) : $urandom;
      if (i == 0) G[i] = 0;
      CG[i] = G[i];
    end
    csr = 0;
    for (int i = 0; i < NPROG; i++) begin
      bit allow;
      allow = (i > 32) && (i < NPROG - 2) && prog[i-1].kind != K_BR;
      prog[i] = gen(i, allow);
    end
    // load program and data while in reset
    for (int i = 0; i < NPROG; i++) begin
      @(negedge clk); imem_we = 1; imem_waddr = 17'(i); imem_wdata = prog[i].word;
    end
    @(negedge clk); imem_we = 0;
    for (int a = 0; a < MEMB; a += 4) begin
      logic [31:0] w; w = $urandom;
      for (int k = 0; k < 4; k++) M[a + k] = w[k*8 +: 8];
      @(negedge clk); core_daddr = 32'(a); core_dwr_bytes = 4; core_dwdata = w;
    end
    @(negedge clk); core_dwr_bytes = 0;
    repeat (40) @(negedge clk);
    rst = 0; run = 1;
    // reference run
    begin
      int i; i = 0;
      while (i < NPROG) begin
        if (prog[i].kind == K_BR) begin
          bit t; t = br_cond(prog[i]); ref_branches++; if (t) ref_taken++;
          cur = i + 1; execute(prog[i+1]);
          i = t ? i + 1 + prog[i].imm : i + 2;
        end else begin
          cur = i; execute(prog[i]); i++;
        end
      end
    end
    // run the hardware with random core stalls
    while (!(halt && !id_present)) begin
      @(negedge clk);
      core_stall = ($urandom_range(0, 24) == 0);
      core_daddr = mem_addr;
    end
    @(negedge clk); core_stall = 0; run = 0;
    repeat (8) @(negedge clk);
    // compare state
    for (int i = 0; i < 32; i++) begin
      `CHECK(dut.u_msa.u_vrf.u_bank_a.mem[i] == V[i] && dut.u_msa.u_vrf.u_bank_b.mem[i] == V[i] &&
             dut.u_msa.u_vrf.u_bank_c.mem[i] == V[i],
             $sformatf("w%0d = %h expected %h", i, dut.u_msa.u_vrf.u_bank_a.mem[i], V[i]))
      `CHECK(CG[i] == G[i], $sformatf("GPR %0d = %h expected %h", i, CG[i], G[i]))
    end
    `CHECK(dut.u_msa.msacsr == csr, "MSACSR")
    for (int a = 0; a < MEMB; a += 16) begin
      v128 e;
      @(negedge clk); core_drd = 1; core_daddr = 32'(a + (a / 16) % 16);
      for (int k = 0; k < 16; k++) e[k*8 +: 8] = M[(a + (a / 16) % 16 + k) % MEMB];
      @(negedge clk); core_drd = 0;
      if (a + 32 < MEMB) `CHECK(dmem_rdata == e, $sformatf("memory @%0d", a + (a / 16) % 16))
    end
    $display("mechanisms: ex-hazard stalls %0d, load-use stalls %0d, divider stall cycles %0d (%0d divides), MEM forwards %0d, write-through %0d, branches taken %0d / not taken %0d (model %0d of %0d), loads aligned %0d unaligned %0d, stores aligned %0d unaligned %0d, GPR reads %0d writes %0d, GPR bubbles %0d, core stall cycles %0d, CTCMSA %0d, CFCMSA %0d, retired %0d",
             n_stall_ex_haz, n_loaduse, n_divstall, n_div, n_fwd, n_wt, n_taken, n_ntaken, ref_taken,
             ref_branches, n_ld_al, n_ld_un, n_st_al, n_st_un, n_gpr_rd, n_gpr_wr, n_gpr_haz,
             n_core_stall, n_ctc, n_cfc, n_retire);
    `CHECK(n_stall_ex_haz > 0, "EX-hazard stall never happened")
    `CHECK(n_loaduse > 0, "load-use stall never happened")
    `CHECK(n_divstall > 0 && n_div > 0, "divider stall never happened")
    `CHECK(n_fwd > 0, "MEM forwarding never happened")
    `CHECK(n_wt > 0, "write-through never happened")
    `CHECK(n_taken > 0 && n_ntaken > 0, "both branch outcomes")
    `CHECK(n_taken == ref_taken && n_taken + n_ntaken == ref_branches, "branch count matches model")
    `CHECK(n_ld_al > 0 && n_ld_un > 0, "aligned and unaligned loads")
    `CHECK(n_st_al > 0 && n_st_un > 0, "aligned and unaligned stores")
    `CHECK(n_gpr_rd > 0 && n_gpr_wr > 0, "GPR reads and writes")
    `CHECK(n_gpr_haz > 0, "GPR hazard bubble")
    `CHECK(n_core_stall > 0, "core stall")
    `CHECK(n_ctc > 0 && n_cfc > 0, "control register moves")
    `TB_FINISH
  end
endmodule
