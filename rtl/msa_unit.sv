// msa_unit: the SIMD coprocessor. It implements the integer part of the MIPS
// SIMD Architecture (128-bit vectors, 32 vector registers) as a five-stage
// pipeline that runs in lock step with the host core's own five stages.
//
// IF  The core fetches. The instruction memory output, i.e. the instruction
//     in the core's decode stage, is also the input of this unit (id_instr):
//     the unit snoops the fetch stream and treats non-MSA words as NOPs.
// ID  msa_decoder decodes it; the register file is read on three ports
//     (ws, wt, wd). Operands are forwarded from the MEM stage and, through
//     the register file's write-through, from WB. The core reads the GPR
//     the instruction names (gpr_raddr) and returns it on gpr_rdata (path B).
//     MSA branches are evaluated here by branch_unit and reported on
//     br_taken (the core computes the target from s16 and executes the
//     delay slot as usual).
// EX  Special units 1-3 shape the operands; vpu_3r (30 lanes), dotp,
//     compare, min/max, saturate, shift, bit, count, bitwise, shuffle and
//     insert units all compute, and the unit field picks one result. COPY_S/U
//     extracts an element for the GPR (path A).
// MEM ST.df sends wd to the data memory (path C, 16 bytes at the address the
//     core computed); LD.df reads 16 bytes (path D).
// WB  The result, or the loaded data, is written to the register file;
//     COPY and CFCMSA results are written to the GPR named by the wd field.
//
// Stalls. Both pipelines always stall together. core_stall freezes every
// stage of this unit. The unit asks the core to stall with
//   stall_id  a source register is written by the instruction in EX (its
//             result is not ready yet) or by a load in MEM: IF/ID hold, a
//             bubble goes into EX;
//   stall_ex  a DIV/MOD is in EX and the divider (DIV_LAT cycles, or the
//             element width in cycles with DIV_SEQ = 1) has not finished:
//             IF/ID/EX hold, a bubble goes into MEM.
// The document states the lock-step stages and the common stall; the hazard
// rules and forwarding paths are this design's choice.
//
// Control registers: CTCMSA/CFCMSA access MSAIR (0, read-only, IR_VALUE)
// and MSACSR (1, read/write); other numbers read as zero.
module msa_unit
  import msa_pkg::*;
#(
  parameter int unsigned DIV_LAT  = 4,
  parameter bit          DIV_SEQ  = 1'b0,  // 1: sequential dividers
  parameter logic [31:0] IR_VALUE = 32'h0000_0100
) (
  input  logic        clk,
  input  logic        rst,
  // instruction in the core's decode stage
  input  logic [31:0] id_instr,
  input  logic        id_valid,
  // pipeline control shared with the core
  input  logic        core_stall,
  output logic        stall_id,
  output logic        stall_ex,
  // MSA branch result (valid in ID)
  output logic        br_valid,
  output logic        br_taken,
  // path B: GPR value read by the core in ID
  output logic [4:0]  gpr_raddr,
  output logic        gpr_rd,
  input  logic [31:0] gpr_rdata,
  // path A: GPR write-back (WB stage)
  output logic        gpr_we,
  output logic [4:0]  gpr_waddr,
  output logic [31:0] gpr_wdata,
  // paths C and D: data memory (MEM stage; load data arrives in WB)
  output logic        mem_ld,
  output logic        mem_st,
  output vec_t        mem_wdata,
  input  vec_t        mem_rdata,
  // activity, for performance counting
  output logic        ev_fwd_mem,
  output logic        ev_retire
);
  // ---------------------------------------------------------------- ID
  dec_t d_raw, d_id;
  vec_t rf_a, rf_b, rf_c;
  vec_t op_a, op_b, op_c;

  msa_decoder u_dec (.instr(id_instr), .d(d_raw));

  always_comb begin
    d_id = d_raw;
    if (!id_valid) d_id = '0;
  end

  // pipeline registers
  typedef struct packed {
    logic        v;
    dec_t        d;
    vec_t        a, b, c;
    logic [31:0] gpr;
  } id_ex_t;

  typedef struct packed {
    logic        v;
    dec_t        d;
    vec_t        res;
    vec_t        st;
    logic [31:0] g;
  } ex_mem_t;

  typedef struct packed {
    logic        v;
    dec_t        d;
    vec_t        res;
    logic [31:0] g;
  } mem_wb_t;

  id_ex_t  ex_q;
  ex_mem_t mem_q;
  mem_wb_t wb_q;

  // write-back
  logic wb_we;
  vec_t wb_data;
  assign wb_data = wb_q.d.is_load ? mem_rdata : wb_q.res;
  assign wb_we   = wb_q.v && wb_q.d.wr_vreg && !core_stall;

  msa_vrf u_vrf (
    .clk(clk), .rst(rst),
    .ra(d_id.ws), .rb(d_id.wt), .rc(d_id.wd),
    .da(rf_a), .db(rf_b), .dc(rf_c),
    .we(wb_we), .wa(wb_q.d.wd), .wd(wb_data)
  );

  // forwarding from MEM (results that are not loads)
  logic mem_fwd_ok;
  logic fa, fb, fc;
  assign mem_fwd_ok = mem_q.v && mem_q.d.wr_vreg && !mem_q.d.is_load;
  assign fa = mem_fwd_ok && d_id.rd_a && mem_q.d.wd == d_id.ws;
  assign fb = mem_fwd_ok && d_id.rd_b && mem_q.d.wd == d_id.wt;
  assign fc = mem_fwd_ok && d_id.rd_c && mem_q.d.wd == d_id.wd;
  assign op_a = fa ? mem_q.res : rf_a;
  assign op_b = fb ? mem_q.res : rf_b;
  assign op_c = fc ? mem_q.res : rf_c;
  assign ev_fwd_mem = d_id.valid && (fa || fb || fc) && !stall_id && !stall_ex && !core_stall;

  // hazards
  function automatic logic uses(dec_t d, logic [4:0] r);
    return (d.rd_a && d.ws == r) || (d.rd_b && d.wt == r) || (d.rd_c && d.wd == r);
  endfunction

  logic haz_ex, haz_mem;
  assign haz_ex  = ex_q.v && ex_q.d.wr_vreg && uses(d_id, ex_q.d.wd);
  assign haz_mem = mem_q.v && mem_q.d.wr_vreg && mem_q.d.is_load && uses(d_id, mem_q.d.wd);
  assign stall_id = d_id.valid && (haz_ex || haz_mem);

  // path B request
  assign gpr_raddr = d_id.gpr;
  assign gpr_rd    = d_id.valid && d_id.uses_gpr;

  // branch
  logic br_cond;
  branch_unit u_br (.v(op_b), .df(d_id.df), .cond(d_id.brc), .taken(br_cond));
  assign br_valid = d_id.valid && d_id.is_branch && !stall_id && !stall_ex;
  assign br_taken = br_valid && br_cond;

  // ---------------------------------------------------------------- EX
  dec_t e;
  vec_t sa, sb, sc;
  vec_t y_vpu, y_dotp, y_cmp, y_mm, y_sat, y_sh, y_bit, y_cnt, y_vo, y_shf, y_ins;
  logic [31:0] elem;
  vec_t ex_res;
  logic [31:0] ex_g;
  logic vpu_done, div_started, div_hold_v;
  vec_t div_hold;
  logic div_start;

  assign e = ex_q.d;

  special_unit1 u_sp1 (.a(ex_q.a), .df(e.df), .sgn(e.sgn), .widen(e.a_odd), .y(sa));
  special_unit2 u_sp2 (.b(ex_q.b), .df(e.df), .sgn(e.sgn), .sel(e.bsrc), .imm(e.imm), .y(sb));
  special_unit3 u_sp3 (.c(ex_q.c), .gpr(ex_q.gpr), .df(e.df), .use_gpr(e.c_gpr), .y(sc));

  assign div_start = ex_q.v && e.is_div && !div_started && !div_hold_v;

  vpu_3r #(.DIV_LAT(DIV_LAT), .DIV_SEQ(DIV_SEQ)) u_vpu (
    .clk(clk), .rst(rst), .a(sa), .b(sb), .c(sc), .df(e.df), .op(e.lop),
    .sgn(e.sgn), .sat(e.sat), .start(div_start), .y(y_vpu), .done(vpu_done)
  );
  dotp_unit    u_dotp (.a(sa), .b(sb), .c(sc), .df(e.df), .op(e.subop), .sgn(e.sgn), .y(y_dotp));
  cmp_unit     u_cmp  (.a(sa), .b(sb), .df(e.df), .op(e.subop), .sgn(e.sgn), .y(y_cmp));
  minmax_unit  u_mm   (.a(sa), .b(sb), .df(e.df), .op(e.subop), .sgn(e.sgn), .y(y_mm));
  sat_unit     u_sat  (.a(sa), .df(e.df), .m(e.imm[5:0]), .sgn(e.sgn), .y(y_sat));
  shift_unit   u_sh   (.a(sa), .b(sb), .df(e.df), .op(e.subop), .y(y_sh));
  bit_unit     u_bit  (.a(sa), .b(sb), .c(sc), .df(e.df), .op(e.subop), .y(y_bit));
  count_unit   u_cnt  (.a(sa), .df(e.df), .op(e.subop), .y(y_cnt));
  vecop_unit   u_vo   (.a(sa), .b(sb), .c(sc), .op(e.subop), .y(y_vo));
  shuffle_unit u_shf  (.a(sa), .b(sb), .c(sc), .df(e.df), .op(e.subop),
                       .n(e.uses_gpr ? ex_q.gpr : 32'(e.imm)), .imm8(e.imm[7:0]), .y(y_shf));
  insert_unit  u_ins  (.a(sa), .c(sc), .gpr(ex_q.gpr), .df(e.df), .op(e.subop),
                       .n(e.imm[3:0]), .copy_sgn(e.copy_sgn), .y(y_ins), .elem(elem));

  // divider sequencing: start once, hold the result until EX advances
  always_ff @(posedge clk) begin
    if (rst) begin
      div_started <= 1'b0;
      div_hold_v  <= 1'b0;
      div_hold    <= '0;
    end else if (!core_stall && !stall_ex) begin
      div_started <= 1'b0;
      div_hold_v  <= 1'b0;
    end else begin
      if (div_start) div_started <= 1'b1;
      if (vpu_done && div_started) begin
        div_hold_v <= 1'b1;
        div_hold   <= y_vpu;
      end
    end
  end

  assign stall_ex = ex_q.v && e.is_div && !div_hold_v && !(vpu_done && div_started);

  // control registers
  logic [31:0] msacsr;
  logic [31:0] ctl_rd;
  always_comb begin
    unique case (e.ws)
      5'd0:    ctl_rd = IR_VALUE;
      5'd1:    ctl_rd = msacsr;
      default: ctl_rd = '0;
    endcase
  end

  always_comb begin
    unique case (e.unit)
      U_VPU:    ex_res = e.is_div ? (div_hold_v ? div_hold : y_vpu) : y_vpu;
      U_DOTP:   ex_res = y_dotp;
      U_CMP:    ex_res = y_cmp;
      U_MINMAX: ex_res = y_mm;
      U_SAT:    ex_res = y_sat;
      U_SHIFT:  ex_res = y_sh;
      U_BIT:    ex_res = y_bit;
      U_COUNT:  ex_res = y_cnt;
      U_VECOP:  ex_res = y_vo;
      U_SHUF:   ex_res = y_shf;
      U_INS:    ex_res = y_ins;
      U_MOVE:   ex_res = (e.subop == MV_B) ? sb : ((e.subop == MV_C) ? sc : sa);
      default:  ex_res = '0;
    endcase
    ex_g = e.is_cfc ? ctl_rd : elem;
  end

  // ---------------------------------------------------------------- pipeline registers
  always_ff @(posedge clk) begin
    if (rst) begin
      ex_q   <= '0;
      mem_q  <= '0;
      wb_q   <= '0;
      msacsr <= '0;
    end else if (!core_stall) begin
      // ID -> EX
      if (!stall_ex) begin
        if (stall_id) begin
          ex_q <= '0;
        end else begin
          ex_q.v   <= d_id.valid && !d_id.is_branch;
          ex_q.d   <= d_id;
          ex_q.a   <= op_a;
          ex_q.b   <= op_b;
          ex_q.c   <= op_c;
          ex_q.gpr <= gpr_rdata;
        end
      end
      // EX -> MEM
      if (stall_ex) begin
        mem_q <= '0;
      end else begin
        mem_q.v   <= ex_q.v;
        mem_q.d   <= ex_q.d;
        mem_q.res <= ex_res;
        mem_q.st  <= ex_q.c;
        mem_q.g   <= ex_g;
      end
      // MEM -> WB
      wb_q.v   <= mem_q.v;
      wb_q.d   <= mem_q.d;
      wb_q.res <= mem_q.res;
      wb_q.g   <= mem_q.g;
      // CTCMSA takes effect when it leaves EX
      if (ex_q.v && e.is_ctc && e.wd == 5'd1 && !stall_ex) msacsr <= ex_q.gpr;
    end
  end

  // ---------------------------------------------------------------- MEM / WB outputs
  assign mem_ld    = mem_q.v && mem_q.d.is_load && !core_stall && !rst;
  assign mem_st    = mem_q.v && mem_q.d.is_store && !core_stall && !rst;
  assign mem_wdata = mem_q.st;

  assign gpr_we    = wb_q.v && wb_q.d.is_copy && !core_stall && !rst;
  assign gpr_waddr = wb_q.d.wd;
  assign gpr_wdata = wb_q.g;
  assign ev_retire = wb_q.v && !core_stall && !rst;

  // the EX stall is only ever raised for a divide held in EX
  assert property (@(posedge clk) disable iff (rst) !(stall_ex && !(ex_q.v && e.is_div)));
endmodule
