// tb_msa_decoder: self-checking testbench for msa_decoder. A table of
// encoded instructions from every format (3R, I5, I10, BIT, I8, ELM, VEC,
// 2R, MI10, branches) is decoded and the control fields compared with the
// expected unit, operation, signedness, saturation, format, registers and
// port usage. Non-MSA words and reserved encodings must give valid = 0.
`include "tb_common.svh"
module tb_msa_decoder;
  import msa_pkg::*;
  import msa_ref_pkg::*;
  `TB_COUNTERS
  logic [31:0] instr;
  dec_t d;
  msa_decoder dut (.instr(instr), .d(d));

  task automatic chk(string nm, logic [31:0] i, unit_e u, int op, logic sgn, logic sat, int df,
                     logic wr, logic ra, logic rb, logic rc);
    instr = i; #1;
    `CHECK(d.valid && d.unit == u && (u == U_VPU ? int'(d.lop) : int'(d.subop)) == op &&
           d.sgn == sgn && d.sat == sat && (df < 0 || int'(d.df) == df) && d.wr_vreg == wr &&
           d.rd_a == ra && d.rd_b == rb && d.rd_c == rc,
           $sformatf("%s: unit=%0d op=%0d sgn=%0d sat=%0d df=%0d wr=%0d rd=%0d%0d%0d", nm, d.unit,
                     (u == U_VPU ? int'(d.lop) : int'(d.subop)), d.sgn, d.sat, d.df, d.wr_vreg,
                     d.rd_a, d.rd_b, d.rd_c))
  endtask

  initial begin
    for (int t = 0; t < 200; t++) begin
      int df, ws, wt, wd, m;
      df = t % 4; ws = $urandom_range(0, 31); wt = $urandom_range(0, 31); wd = $urandom_range(0, 31);
      m = $urandom_range(0, ew(df) - 1);
      chk("ADDV",   e3r(6'h0E, 0, df, wt, ws, wd), U_VPU, LOP_ADD, 0, 0, df, 1, 1, 1, 0);
      `CHECK(d.ws == 5'(ws) && d.wt == 5'(wt) && d.wd == 5'(wd), "register fields")
      chk("ADDS_S", e3r(6'h10, 2, df, wt, ws, wd), U_VPU, LOP_ADD, 1, 1, df, 1, 1, 1, 0);
      chk("ADDS_A", e3r(6'h10, 1, df, wt, ws, wd), U_VPU, LOP_ADDA, 0, 1, df, 1, 1, 1, 0);
      chk("SUBSUU_S", e3r(6'h11, 3, df, wt, ws, wd), U_VPU, LOP_SUBSUU, 0, 0, df, 1, 1, 1, 0);
      chk("MADDV",  e3r(6'h12, 1, df, wt, ws, wd), U_VPU, LOP_MADD, 0, 0, df, 1, 1, 1, 1);
      chk("DIV_S",  e3r(6'h12, 4, df, wt, ws, wd), U_VPU, LOP_DIV, 1, 0, df, 1, 1, 1, 0);
      `CHECK(d.is_div, "DIV_S is_div")
      chk("MOD_U",  e3r(6'h12, 7, df, wt, ws, wd), U_VPU, LOP_MOD, 0, 0, df, 1, 1, 1, 0);
      chk("MAX_A",  e3r(6'h0E, 6, df, wt, ws, wd), U_MINMAX, MM_MAXA, 0, 0, df, 1, 1, 1, 0);
      chk("CLE_S",  e3r(6'h0F, 4, df, wt, ws, wd), U_CMP, CMP_LE, 1, 0, df, 1, 1, 1, 0);
      chk("BINSR",  e3r(6'h0D, 7, df, wt, ws, wd), U_BIT, BT_INSR, 0, 0, df, 1, 1, 1, 1);
      chk("SRAR",   e3r(6'h15, 1, df, wt, ws, wd), U_SHIFT, SH_SRAR, 0, 0, df, 1, 1, 1, 0);
      chk("ILVOD",  e3r(6'h14, 7, df, wt, ws, wd), U_SHUF, SF_ILVOD, 0, 0, df, 1, 1, 1, 0);
      chk("VSHF",   e3r(6'h15, 0, df, wt, ws, wd), U_SHUF, SF_VSHF, 0, 0, df, 1, 1, 1, 1);
      chk("SLD",    e3r(6'h14, 0, df, wt, ws, wd), U_SHUF, SF_SLD, 0, 0, df, 1, 1, 0, 1);
      `CHECK(d.uses_gpr && d.gpr == 5'(wt), "SLD reads GPR rt")
      chk("ADDVI",  e3r(6'h06, 0, df, wt, ws, wd), U_VPU, LOP_ADD, 0, 0, df, 1, 1, 0, 0);
      `CHECK(d.bsrc == BSRC_U5 && d.imm == 10'(wt), "ADDVI immediate")
      chk("CLTI_S", e3r(6'h07, 2, df, wt, ws, wd), U_CMP, CMP_LT, 1, 0, df, 1, 1, 0, 0);
      `CHECK(d.bsrc == BSRC_S5, "CLTI_S signed immediate")
      chk("LDI",    eldi(df, 10'h3F0 + t, wd), U_MOVE, MV_B, 0, 0, df, 1, 0, 0, 0);
      `CHECK(d.bsrc == BSRC_S10 && d.imm == 10'(10'h3F0 + t), "LDI immediate")
      chk("SRLI",   ebit(6'h09, 2, df, m, ws, wd), U_SHIFT, SH_SRL, 0, 0, df, 1, 1, 0, 0);
      `CHECK(d.bsrc == BSRC_M && d.imm == 10'(m), $sformatf("BIT m=%0d imm=%0d", m, d.imm))
      chk("SAT_U",  ebit(6'h0A, 1, df, m, ws, wd), U_SAT, 0, 0, 0, df, 1, 1, 0, 0);
      chk("BINSLI", ebit(6'h09, 6, df, m, ws, wd), U_BIT, BT_INSL, 0, 0, df, 1, 1, 0, 1);
      chk("XORI",   ei8(6'h00, 3, t, ws, wd), U_VECOP, VO_XOR, 0, 0, 0, 1, 1, 0, 0);
      chk("BSELI",  ei8(6'h01, 2, t, ws, wd), U_VECOP, VO_BSEL, 0, 0, 0, 1, 1, 0, 1);
      chk("SHF",    ei8(6'h02, df % 3, t, ws, wd), U_SHUF, SF_SHF, 0, 0, df % 3, 1, 1, 0, 0);
      chk("NOR.V",  evec(2, wt, ws, wd), U_VECOP, VO_NOR, 0, 0, -1, 1, 1, 1, 0);
      chk("BMZ.V",  evec(5, wt, ws, wd), U_VECOP, VO_BMZ, 0, 0, -1, 1, 1, 1, 1);
      chk("FILL",   e2r(0, df, ws, wd), U_MOVE, MV_C, 0, 0, df, 1, 0, 0, 0);
      `CHECK(d.c_gpr && d.uses_gpr && d.gpr == 5'(ws), "FILL reads GPR rs")
      chk("NLZC",   e2r(3, df, ws, wd), U_COUNT, CN_NLZC, 0, 0, df, 1, 1, 0, 0);
      chk("SPLATI", eelm(1, df, t, ws, wd), U_SHUF, SF_SPLAT, 0, 0, df, 1, 1, 0, 0);
      `CHECK(d.imm == 10'(t % ne(df)), "ELM index n")
      chk("INSERT", eelm(4, df, t, ws, wd), U_INS, IN_INSERT, 0, 0, df, 1, 0, 0, 1);
      chk("INSVE",  eelm(5, df, t, ws, wd), U_INS, IN_INSVE, 0, 0, df, 1, 1, 0, 1);
      chk("MOVE.V", ectl(2, ws, wd), U_MOVE, MV_A, 0, 0, 2, 1, 1, 0, 0);
      instr = eelm(2, df % 3, t, ws, wd); #1;
      `CHECK(d.valid && d.is_copy && d.copy_sgn && !d.wr_vreg && d.rd_a, "COPY_S")
      instr = ectl(0, ws, 1); #1;
      `CHECK(d.valid && d.is_ctc && d.uses_gpr && d.gpr == 5'(ws) && !d.wr_vreg, "CTCMSA")
      instr = ectl(1, 1, wd); #1;
      `CHECK(d.valid && d.is_cfc && d.is_copy && !d.wr_vreg, "CFCMSA")
      instr = emi10(1, df, t, ws, wd); #1;
      `CHECK(d.valid && d.is_load && d.wr_vreg && !d.rd_c && int'(d.df) == df, "LD")
      instr = emi10(0, df, t, ws, wd); #1;
      `CHECK(d.valid && d.is_store && !d.wr_vreg && d.rd_c, "ST")
      instr = ebr(8'h18 + df, wt, t); #1;
      `CHECK(d.valid && d.is_branch && d.brc == BR_Z_DF && d.rd_b && d.wt == 5'(wt) && !d.wr_vreg, "BZ.df")
      instr = ebr(8'h0F, wt, t); #1;
      `CHECK(d.valid && d.is_branch && d.brc == BR_NZ_V, "BNZ.V")
      chk("HSUB_U", e3r(6'h15, 7, 1 + df % 3, wt, ws, wd), U_VPU, LOP_SUB, 0, 0, 1 + df % 3, 1, 1, 1, 0);
      `CHECK(d.a_odd && d.bsrc == BSRC_EVEN, "horizontal op operand sources")
      chk("DPSUB_S", e3r(6'h13, 4, 1 + df % 3, wt, ws, wd), U_DOTP, DP_DPSUB, 1, 0, 1 + df % 3, 1, 1, 1, 1);
      // words that are not MSA or are reserved
      instr = {6'b000000, 26'($urandom)}; #1; `CHECK(!d.valid, "SPECIAL opcode ignored")
      instr = {6'b100011, 26'($urandom)}; #1; `CHECK(!d.valid, "LW ignored")
      instr = e3r(6'h0F, 1, df, wt, ws, wd); #1; `CHECK(!d.valid && !d.wr_vreg, "reserved 3R")
      instr = e3r(6'h13, 0, 0, wt, ws, wd); #1;  `CHECK(!d.valid, "DOTP.B reserved")
      instr = e3r(6'h1B, 0, df, wt, ws, wd); #1; `CHECK(!d.valid, "floating point not decoded")
      instr = ebr(8'h08, wt, t); #1;             `CHECK(!d.valid, "other COP1 ignored")
    end
    `TB_FINISH
  end
endmodule
