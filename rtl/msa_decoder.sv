// msa_decoder: decodes one 32-bit instruction into the control word (dec_t)
// of the SIMD unit.
//
// It sits beside the core's decoder and sees every instruction the core
// fetches. Instructions with major opcode 011110 (MSA) are decoded by minor
// opcode (bits 5:0) and operation field into the execution unit, the lane
// operation, signedness, saturation, data format, register ports used and
// operand sources. MSA branches (major opcode 010001, COP1, with rs field
// 0x0B, 0x0F, 0x18-0x1F) are decoded too. Anything else, including the
// floating-point (3RF, 2RF) formats this design leaves out, gives valid = 0
// and the unit executes a NOP for it. Field positions follow the MSA
// instruction formats; df/n (ELM) and df/m (BIT) use the prefix codes
// 00nnnn/100nnn/1100nn/11100n and 0mmmmmm/10mmmmm/110mmmm/1110mmm.
// Combinational.
module msa_decoder
  import msa_pkg::*;
(
  input  logic [31:0] instr,
  output dec_t        d
);
  logic [5:0] major, minor;
  logic [2:0] op3;
  logic [3:0] op4;
  logic [5:0] dfn;
  logic [6:0] dfm;
  df_e        df_n, df_m;
  logic [5:0] n_val, m_val;
  logic       dfn_ok, dfm_ok;

  assign major = instr[31:26];
  assign minor = instr[5:0];
  assign op3   = instr[25:23];
  assign op4   = instr[25:22];
  assign dfn   = instr[21:16];
  assign dfm   = instr[22:16];

  // ELM df/n decode
  always_comb begin
    dfn_ok = 1'b1; df_n = DF_B; n_val = '0;
    casez (dfn)
      6'b00????: begin df_n = DF_B; n_val = {2'b0, dfn[3:0]}; end
      6'b100???: begin df_n = DF_H; n_val = {3'b0, dfn[2:0]}; end
      6'b1100??: begin df_n = DF_W; n_val = {4'b0, dfn[1:0]}; end
      6'b11100?: begin df_n = DF_D; n_val = {5'b0, dfn[0]};   end
      default:   dfn_ok = 1'b0;
    endcase
  end

  // BIT df/m decode
  always_comb begin
    dfm_ok = 1'b1; df_m = DF_D; m_val = '0;
    casez (dfm)
      7'b0??????: begin df_m = DF_D; m_val = dfm[5:0]; end
      7'b10?????: begin df_m = DF_W; m_val = {1'b0, dfm[4:0]}; end
      7'b110????: begin df_m = DF_H; m_val = {2'b0, dfm[3:0]}; end
      7'b1110???: begin df_m = DF_B; m_val = {3'b0, dfm[2:0]}; end
      default:    dfm_ok = 1'b0;
    endcase
  end

  always_comb begin
    d          = '0;
    d.unit     = U_NONE;
    d.lop      = LOP_NONE;
    d.bsrc     = BSRC_VREG;
    d.brc      = BR_Z_V;
    d.df       = df_e'(instr[22:21]);
    d.ws       = instr[15:11];
    d.wt       = instr[20:16];
    d.wd       = instr[10:6];

    if (major == OP_COP1) begin
      // MSA branches: rs field selects the condition, wt is tested
      unique casez (instr[25:21])
        5'b01011: begin d.valid = 1'b1; d.brc = BR_Z_V;  end
        5'b01111: begin d.valid = 1'b1; d.brc = BR_NZ_V; end
        5'b110??: begin d.valid = 1'b1; d.brc = BR_Z_DF;  d.df = df_e'(instr[22:21]); end
        5'b111??: begin d.valid = 1'b1; d.brc = BR_NZ_DF; d.df = df_e'(instr[22:21]); end
        default: ;
      endcase
      d.is_branch = d.valid;
      d.rd_b      = d.valid;
    end else if (major == OP_MSA) begin
      d.valid   = 1'b1;
      d.wr_vreg = 1'b1;
      d.rd_a    = 1'b1;
      d.rd_b    = 1'b1;
      unique case (minor)
        // ---------------- I8 ----------------
        MI_I8_0: begin
          d.unit = U_VECOP; d.rd_b = 1'b0; d.bsrc = BSRC_I8; d.imm = {2'b0, instr[23:16]};
          d.df = DF_B;
          unique case (instr[25:24])
            2'd0: d.subop = VO_AND;
            2'd1: d.subop = VO_OR;
            2'd2: d.subop = VO_NOR;
            2'd3: d.subop = VO_XOR;
          endcase
        end
        MI_I8_1: begin
          d.unit = U_VECOP; d.rd_b = 1'b0; d.rd_c = 1'b1; d.bsrc = BSRC_I8;
          d.imm = {2'b0, instr[23:16]}; d.df = DF_B;
          unique case (instr[25:24])
            2'd0: d.subop = VO_BMNZ;
            2'd1: d.subop = VO_BMZ;
            2'd2: d.subop = VO_BSEL;
            default: d.valid = 1'b0;
          endcase
        end
        MI_I8_2: begin
          d.unit = U_SHUF; d.subop = SF_SHF; d.rd_b = 1'b0; d.imm = {2'b0, instr[23:16]};
          d.df = df_e'(instr[25:24]);
          if (instr[25:24] == 2'd3) d.valid = 1'b0;
        end
        // ---------------- I5 ----------------
        MI_I5_6: begin
          d.rd_b = 1'b0; d.imm = {5'b0, instr[20:16]};
          unique case (op3)
            3'd0: begin d.unit = U_VPU; d.lop = LOP_ADD; d.bsrc = BSRC_U5; end
            3'd1: begin d.unit = U_VPU; d.lop = LOP_SUB; d.bsrc = BSRC_U5; end
            3'd2: begin d.unit = U_MINMAX; d.subop = MM_MAX; d.sgn = 1'b1; d.bsrc = BSRC_S5; end
            3'd3: begin d.unit = U_MINMAX; d.subop = MM_MAX; d.bsrc = BSRC_U5; end
            3'd4: begin d.unit = U_MINMAX; d.subop = MM_MIN; d.sgn = 1'b1; d.bsrc = BSRC_S5; end
            3'd5: begin d.unit = U_MINMAX; d.subop = MM_MIN; d.bsrc = BSRC_U5; end
            default: d.valid = 1'b0;
          endcase
        end
        MI_I5_7: begin
          d.rd_b = 1'b0; d.imm = {5'b0, instr[20:16]};
          unique case (op3)
            3'd0: begin d.unit = U_CMP; d.subop = CMP_EQ; d.bsrc = BSRC_S5; end
            3'd2: begin d.unit = U_CMP; d.subop = CMP_LT; d.sgn = 1'b1; d.bsrc = BSRC_S5; end
            3'd3: begin d.unit = U_CMP; d.subop = CMP_LT; d.bsrc = BSRC_U5; end
            3'd4: begin d.unit = U_CMP; d.subop = CMP_LE; d.sgn = 1'b1; d.bsrc = BSRC_S5; end
            3'd5: begin d.unit = U_CMP; d.subop = CMP_LE; d.bsrc = BSRC_U5; end
            3'd6: begin  // LDI.df (I10 format)
              d.unit = U_MOVE; d.subop = MV_B; d.rd_a = 1'b0; d.bsrc = BSRC_S10;
              d.imm = instr[20:11];
            end
            default: d.valid = 1'b0;
          endcase
        end
        // ---------------- BIT ----------------
        MI_BIT_9, MI_BIT_A: begin
          d.rd_b = 1'b0; d.bsrc = BSRC_M; d.df = df_m; d.imm = {4'b0, m_val};
          if (!dfm_ok) d.valid = 1'b0;
          if (minor == MI_BIT_9) begin
            unique case (op3)
              3'd0: begin d.unit = U_SHIFT; d.subop = SH_SLL; end
              3'd1: begin d.unit = U_SHIFT; d.subop = SH_SRA; end
              3'd2: begin d.unit = U_SHIFT; d.subop = SH_SRL; end
              3'd3: begin d.unit = U_BIT; d.subop = BT_CLR; end
              3'd4: begin d.unit = U_BIT; d.subop = BT_SET; end
              3'd5: begin d.unit = U_BIT; d.subop = BT_NEG; end
              3'd6: begin d.unit = U_BIT; d.subop = BT_INSL; d.rd_c = 1'b1; end
              3'd7: begin d.unit = U_BIT; d.subop = BT_INSR; d.rd_c = 1'b1; end
            endcase
          end else begin
            unique case (op3)
              3'd0: begin d.unit = U_SAT; d.sgn = 1'b1; end
              3'd1: begin d.unit = U_SAT; end
              3'd2: begin d.unit = U_SHIFT; d.subop = SH_SRAR; end
              3'd3: begin d.unit = U_SHIFT; d.subop = SH_SRLR; end
              default: d.valid = 1'b0;
            endcase
          end
        end
        // ---------------- 3R ----------------
        MI_3R_D: begin
          unique case (op3)
            3'd0: begin d.unit = U_SHIFT; d.subop = SH_SLL; end
            3'd1: begin d.unit = U_SHIFT; d.subop = SH_SRA; end
            3'd2: begin d.unit = U_SHIFT; d.subop = SH_SRL; end
            3'd3: begin d.unit = U_BIT; d.subop = BT_CLR; end
            3'd4: begin d.unit = U_BIT; d.subop = BT_SET; end
            3'd5: begin d.unit = U_BIT; d.subop = BT_NEG; end
            3'd6: begin d.unit = U_BIT; d.subop = BT_INSL; d.rd_c = 1'b1; end
            3'd7: begin d.unit = U_BIT; d.subop = BT_INSR; d.rd_c = 1'b1; end
          endcase
        end
        MI_3R_E: begin
          unique case (op3)
            3'd0: begin d.unit = U_VPU; d.lop = LOP_ADD; end
            3'd1: begin d.unit = U_VPU; d.lop = LOP_SUB; end
            3'd2: begin d.unit = U_MINMAX; d.subop = MM_MAX; d.sgn = 1'b1; end
            3'd3: begin d.unit = U_MINMAX; d.subop = MM_MAX; end
            3'd4: begin d.unit = U_MINMAX; d.subop = MM_MIN; d.sgn = 1'b1; end
            3'd5: begin d.unit = U_MINMAX; d.subop = MM_MIN; end
            3'd6: begin d.unit = U_MINMAX; d.subop = MM_MAXA; end
            3'd7: begin d.unit = U_MINMAX; d.subop = MM_MINA; end
          endcase
        end
        MI_3R_F: begin
          unique case (op3)
            3'd0: begin d.unit = U_CMP; d.subop = CMP_EQ; end
            3'd2: begin d.unit = U_CMP; d.subop = CMP_LT; d.sgn = 1'b1; end
            3'd3: begin d.unit = U_CMP; d.subop = CMP_LT; end
            3'd4: begin d.unit = U_CMP; d.subop = CMP_LE; d.sgn = 1'b1; end
            3'd5: begin d.unit = U_CMP; d.subop = CMP_LE; end
            default: d.valid = 1'b0;
          endcase
        end
        MI_3R_10: begin
          d.unit = U_VPU;
          unique case (op3)
            3'd0: d.lop = LOP_ADDA;
            3'd1: begin d.lop = LOP_ADDA; d.sat = 1'b1; end
            3'd2: begin d.lop = LOP_ADD; d.sgn = 1'b1; d.sat = 1'b1; end
            3'd3: begin d.lop = LOP_ADD; d.sat = 1'b1; end
            3'd4: begin d.lop = LOP_AVE; d.sgn = 1'b1; end
            3'd5: d.lop = LOP_AVE;
            3'd6: begin d.lop = LOP_AVER; d.sgn = 1'b1; end
            3'd7: d.lop = LOP_AVER;
          endcase
        end
        MI_3R_11: begin
          d.unit = U_VPU;
          unique case (op3)
            3'd0: begin d.lop = LOP_SUB; d.sgn = 1'b1; d.sat = 1'b1; end
            3'd1: begin d.lop = LOP_SUB; d.sat = 1'b1; end
            3'd2: d.lop = LOP_SUBSUS;
            3'd3: d.lop = LOP_SUBSUU;
            3'd4: begin d.lop = LOP_ASUB; d.sgn = 1'b1; end
            3'd5: d.lop = LOP_ASUB;
            default: d.valid = 1'b0;
          endcase
        end
        MI_3R_12: begin
          d.unit = U_VPU;
          unique case (op3)
            3'd0: d.lop = LOP_MUL;
            3'd1: begin d.lop = LOP_MADD; d.rd_c = 1'b1; end
            3'd2: begin d.lop = LOP_MSUB; d.rd_c = 1'b1; end
            3'd4: begin d.lop = LOP_DIV; d.sgn = 1'b1; d.is_div = 1'b1; end
            3'd5: begin d.lop = LOP_DIV; d.is_div = 1'b1; end
            3'd6: begin d.lop = LOP_MOD; d.sgn = 1'b1; d.is_div = 1'b1; end
            3'd7: begin d.lop = LOP_MOD; d.is_div = 1'b1; end
            default: d.valid = 1'b0;
          endcase
        end
        MI_3R_13: begin
          d.unit = U_DOTP;
          unique case (op3)
            3'd0: begin d.subop = DP_DOTP; d.sgn = 1'b1; end
            3'd1: d.subop = DP_DOTP;
            3'd2: begin d.subop = DP_DPADD; d.sgn = 1'b1; d.rd_c = 1'b1; end
            3'd3: begin d.subop = DP_DPADD; d.rd_c = 1'b1; end
            3'd4: begin d.subop = DP_DPSUB; d.sgn = 1'b1; d.rd_c = 1'b1; end
            3'd5: begin d.subop = DP_DPSUB; d.rd_c = 1'b1; end
            default: d.valid = 1'b0;
          endcase
          if (d.df == DF_B) d.valid = 1'b0;
        end
        MI_3R_14: begin
          d.unit = U_SHUF;
          unique case (op3)
            3'd0: begin d.subop = SF_SLD; d.rd_b = 1'b0; d.rd_c = 1'b1;
                        d.uses_gpr = 1'b1; d.gpr = instr[20:16]; end
            3'd1: begin d.subop = SF_SPLAT; d.rd_b = 1'b0;
                        d.uses_gpr = 1'b1; d.gpr = instr[20:16]; end
            3'd2: d.subop = SF_PCKEV;
            3'd3: d.subop = SF_PCKOD;
            3'd4: d.subop = SF_ILVL;
            3'd5: d.subop = SF_ILVR;
            3'd6: d.subop = SF_ILVEV;
            3'd7: d.subop = SF_ILVOD;
          endcase
        end
        MI_3R_15: begin
          unique case (op3)
            3'd0: begin d.unit = U_SHUF; d.subop = SF_VSHF; d.rd_c = 1'b1; end
            3'd1: begin d.unit = U_SHIFT; d.subop = SH_SRAR; end
            3'd2: begin d.unit = U_SHIFT; d.subop = SH_SRLR; end
            3'd4: begin d.unit = U_VPU; d.lop = LOP_ADD; d.sgn = 1'b1; end
            3'd5: begin d.unit = U_VPU; d.lop = LOP_ADD; end
            3'd6: begin d.unit = U_VPU; d.lop = LOP_SUB; d.sgn = 1'b1; end
            3'd7: begin d.unit = U_VPU; d.lop = LOP_SUB; end
            default: d.valid = 1'b0;
          endcase
          if (op3[2]) begin  // horizontal add/subtract: odd of ws, even of wt
            d.a_odd = 1'b1; d.bsrc = BSRC_EVEN;
            if (d.df == DF_B) d.valid = 1'b0;
          end
        end
        // ---------------- ELM ----------------
        MI_ELM: begin
          d.rd_b = 1'b0;
          if (dfn == 6'b111110) begin
            d.df = DF_W;
            unique case (op4)
              4'd0: begin  // CTCMSA cd <- GPR rs
                d.is_ctc = 1'b1; d.wr_vreg = 1'b0; d.rd_a = 1'b0;
                d.uses_gpr = 1'b1; d.gpr = instr[15:11];
              end
              4'd1: begin  // CFCMSA GPR rd <- cs
                d.is_cfc = 1'b1; d.is_copy = 1'b1; d.wr_vreg = 1'b0; d.rd_a = 1'b0;
              end
              4'd2: begin d.unit = U_MOVE; d.subop = MV_A; end   // MOVE.V
              default: d.valid = 1'b0;
            endcase
          end else begin
            d.df  = df_n;
            d.imm = {4'b0, n_val};
            if (!dfn_ok) d.valid = 1'b0;
            unique case (op4)
              4'd0: begin d.unit = U_SHUF; d.subop = SF_SLD; d.rd_c = 1'b1; end
              4'd1: begin d.unit = U_SHUF; d.subop = SF_SPLAT; end
              4'd2: begin d.is_copy = 1'b1; d.copy_sgn = 1'b1; d.wr_vreg = 1'b0; end
              4'd3: begin d.is_copy = 1'b1; d.wr_vreg = 1'b0; end
              4'd4: begin d.unit = U_INS; d.subop = IN_INSERT; d.rd_a = 1'b0; d.rd_c = 1'b1;
                          d.uses_gpr = 1'b1; d.gpr = instr[15:11]; end
              4'd5: begin d.unit = U_INS; d.subop = IN_INSVE; d.rd_c = 1'b1; end
              default: d.valid = 1'b0;
            endcase
          end
        end
        // ---------------- VEC and 2R ----------------
        MI_VEC: begin
          if (instr[25:18] == 8'hC0 || instr[25:18] == 8'hC1 ||
              instr[25:18] == 8'hC2 || instr[25:18] == 8'hC3) begin
            d.df   = df_e'(instr[17:16]);
            d.rd_b = 1'b0;
            unique case (instr[19:18])
              2'd0: begin  // FILL.df: GPR rs replicated
                d.unit = U_MOVE; d.subop = MV_C; d.rd_a = 1'b0; d.c_gpr = 1'b1;
                d.uses_gpr = 1'b1; d.gpr = instr[15:11];
              end
              2'd1: begin d.unit = U_COUNT; d.subop = CN_PCNT; end
              2'd2: begin d.unit = U_COUNT; d.subop = CN_NLOC; end
              2'd3: begin d.unit = U_COUNT; d.subop = CN_NLZC; end
            endcase
          end else begin
            d.unit = U_VECOP;
            unique case (instr[25:21])
              5'd0: d.subop = VO_AND;
              5'd1: d.subop = VO_OR;
              5'd2: d.subop = VO_NOR;
              5'd3: d.subop = VO_XOR;
              5'd4: begin d.subop = VO_BMNZ; d.rd_c = 1'b1; end
              5'd5: begin d.subop = VO_BMZ;  d.rd_c = 1'b1; end
              5'd6: begin d.subop = VO_BSEL; d.rd_c = 1'b1; end
              default: d.valid = 1'b0;
            endcase
          end
        end
        // ---------------- MI10 ----------------
        6'h20, 6'h21, 6'h22, 6'h23: begin  // LD.df: address computed by the core
          d.is_load = 1'b1; d.rd_a = 1'b0; d.rd_b = 1'b0; d.df = df_e'(minor[1:0]);
          d.imm = instr[25:16];
        end
        6'h24, 6'h25, 6'h26, 6'h27: begin  // ST.df: stores wd
          d.is_store = 1'b1; d.wr_vreg = 1'b0; d.rd_a = 1'b0; d.rd_b = 1'b0; d.rd_c = 1'b1;
          d.df = df_e'(minor[1:0]); d.imm = instr[25:16];
        end
        default: d.valid = 1'b0;
      endcase
      if (!d.valid) begin
        d.wr_vreg = 1'b0; d.rd_a = 1'b0; d.rd_b = 1'b0; d.rd_c = 1'b0;
        d.is_copy = 1'b0; d.is_ctc = 1'b0; d.is_load = 1'b0; d.is_store = 1'b0;
        d.uses_gpr = 1'b0; d.is_div = 1'b0;
      end
    end
  end
endmodule
