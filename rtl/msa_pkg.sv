// msa_pkg: types and constants shared by the SIMD (MSA) coprocessor.
//
// A vector register is 128 bits and is read as 16 bytes, 8 halfwords,
// 4 words or 2 doublewords, element 0 in the least significant bits. The
// data format (df) is a 2-bit field of the instruction. The instruction field
// layout (major opcode, minor opcode, ws/wt/wd, df, immediates) follows the
// MIPS SIMD Architecture formats; the minor-opcode and operation numbers are
// the MSA ones. The internal operation codes below (lop_e, unit_e, ...) are
// this design's own encoding of the decoded instruction.
package msa_pkg;

  localparam int unsigned VLEN   = 128;
  localparam int unsigned NREGS  = 32;

  typedef logic [VLEN-1:0] vec_t;

  typedef enum logic [1:0] {DF_B = 2'd0, DF_H = 2'd1, DF_W = 2'd2, DF_D = 2'd3} df_e;

  // Major opcodes (instruction bits 31:26)
  localparam logic [5:0] OP_MSA  = 6'b011110;
  localparam logic [5:0] OP_COP1 = 6'b010001;

  // MSA minor opcodes (instruction bits 5:0)
  localparam logic [5:0] MI_I8_0  = 6'h00, MI_I8_1 = 6'h01, MI_I8_2 = 6'h02;
  localparam logic [5:0] MI_I5_6  = 6'h06, MI_I5_7 = 6'h07;
  localparam logic [5:0] MI_BIT_9 = 6'h09, MI_BIT_A = 6'h0A;
  localparam logic [5:0] MI_3R_D  = 6'h0D, MI_3R_E = 6'h0E, MI_3R_F = 6'h0F;
  localparam logic [5:0] MI_3R_10 = 6'h10, MI_3R_11 = 6'h11, MI_3R_12 = 6'h12;
  localparam logic [5:0] MI_3R_13 = 6'h13, MI_3R_14 = 6'h14, MI_3R_15 = 6'h15;
  localparam logic [5:0] MI_ELM   = 6'h19;
  localparam logic [5:0] MI_VEC   = 6'h1E;   // VEC and 2R share this one
  localparam logic [5:0] MI_LD_B  = 6'h20;   // 0x20..0x23 LD.df
  localparam logic [5:0] MI_ST_B  = 6'h24;   // 0x24..0x27 ST.df

  // 3R lane operation code: the 4-bit "Operation" column of the adder,
  // multiplier and divider lane tables. DIV uses 0100 (see lane_3r).
  typedef enum logic [3:0] {
    LOP_NONE   = 4'b0000,
    LOP_ADD    = 4'b0001,
    LOP_SUB    = 4'b0010,
    LOP_MUL    = 4'b0011,
    LOP_DIV    = 4'b0100,
    LOP_MOD    = 4'b0101,
    LOP_ADDA   = 4'b0110,
    LOP_AVE    = 4'b0111,
    LOP_AVER   = 4'b1000,
    LOP_MADD   = 4'b1001,
    LOP_MSUB   = 4'b1010,
    LOP_SUBSUS = 4'b1011,
    LOP_SUBSUU = 4'b1100,
    LOP_ASUB   = 4'b1101
  } lop_e;

  // Execution unit that produces the EX-stage result
  typedef enum logic [3:0] {
    U_NONE, U_VPU, U_DOTP, U_CMP, U_MINMAX, U_SAT, U_SHIFT, U_BIT,
    U_COUNT, U_VECOP, U_SHUF, U_INS, U_MOVE
  } unit_e;

  // Sub-operation inside a unit (meaning depends on the unit)
  typedef logic [3:0] subop_t;

  // cmp_unit
  localparam subop_t CMP_EQ = 4'd0, CMP_LT = 4'd1, CMP_LE = 4'd2;
  // minmax_unit
  localparam subop_t MM_MAX = 4'd0, MM_MIN = 4'd1, MM_MAXA = 4'd2, MM_MINA = 4'd3;
  // shift_unit
  localparam subop_t SH_SLL = 4'd0, SH_SRA = 4'd1, SH_SRL = 4'd2, SH_SRAR = 4'd3, SH_SRLR = 4'd4;
  // bit_unit
  localparam subop_t BT_CLR = 4'd0, BT_SET = 4'd1, BT_NEG = 4'd2, BT_INSL = 4'd3, BT_INSR = 4'd4;
  // count_unit
  localparam subop_t CN_PCNT = 4'd0, CN_NLOC = 4'd1, CN_NLZC = 4'd2;
  // vecop_unit
  localparam subop_t VO_AND = 4'd0, VO_OR = 4'd1, VO_NOR = 4'd2, VO_XOR = 4'd3,
                     VO_BMNZ = 4'd4, VO_BMZ = 4'd5, VO_BSEL = 4'd6;
  // dotp_unit
  localparam subop_t DP_DOTP = 4'd0, DP_DPADD = 4'd1, DP_DPSUB = 4'd2;
  // shuffle_unit
  localparam subop_t SF_SLD = 4'd0, SF_SPLAT = 4'd1, SF_PCKEV = 4'd2, SF_PCKOD = 4'd3,
                     SF_ILVL = 4'd4, SF_ILVR = 4'd5, SF_ILVEV = 4'd6, SF_ILVOD = 4'd7,
                     SF_VSHF = 4'd8, SF_SHF = 4'd9;
  // insert_unit
  localparam subop_t IN_INSERT = 4'd0, IN_INSVE = 4'd1;
  // move path (U_MOVE): result is operand A (MOVE.V), B (LDI) or C (FILL)
  localparam subop_t MV_A = 4'd0, MV_B = 4'd1, MV_C = 4'd2;

  // Where operand B comes from (special unit 2 output select)
  typedef enum logic [2:0] {
    BSRC_VREG,     // wt from the register file
    BSRC_EVEN,     // even elements of wt, widened (horizontal ops, special unit 2)
    BSRC_U5,       // unsigned 5-bit immediate replicated
    BSRC_S5,       // signed 5-bit immediate replicated
    BSRC_I8,       // 8-bit immediate replicated in bytes
    BSRC_S10,      // signed 10-bit immediate replicated (LDI)
    BSRC_M         // bit index m replicated (BIT format)
  } bsrc_e;

  // Branch conditions
  typedef enum logic [1:0] {BR_Z_V, BR_NZ_V, BR_Z_DF, BR_NZ_DF} brc_e;

  // Decoded instruction
  typedef struct packed {
    logic        valid;      // an MSA or MSA branch instruction
    unit_e       unit;
    lop_e        lop;        // 3R lane operation (unit U_VPU)
    subop_t      subop;      // operation inside other units
    logic        sgn;        // signed variant
    logic        sat;        // saturating variant
    df_e         df;
    logic [4:0]  ws, wt, wd;
    logic        rd_a, rd_b, rd_c;   // which register-file ports are used
    logic        a_odd;      // operand A = odd elements widened (special unit 1)
    bsrc_e       bsrc;
    logic        c_gpr;      // operand C = GPR value replicated (special unit 3)
    logic [9:0]  imm;        // immediate (i8, u5, s10, m or n)
    logic        wr_vreg;    // writes wd
    logic        is_load;
    logic        is_store;
    logic        is_copy;    // COPY_S / COPY_U / CFCMSA: result to a GPR
    logic        copy_sgn;
    logic        is_ctc;     // CTCMSA
    logic        is_cfc;     // CFCMSA
    logic        is_branch;
    brc_e        brc;
    logic        uses_gpr;   // needs the core's GPR value (path B)
    logic [4:0]  gpr;        // which GPR the core must read for it
    logic        is_div;     // multi-cycle divider operation
  } dec_t;

  // Number of bits of one element
  function automatic int unsigned df_bits(df_e df);
    return 8 << df;
  endfunction

endpackage
