// msa_soc: the SIMD extension as it attaches to its host: the SIMD
// coprocessor (msa_unit) with the instruction memory and the unaligned data
// memory it shares with the host MIPS32 core.
//
// The host core is not part of this design; its side of every connection is
// a port here. The core fetches from the instruction memory (core_pc and
// core_fetch, one word per cycle, read data one cycle later); that word is
// the instruction in the core's decode stage and is snooped by the SIMD unit.
// The core computes every data address, including those of LD.df/ST.df, and
// presents it in its MEM stage on core_daddr. For an MSA store the data
// memory writes the 16 bytes of the vector; for a scalar store the core's
// own data and byte count. Load data (16 bytes at core_daddr) is returned one
// cycle later on dmem_rdata, to both the core and the SIMD unit.
// The stall, branch and GPR signals are those of msa_unit. The instruction
// memory has a write port (imem_we ...) through which a program is loaded.
// Only the address bits the two 512 KB memories decode are used: core_pc
// bits 18:2 (word address) and core_daddr bits 18:0; the rest of the
// 32-bit core addresses are deliberately ignored (memory aliases).
module msa_soc
  import msa_pkg::*;
#(
  parameter int unsigned IMEM_AW  = 17,   // 128k words = 512 KB
  parameter int unsigned DMEM_AW  = 19,   // 512 KB
  parameter int unsigned DIV_LAT  = 4,
  parameter bit          DIV_SEQ  = 1'b0   // 1: low-area sequential dividers
) (
  input  logic        clk,
  input  logic        rst,
  // fetch (core IF stage)
  input  logic [31:0] core_pc,
  input  logic        core_fetch,
  output logic [31:0] id_instr,
  input  logic        id_valid,
  // program load
  input  logic                 imem_we,
  input  logic [IMEM_AW-1:0]   imem_waddr,
  input  logic [31:0]          imem_wdata,
  // pipeline control
  input  logic        core_stall,
  output logic        msa_stall_id,
  output logic        msa_stall_ex,
  output logic        msa_br_valid,
  output logic        msa_br_taken,
  // GPR paths
  output logic [4:0]  gpr_raddr,
  output logic        gpr_rd,
  input  logic [31:0] gpr_rdata,
  output logic        gpr_we,
  output logic [4:0]  gpr_waddr,
  output logic [31:0] gpr_wdata,
  // data memory, core side (MEM stage)
  input  logic [31:0] core_daddr,
  input  logic        core_drd,
  input  logic [4:0]  core_dwr_bytes,
  input  logic [31:0] core_dwdata,
  output vec_t        dmem_rdata,
  // activity
  output logic        ev_fwd_mem,
  output logic        ev_retire
);
  logic msa_ld, msa_st;
  vec_t msa_wdata;

  instr_memory #(.ADDR_W(IMEM_AW)) u_imem (
    .clk(clk), .rd(core_fetch), .raddr(core_pc[IMEM_AW+1:2]), .instr(id_instr),
    .we(imem_we), .waddr(imem_waddr), .wdata(imem_wdata)
  );

  msa_unit #(.DIV_LAT(DIV_LAT), .DIV_SEQ(DIV_SEQ)) u_msa (
    .clk(clk), .rst(rst),
    .id_instr(id_instr), .id_valid(id_valid),
    .core_stall(core_stall), .stall_id(msa_stall_id), .stall_ex(msa_stall_ex),
    .br_valid(msa_br_valid), .br_taken(msa_br_taken),
    .gpr_raddr(gpr_raddr), .gpr_rd(gpr_rd), .gpr_rdata(gpr_rdata),
    .gpr_we(gpr_we), .gpr_waddr(gpr_waddr), .gpr_wdata(gpr_wdata),
    .mem_ld(msa_ld), .mem_st(msa_st), .mem_wdata(msa_wdata), .mem_rdata(dmem_rdata),
    .ev_fwd_mem(ev_fwd_mem), .ev_retire(ev_retire)
  );

  data_memory #(.ADDR_W(DMEM_AW)) u_dmem (
    .clk(clk), .addr(core_daddr[DMEM_AW-1:0]), .rd(core_drd | msa_ld),
    .wr_bytes(msa_st ? 5'd16 : core_dwr_bytes),
    .wdata(msa_st ? msa_wdata : vec_t'(core_dwdata)),
    .rdata(dmem_rdata)
  );
endmodule
