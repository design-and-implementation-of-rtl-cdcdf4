// msa_vrf: the MSA vector register file, 32 registers of 128 bits with three
// read ports (A = ws, B = wt, C = wd) and one write port.
//
// As in the document, the three read ports come from three identical 1R1W
// memories whose write ports are wired in parallel, so each copy holds every
// value written; each copy serves one read port. Timing is that of vrf_bank:
// synchronous write, asynchronous read with write-through. Register contents
// are cleared by writing zeros during reset (one register per cycle) when
// CLEAR_ON_RESET is set, so that nothing read is ever uninitialised.
module msa_vrf
  import msa_pkg::*;
#(
  parameter bit CLEAR_ON_RESET = 1'b1
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [4:0] ra, rb, rc,
  output vec_t       da, db, dc,
  input  logic       we,
  input  logic [4:0] wa,
  input  vec_t       wd
);
  logic [4:0] clr_addr;
  logic       we_i;
  logic [4:0] wa_i;
  vec_t       wd_i;

  always_ff @(posedge clk)
    if (rst) clr_addr <= clr_addr + 5'd1;
    else     clr_addr <= '0;

  assign we_i = we || (CLEAR_ON_RESET && rst);
  assign wa_i = rst ? clr_addr : wa;
  assign wd_i = rst ? '0 : wd;

  vrf_bank u_bank_a (.clk(clk), .we(we_i), .waddr(wa_i), .wdata(wd_i), .raddr(ra), .rdata(da));
  vrf_bank u_bank_b (.clk(clk), .we(we_i), .waddr(wa_i), .wdata(wd_i), .raddr(rb), .rdata(db));
  vrf_bank u_bank_c (.clk(clk), .we(we_i), .waddr(wa_i), .wdata(wd_i), .raddr(rc), .rdata(dc));
endmodule
