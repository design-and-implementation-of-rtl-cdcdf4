// vrf_bank: one copy of the vector register file, a 32 x 128-bit memory with
// one write port and one read port, the shape of an FPGA block memory used in
// simple dual-port mode. Writes happen at the clock edge; the read is
// asynchronous, and a read of the register being written in the same cycle
// returns the new value (write-through), so a result written back in the last
// pipeline stage is seen by the decode stage in that cycle.
module vrf_bank
  import msa_pkg::*;
(
  input  logic       clk,
  input  logic       we,
  input  logic [4:0] waddr,
  input  vec_t       wdata,
  input  logic [4:0] raddr,
  output vec_t       rdata
);
  vec_t mem [NREGS];

  always_ff @(posedge clk)
    if (we) mem[waddr] <= wdata;

  assign rdata = (we && waddr == raddr) ? wdata : mem[raddr];
endmodule
