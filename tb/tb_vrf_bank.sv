// tb_vrf_bank: self-checking testbench for vrf_bank, one 32 x 128-bit
// one-write one-read copy of the vector register file. Random writes and
// reads are compared with a model; a read of the register being written in
// the same cycle must return the new data (write-through).
`include "tb_common.svh"
module tb_vrf_bank;
  import msa_pkg::*;
  import msa_ref_pkg::*;
  `TB_COUNTERS
  logic clk = 0;
  always #5 clk = ~clk;
  `TB_WATCHDOG(clk, 100000)
  logic we; logic [4:0] waddr, raddr; vec_t wdata, rdata;
  vec_t model [32];
  vrf_bank dut (.clk(clk), .we(we), .waddr(waddr), .wdata(wdata), .raddr(raddr), .rdata(rdata));
  initial begin
    we = 0; waddr = 0; raddr = 0; wdata = '0;
    for (int i = 0; i < 32; i++) begin
      @(negedge clk); we = 1; waddr = 5'(i); wdata = rand128(); model[i] = wdata;
    end
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      we = $urandom_range(0, 1); waddr = 5'($urandom); wdata = rand128();
      raddr = (t % 3 == 0) ? waddr : 5'($urandom);
      #1;
      `CHECK(rdata == ((we && waddr == raddr) ? wdata : model[raddr]), $sformatf("read v%0d", raddr))
      @(posedge clk);
      if (we) model[waddr] = wdata;
    end
    `TB_FINISH
  end
endmodule
