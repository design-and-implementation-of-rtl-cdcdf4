// tb_data_memory: self-checking testbench for data_memory. Random aligned and unaligned reads of 16 bytes and writes of 1, 2, 4, 8 and 16 bytes, including accesses that wrap past the top of memory, against a byte-array model. Reads must return data one cycle after the address.
`include "tb_common.svh"
module tb_data_memory;
  import msa_pkg::*;
  import msa_ref_pkg::*;
  `TB_COUNTERS
  logic clk = 0;
  always #5 clk = ~clk;
  `TB_WATCHDOG(clk, 400000)
  localparam int AW = 12;
  logic [AW-1:0] addr; logic rd; logic [4:0] wr_bytes; vec_t wdata, rdata;
  logic [7:0] model [2**AW];
  int n_unal_rd, n_unal_wr;
  data_memory #(.ADDR_W(AW)) dut (.clk(clk), .addr(addr), .rd(rd), .wr_bytes(wr_bytes),
                                  .wdata(wdata), .rdata(rdata));
  initial begin
    logic [4:0] sizes [5] = '{1, 2, 4, 8, 16};
    for (int i = 0; i < 2**AW; i++) model[i] = '0;
    addr = '0; rd = 0; wr_bytes = 0; wdata = '0;
    for (int t = 0; t < 20000; t++) begin
      vec_t e; logic [AW-1:0] a;
      @(negedge clk);
      a = AW'($urandom_range(0, 300));
      if (t % 10 == 0) a = AW'(2**AW - $urandom_range(1, 15));
      addr = a; wdata = rand128();
      rd = $urandom_range(0, 1); wr_bytes = ($urandom_range(0, 1) == 1) ? sizes[$urandom_range(0, 4)] : 0;
      if (rd) for (int k = 0; k < 16; k++) e[k*8 +: 8] = model[AW'(a + k)];
      if (a[3:0] != 0 && rd) n_unal_rd++;
      if (a[3:0] != 0 && wr_bytes != 0) n_unal_wr++;
      @(posedge clk);
      for (int k = 0; k < 16; k++) if (k < wr_bytes) model[AW'(a + k)] = wdata[k*8 +: 8];
      if (rd) begin
        @(negedge clk);
        rd = 0; wr_bytes = 0;
        `CHECK(rdata == e, $sformatf("read @%h got %h exp %h", a, rdata, e))
      end
    end
    `CHECK(n_unal_rd > 1000 && n_unal_wr > 1000, "unaligned accesses exercised")
    `TB_FINISH
  end
endmodule
