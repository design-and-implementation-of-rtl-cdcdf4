// tb_instr_memory: self-checking testbench for instr_memory. Words written through the load port are read back one cycle after the address; with rd low the output holds. Uses the full 128k-word size.
`include "tb_common.svh"
module tb_instr_memory;
  import msa_pkg::*;
  import msa_ref_pkg::*;
  `TB_COUNTERS
  logic clk = 0;
  always #5 clk = ~clk;
  `TB_WATCHDOG(clk, 400000)
  logic rd, we; logic [16:0] raddr, waddr; logic [31:0] instr, wdata;
  logic [31:0] model [int];
  instr_memory dut (.clk(clk), .rd(rd), .raddr(raddr), .instr(instr), .we(we), .waddr(waddr), .wdata(wdata));
  initial begin
    rd = 0; we = 0; raddr = 0; waddr = 0; wdata = 0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      we = 1; waddr = (i < 1500) ? 17'(i) : 17'($urandom); wdata = $urandom;
      model[int'(waddr)] = wdata;
    end
    @(negedge clk); we = 0;
    for (int t = 0; t < 6000; t++) begin
      logic [31:0] prev, e;
      @(negedge clk);
      prev = instr;
      rd = $urandom_range(0, 3) != 0; raddr = (t % 2 == 0) ? 17'($urandom_range(0, 1499)) : 17'($urandom);
      e = model.exists(int'(raddr)) ? model[int'(raddr)] : 32'd0;
      `CHECK(instr == prev, "output changes only at the clock")
      @(negedge clk);
      `CHECK(instr == (rd ? e : prev), $sformatf("read @%h got %h", raddr, instr))
      rd = 0;
    end
    `TB_FINISH
  end
endmodule
