// tb_msa_vrf: self-checking testbench for msa_vrf. The register file must be all zero after reset; then random writes and three random reads per cycle are compared with a model, including reads of the register being written in the same cycle (write-through).
`include "tb_common.svh"
module tb_msa_vrf;
  import msa_pkg::*;
  import msa_ref_pkg::*;
  `TB_COUNTERS
  logic clk = 0;
  always #5 clk = ~clk;
  `TB_WATCHDOG(clk, 400000)
  logic rst, we; logic [4:0] ra, rb, rc, wa; vec_t da, db, dc, wd;
  vec_t model [32];
  int wt_seen;
  msa_vrf dut (.clk(clk), .rst(rst), .ra(ra), .rb(rb), .rc(rc), .da(da), .db(db), .dc(dc),
               .we(we), .wa(wa), .wd(wd));
  initial begin
    rst = 1; we = 0; {ra, rb, rc, wa} = '0; wd = '0;
    // put garbage in first so the clearing is visible
    rst = 0;
    for (int i = 0; i < 32; i++) begin @(negedge clk); we = 1; wa = 5'(i); wd = rand128(); end
    @(negedge clk); we = 0; rst = 1;
    repeat (34) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 32; i++) begin
      ra = 5'(i); #1;
      `CHECK(da == '0, $sformatf("v%0d not cleared", i))
      model[i] = '0;
    end
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk);
      we = ($urandom_range(0, 2) != 0); wa = 5'($urandom); wd = rand128();
      ra = 5'($urandom); rb = 5'($urandom); rc = 5'($urandom);
      if (t % 4 == 0) ra = wa;
      #1;
      `CHECK(da == ((we && wa == ra) ? wd : model[ra]), $sformatf("port a v%0d", ra))
      `CHECK(db == ((we && wa == rb) ? wd : model[rb]), $sformatf("port b v%0d", rb))
      `CHECK(dc == ((we && wa == rc) ? wd : model[rc]), $sformatf("port c v%0d", rc))
      if (we && wa == ra) wt_seen++;
      @(posedge clk);
      if (we) model[wa] = wd;
    end
    `CHECK(wt_seen > 100, "write-through exercised")
    `TB_FINISH
  end
endmodule
