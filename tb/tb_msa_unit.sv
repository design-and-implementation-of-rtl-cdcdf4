// tb_msa_unit: directed pipeline-timing testbench for msa_unit.
//
// The testbench plays the core: it presents one instruction at a time in
// ID, supplies GPR values, returns load data one cycle after mem_ld and
// captures stores and GPR writes. It checks the exact number of stall
// cycles for each hazard (EX-stage producer: 1, load-use: 2, divide: 4
// with DIV_LAT = 4), that the MEM->ID forwarding event fires when expected,
// branch decisions in ID with a forwarded operand, that core_stall freezes
// the pipeline, the CTCMSA/CFCMSA control register path, stores, and the
// final register file contents against the reference model.
`include "tb_common.svh"
module tb_msa_unit;
  import msa_pkg::*;
  import msa_ref_pkg::*;
  `TB_COUNTERS
  logic clk = 0;
  always #5 clk = ~clk;
  `TB_WATCHDOG(clk, 5000)

  logic        rst, id_valid, core_stall;
  logic [31:0] id_instr;
  logic        stall_id, stall_ex, br_valid, br_taken;
  logic [4:0]  gpr_raddr, gpr_waddr;
  logic        gpr_rd, gpr_we;
  logic [31:0] gpr_rdata, gpr_wdata;
  logic        mem_ld, mem_st;
  vec_t        mem_wdata, mem_rdata;
  logic        ev_fwd_mem, ev_retire;

  msa_unit #(.DIV_LAT(4)) dut (.*);

  logic [31:0] gregs [32];
  vec_t        loadval, stored;
  int          n_st;
  assign gpr_rdata = gregs[gpr_raddr];
  always @(posedge clk) begin
    if (gpr_we) gregs[gpr_waddr] <= gpr_wdata;
    if (mem_ld) mem_rdata <= loadval;
    if (mem_st) begin stored <= mem_wdata; n_st <= n_st + 1; end
  end

  int  stalls; logic fwd, brv, brt;
  task automatic issue(logic [31:0] w);
    id_instr = w; id_valid = 1; stalls = 0;
    #1;
    while (stall_id || stall_ex) begin stalls++; @(negedge clk); #1; end
    fwd = ev_fwd_mem; brv = br_valid; brt = br_taken;
    @(negedge clk);
    id_valid = 0; id_instr = 0;
  endtask
  task automatic nops(int n);
    repeat (n) @(negedge clk);
  endtask

  function automatic vec_t rf(int r); return dut.u_vrf.u_bank_a.mem[r]; endfunction

  initial begin
    vec_t w1, w2, w3, w4, w5, w6, w7, w8, w9;
    rst = 1; id_valid = 0; id_instr = 0; core_stall = 0; mem_rdata = '0; n_st = 0;
    for (int i = 0; i < 32; i++) gregs[i] = 32'(i * 3);
    gregs[13] = 32'hA5A5_0013;
    loadval = rand128();
    repeat (34) @(negedge clk);
    rst = 0;
    w1 = splat(2, 5); w2 = splat(2, 7);
    // a) EX-stage producer: one stall, then forwarding from MEM
    issue(eldi(2, 5, 1));  `CHECK(stalls == 0, "LDI no stall")
    issue(eldi(2, 7, 2));  `CHECK(stalls == 0, "LDI no stall")
    issue(e3r(6'h0E, 0, 2, 2, 1, 3));
    `CHECK(stalls == 1, $sformatf("EX hazard stalls %0d", stalls))
    `CHECK(fwd, "forwarded from MEM")
    w3 = vec("ADDV", 2, w1, w2, 0);
    // b) producer long gone: no stall, no forwarding
    nops(3);
    issue(e3r(6'h0E, 0, 2, 3, 3, 4));
    `CHECK(stalls == 0 && !fwd, "no hazard")
    w4 = vec("ADDV", 2, w3, w3, 0);
    // c) distance two: forwarded without stall
    issue(e3r(6'h12, 0, 2, 1, 4, 5));
    nops(1);
    issue(e3r(6'h0E, 0, 2, 0, 5, 6));
    `CHECK(stalls == 0 && fwd, "distance-two forwarding")
    w5 = vec("MULV", 2, w4, w1, 0);
    w6 = w5;
    // d) divide holds EX for DIV_LAT cycles
    issue(e3r(6'h12, 5, 2, 1, 6, 7));
    issue(32'd0);
    `CHECK(stalls == 4, $sformatf("divide stall cycles %0d", stalls))
    w7 = vec("DIV_U", 2, w6, w1, 0);
    // e) load-use: two stalls
    issue(emi10(1, 2, 0, 1, 8));
    issue(e3r(6'h0E, 0, 2, 1, 8, 9));
    `CHECK(stalls == 2, $sformatf("load-use stalls %0d", stalls))
    w8 = loadval; w9 = vec("ADDV", 2, w8, w1, 0);
    // f) COPY to a GPR
    issue(eelm(3, 2, 2, 9, 10));
    nops(4);
    `CHECK(gregs[10] == 32'(get(w9, 2, 2)), $sformatf("COPY_U r10 = %h", gregs[10]))
    // g) branches decided in ID, operand forwarded
    issue(ebr(8'h0F, 9, 4));  `CHECK(brv && brt, "BNZ.V taken")
    issue(ebr(8'h0B, 9, 4));  `CHECK(brv && !brt, "BZ.V not taken")
    issue(eldi(0, 0, 11));
    issue(ebr(8'h0B, 11, 4));
    `CHECK(stalls == 1 && brv && brt, "BZ.V after producer: stall then taken")
    // h) core_stall freezes everything
    issue(e3r(6'h0E, 0, 2, 2, 1, 12));
    core_stall = 1;
    repeat (3) begin
      #1; `CHECK(!ev_retire && !gpr_we, "frozen")
      @(negedge clk);
    end
    core_stall = 0;
    nops(4);
    `CHECK(rf(12) == w3, "result after core stall")
    // i) control registers
    issue(ectl(0, 13, 1));
    issue(ectl(1, 1, 14));
    issue(ectl(1, 0, 15));
    nops(4);
    `CHECK(gregs[14] == 32'hA5A5_0013 && gregs[15] == 32'h100, "CTCMSA / CFCMSA")
    // j) store data and k) FILL from a GPR
    issue(emi10(0, 2, 0, 1, 3));
    issue(e2r(0, 2, 13, 16));
    nops(4);
    `CHECK(n_st == 1 && stored == w3, $sformatf("store data n=%0d %h vs %h", n_st, stored, w3))
    `CHECK(rf(16) == splat(2, 32'hA5A5_0013), "FILL.W")
    `CHECK(rf(1) == w1 && rf(2) == w2 && rf(3) == w3 && rf(4) == w4 && rf(5) == w5 && rf(6) == w6 &&
           rf(7) == w7 && rf(8) == w8 && rf(9) == w9 && rf(11) == '0, "register file contents")
    `TB_FINISH
  end
endmodule
