// tb_karatsuba_mul: self-checking testbench for karatsuba_mul. Full products of the Karatsuba multiplier at 8, 32 and 64 bits are compared with plain multiplication, including the document's worked example 197 x 114.
`include "tb_common.svh"
module tb_karatsuba_mul;
  import msa_pkg::*;
  import msa_ref_pkg::*;
  `TB_COUNTERS
  logic clk = 0;
  always #5 clk = ~clk;
  `TB_WATCHDOG(clk, 200000)
  logic [7:0]  a8,  b8;  logic [15:0]  p8;
  logic [31:0] a32, b32; logic [63:0]  p32;
  logic [63:0] a64, b64; logic [127:0] p64;
  karatsuba_mul #(.W(8))  d8  (.a(a8),  .b(b8),  .p(p8));
  karatsuba_mul #(.W(32)) d32 (.a(a32), .b(b32), .p(p32));
  karatsuba_mul #(.W(64)) d64 (.a(a64), .b(b64), .p(p64));
  karatsuba_mul #(.W(8), .DIRECT_MAX(4)) d8k (.a(a8), .b(b8), .p());
  logic [15:0] p8k;
  assign p8k = d8k.p;
  initial begin
    a8 = 8'd197; b8 = 8'd114; #1;
    `CHECK(p8 == 16'd22458 && p8k == 16'd22458, $sformatf("197*114 = %0d / %0d", p8, p8k))
    for (int t = 0; t < 3000; t++) begin
      v128 r;
      r = rand_elem(3);
      a8 = r[7:0]; b8 = r[15:8]; a32 = r[31:0]; b32 = r[63:32]; a64 = r[63:0]; b64 = r[127:64];
      #1;
      `CHECK(p8 == 16'(a8) * 16'(b8) && p8k == 16'(a8) * 16'(b8), $sformatf("w8 %h*%h=%h", a8, b8, p8k))
      `CHECK(p32 == 64'(a32) * 64'(b32), $sformatf("w32 %h*%h=%h", a32, b32, p32))
      `CHECK(p64 == 128'(a64) * 128'(b64), $sformatf("w64 %h*%h=%h", a64, b64, p64))
    end
    `TB_FINISH
  end
endmodule
