// karatsuba_mul: unsigned W x W -> 2W multiplier.
//
// Up to DIRECT_MAX bits (byte and halfword) the product is one hardware
// multiplier, the size an FPGA DSP block handles directly. Wider operands
// (word, doubleword) use one level of the Karatsuba algorithm: with
// a = f1*2^H + f0 and b = g1*2^H + g0 (H = W/2),
//   h2 = f1*g1,  h0 = f0*g0,  h1 = (f1+f0)*(g1+g0) - h2 - h0
//   a*b = h2*2^W + h1*2^H + h0      (the "overlap" addition)
// which needs three half-width products instead of four. The split and the
// three products follow the document; using a single level is this design's
// choice. Combinational.
module karatsuba_mul #(
  parameter int unsigned W          = 32,
  parameter int unsigned DIRECT_MAX = 16
) (
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic [2*W-1:0] p
);
  if (W <= DIRECT_MAX) begin : g_direct
    assign p = (2*W)'(a) * (2*W)'(b);
  end else begin : g_kara
    localparam int unsigned H = W / 2;
    logic [H-1:0]   f1, f0, g1, g0;
    logic [H:0]     fs, gs;
    logic [2*H-1:0] h2, h0;
    logic [2*H+1:0] hm;
    logic [2*W-1:0] h1;
    assign {f1, f0} = a;
    assign {g1, g0} = b;
    assign fs = {1'b0, f1} + {1'b0, f0};
    assign gs = {1'b0, g1} + {1'b0, g0};
    assign h2 = (2*H)'(f1) * (2*H)'(g1);
    assign h0 = (2*H)'(f0) * (2*H)'(g0);
    assign hm = (2*H+2)'(fs) * (2*H+2)'(gs);
    assign h1 = (2*W)'(hm) - (2*W)'(h2) - (2*W)'(h0);
    assign p  = ((2*W)'(h2) << W) + (h1 << H) + (2*W)'(h0);
  end
endmodule
