// mul_lane: multiplier lane for one element of W bits, with fused
// multiply-add and multiply-subtract.
//   MUL:  y = a*b        (low W bits; the upper half of the product is dropped)
//   MADD: y = c + a*b
//   MSUB: y = c - a*b
// The low half of a product does not depend on signedness, so one unsigned
// multiplier (karatsuba_mul) serves signed and unsigned data. Combinational.
module mul_lane
  import msa_pkg::*;
#(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  input  lop_e         op,
  output logic [W-1:0] y
);
  logic [2*W-1:0] p;
  logic [W-1:0]   pl;

  karatsuba_mul #(.W(W)) u_mul (.a(a), .b(b), .p(p));
  assign pl = p[W-1:0];

  always_comb begin
    unique case (op)
      LOP_MADD: y = c + pl;
      LOP_MSUB: y = c - pl;
      default:  y = pl;
    endcase
  end
endmodule
