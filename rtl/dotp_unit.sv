// dotp_unit: DOTP_S/U, DPADD_S/U and DPSUB_S/U for halfword, word and
// doubleword destination formats.
//
// Each result element i of width W is a[2i]*b[2i] + a[2i+1]*b[2i+1] with
// half-width source elements, sign- or zero-extended to W. DPADD adds the
// products to element i of c (old wd), DPSUB subtracts them from it. The
// product of two half-width values fits in W bits, so nothing is lost but
// the carry of the final sum. A byte destination is not defined and gives 0.
// Combinational.
module dotp_unit
  import msa_pkg::*;
(
  input  vec_t   a,
  input  vec_t   b,
  input  vec_t   c,
  input  df_e    df,
  input  subop_t op,     // DP_DOTP, DP_DPADD, DP_DPSUB
  input  logic   sgn,
  output vec_t   y
);
  vec_t r [4];
  assign r[0] = '0;

  for (genvar f = 1; f < 4; f++) begin : g_fmt
    localparam int W = 8 << f;
    localparam int H = W / 2;
    localparam int N = 16 >> f;
    always_comb
      for (int i = 0; i < N; i++) begin
        logic [W-1:0] a0, a1, b0, b1, p, e;
        a0 = sgn ? W'($signed(a[(2*i)*H   +: H])) : W'(a[(2*i)*H   +: H]);
        a1 = sgn ? W'($signed(a[(2*i+1)*H +: H])) : W'(a[(2*i+1)*H +: H]);
        b0 = sgn ? W'($signed(b[(2*i)*H   +: H])) : W'(b[(2*i)*H   +: H]);
        b1 = sgn ? W'($signed(b[(2*i+1)*H +: H])) : W'(b[(2*i+1)*H +: H]);
        p  = a0 * b0 + a1 * b1;
        e  = c[i*W +: W];
        unique case (op)
          DP_DPADD: r[f][i*W +: W] = e + p;
          DP_DPSUB: r[f][i*W +: W] = e - p;
          default:  r[f][i*W +: W] = p;
        endcase
      end
  end

  assign y = r[df];
endmodule
