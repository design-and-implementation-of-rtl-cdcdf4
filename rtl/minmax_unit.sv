// minmax_unit: element-wise MAX_S/U, MIN_S/U (and MAXI/MINI through an
// immediate operand B) and MAX_A/MIN_A, which pick the element of larger or
// smaller absolute value.
//
// For MAX_A the result is a when |a| > |b|, else b; for MIN_A it is a when
// |a| < |b|, else b. The absolute value is taken on W+1 bits so the most
// negative value has the largest magnitude, as the document states. All four
// formats are computed in parallel and df selects one. Combinational.
module minmax_unit
  import msa_pkg::*;
(
  input  vec_t   a,
  input  vec_t   b,
  input  df_e    df,
  input  subop_t op,     // MM_MAX, MM_MIN, MM_MAXA, MM_MINA
  input  logic   sgn,
  output vec_t   y
);
  vec_t r [4];

  for (genvar f = 0; f < 4; f++) begin : g_fmt
    localparam int W = 8 << f;
    localparam int N = 16 >> f;
    always_comb begin
      for (int i = 0; i < N; i++) begin
        logic [W-1:0] ea, eb;
        logic [W:0]   aa, ab;
        logic         lt;
        ea = a[i*W +: W];
        eb = b[i*W +: W];
        lt = sgn ? ($signed(ea) < $signed(eb)) : (ea < eb);
        aa = ea[W-1] ? ({1'b0, ~ea} + 1'b1) : {1'b0, ea};
        ab = eb[W-1] ? ({1'b0, ~eb} + 1'b1) : {1'b0, eb};
        unique case (op)
          MM_MAX:  r[f][i*W +: W] = lt ? eb : ea;
          MM_MIN:  r[f][i*W +: W] = lt ? ea : eb;
          MM_MAXA: r[f][i*W +: W] = (aa > ab) ? ea : eb;
          MM_MINA: r[f][i*W +: W] = (aa < ab) ? ea : eb;
          default: r[f][i*W +: W] = '0;
        endcase
      end
    end
  end

  assign y = r[df];
endmodule
