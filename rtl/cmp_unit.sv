// cmp_unit: element-wise vector compares CEQ, CLT_S/U and CLE_S/U (and their
// immediate forms, whose operand B is built by special unit 2).
//
// Every element of the result is all ones when the compare holds and all zeros
// otherwise. All four element formats are computed in parallel and the data
// format df selects one of them, as the document's format-join circuit does.
// Purely combinational. The per-format structure follows the document; the
// compare itself is written as plain relational operators.
module cmp_unit
  import msa_pkg::*;
(
  input  vec_t   a,      // ws
  input  vec_t   b,      // wt or immediate vector
  input  df_e    df,
  input  subop_t op,     // CMP_EQ, CMP_LT, CMP_LE
  input  logic   sgn,    // signed compare
  output vec_t   y
);
  vec_t r [4];

  for (genvar f = 0; f < 4; f++) begin : g_fmt
    localparam int W = 8 << f;
    localparam int N = 16 >> f;
    always_comb begin
      for (int i = 0; i < N; i++) begin
        logic [W-1:0] ea, eb;
        logic         lt, eq;
        ea = a[i*W +: W];
        eb = b[i*W +: W];
        eq = (ea == eb);
        lt = sgn ? ($signed(ea) < $signed(eb)) : (ea < eb);
        unique case (op)
          CMP_EQ:  r[f][i*W +: W] = {W{eq}};
          CMP_LT:  r[f][i*W +: W] = {W{lt}};
          CMP_LE:  r[f][i*W +: W] = {W{lt | eq}};
          default: r[f][i*W +: W] = '0;
        endcase
      end
    end
  end

  assign y = r[df];
endmodule
