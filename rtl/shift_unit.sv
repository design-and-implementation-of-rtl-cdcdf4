// shift_unit: element-wise SLL, SRA, SRL, SRAR and SRLR (immediate forms
// through an operand B built by special unit 2).
//
// Each element of a is shifted by the matching element of b modulo the
// element width. The rounding forms add the most significant bit shifted out
// (bit s-1 of the original element) to the shifted value; a shift of 0 does
// not round. All formats are computed in parallel and df selects one.
// Combinational.
module shift_unit
  import msa_pkg::*;
(
  input  vec_t   a,
  input  vec_t   b,
  input  df_e    df,
  input  subop_t op,     // SH_SLL, SH_SRA, SH_SRL, SH_SRAR, SH_SRLR
  output vec_t   y
);
  vec_t r [4];

  for (genvar f = 0; f < 4; f++) begin : g_fmt
    localparam int W  = 8 << f;
    localparam int N  = 16 >> f;
    localparam int LW = $clog2(W);
    always_comb begin
      for (int i = 0; i < N; i++) begin
        logic [W-1:0]  e, res;
        logic [LW-1:0] s;
        logic          rb;
        e  = a[i*W +: W];
        s  = b[i*W +: LW];
        rb = (s != '0) ? e[s - 1'b1] : 1'b0;
        unique case (op)
          SH_SLL:  res = e << s;
          SH_SRA:  res = W'($signed(e) >>> s);
          SH_SRL:  res = e >> s;
          SH_SRAR: res = W'($signed(e) >>> s) + W'(rb);
          SH_SRLR: res = (e >> s) + W'(rb);
          default: res = '0;
        endcase
        r[f][i*W +: W] = res;
      end
    end
  end

  assign y = r[df];
endmodule
