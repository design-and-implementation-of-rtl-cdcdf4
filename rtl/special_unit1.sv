// special_unit1: widens the odd elements of operand A to the next format.
//
// For a destination format df (halfword, word or doubleword) each result
// element i is the odd half-width element 2i+1 of a, sign-extended when sgn
// is set and zero-extended otherwise (byte->halfword, halfword->word,
// word->doubleword). When widen is low, or df is byte, a passes unchanged.
// It feeds the horizontal add/subtract instructions of the 3R lanes.
// Combinational.
module special_unit1
  import msa_pkg::*;
(
  input  vec_t a,
  input  df_e  df,
  input  logic sgn,
  input  logic widen,
  output vec_t y
);
  vec_t r [4];
  assign r[0] = a;

  for (genvar f = 1; f < 4; f++) begin : g_fmt
    localparam int W = 8 << f;
    localparam int H = W / 2;
    localparam int N = 16 >> f;
    always_comb
      for (int i = 0; i < N; i++) begin
        logic [H-1:0] h;
        h = a[(2*i+1)*H +: H];
        r[f][i*W +: W] = sgn ? W'($signed(h)) : W'(h);
      end
  end

  assign y = widen ? r[df] : a;
endmodule
