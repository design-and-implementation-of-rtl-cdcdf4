// branch_unit: condition of the MSA branches BZ.V, BNZ.V, BZ.df, BNZ.df.
//
//   BZ.V    taken when all 128 bits of wt are zero
//   BNZ.V   taken when at least one bit is set
//   BZ.df   taken when at least one element of format df is zero
//   BNZ.df  taken when every element of format df is non-zero
// One zero detector per element and format feeds an AND/OR tree, as in the
// per-format branch detection circuits of the document. The result is the
// "MSA jump" signal sent to the core, which computes the target from s16.
// Combinational.
module branch_unit
  import msa_pkg::*;
(
  input  vec_t  v,       // wt
  input  df_e   df,
  input  brc_e  cond,
  output logic  taken
);
  logic any_zero [4];

  for (genvar f = 0; f < 4; f++) begin : g_fmt
    localparam int W = 8 << f;
    localparam int N = 16 >> f;
    always_comb begin
      any_zero[f] = 1'b0;
      for (int i = 0; i < N; i++) any_zero[f] |= (v[i*W +: W] == '0);
    end
  end

  always_comb begin
    unique case (cond)
      BR_Z_V:   taken = (v == '0);
      BR_NZ_V:  taken = (v != '0);
      BR_Z_DF:  taken = any_zero[df];
      BR_NZ_DF: taken = !any_zero[df];
    endcase
  end
endmodule
