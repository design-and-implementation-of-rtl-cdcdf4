// sat_unit: SAT_S and SAT_U, saturate each element to an (m+1)-bit range.
//
// SAT_S clips a signed element to [-2^m, 2^m - 1]; SAT_U clips an unsigned
// element to [0, 2^(m+1) - 1]. m is the bit index of the BIT instruction
// format (0 .. element width - 1); at m = width-1 the element is unchanged.
// All formats are computed in parallel and df selects one. Combinational.
module sat_unit
  import msa_pkg::*;
(
  input  vec_t       a,
  input  df_e        df,
  input  logic [5:0] m,
  input  logic       sgn,
  output vec_t       y
);
  vec_t r [4];

  for (genvar f = 0; f < 4; f++) begin : g_fmt
    localparam int W = 8 << f;
    localparam int N = 16 >> f;
    always_comb begin
      logic [W-1:0] mi;
      mi = W'(m) & W'(W - 1);
      for (int i = 0; i < N; i++) begin
        logic [W-1:0] e, hi_s, lo_s, hi_u;
        e = a[i*W +: W];
        // hi_s = 2^m - 1, lo_s = -2^m, hi_u = 2^(m+1) - 1
        hi_s = (W'(1) << mi) - W'(1);
        lo_s = ~hi_s;
        hi_u = (mi == W'(W - 1)) ? '1 : ((W'(1) << (mi + W'(1))) - W'(1));
        if (sgn) begin
          if ($signed(e) > $signed(hi_s))      r[f][i*W +: W] = hi_s;
          else if ($signed(e) < $signed(lo_s)) r[f][i*W +: W] = lo_s;
          else                                 r[f][i*W +: W] = e;
        end else begin
          r[f][i*W +: W] = (e > hi_u) ? hi_u : e;
        end
      end
    end
  end

  assign y = r[df];
endmodule
