// bit_unit: element-wise BCLR, BSET, BNEG, BINSL and BINSR (immediate forms
// through an operand B built by special unit 2).
//
// BCLR/BSET/BNEG clear, set or invert bit (b mod W) of each element of a.
// BINSL copies the (b mod W)+1 most significant bits of each element of a
// into the element of c (the destination register's old value) and keeps the
// rest of c; BINSR does the same with the least significant bits. All formats
// are computed in parallel and df selects one. Combinational.
module bit_unit
  import msa_pkg::*;
(
  input  vec_t   a,      // ws
  input  vec_t   b,      // wt or bit-index vector
  input  vec_t   c,      // wd (old destination value)
  input  df_e    df,
  input  subop_t op,     // BT_CLR, BT_SET, BT_NEG, BT_INSL, BT_INSR
  output vec_t   y
);
  vec_t r [4];

  for (genvar f = 0; f < 4; f++) begin : g_fmt
    localparam int W  = 8 << f;
    localparam int N  = 16 >> f;
    localparam int LW = $clog2(W);
    always_comb begin
      for (int i = 0; i < N; i++) begin
        logic [W-1:0]  ea, ec, one, mr, ml;
        logic [LW-1:0] s;
        ea  = a[i*W +: W];
        ec  = c[i*W +: W];
        s   = b[i*W +: LW];
        one = W'(1) << s;
        // mr: s+1 low bits set; ml: s+1 high bits set
        mr  = (one << 1) - W'(1);
        if (s == LW'(W - 1)) mr = '1;
        ml  = ~({W{1'b1}} >> (W'(s) + W'(1)));
        if (s == LW'(W - 1)) ml = '1;
        unique case (op)
          BT_CLR:  r[f][i*W +: W] = ea & ~one;
          BT_SET:  r[f][i*W +: W] = ea | one;
          BT_NEG:  r[f][i*W +: W] = ea ^ one;
          BT_INSL: r[f][i*W +: W] = (ea & ml) | (ec & ~ml);
          BT_INSR: r[f][i*W +: W] = (ea & mr) | (ec & ~mr);
          default: r[f][i*W +: W] = '0;
        endcase
      end
    end
  end

  assign y = r[df];
endmodule
