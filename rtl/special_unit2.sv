// special_unit2: produces operand B of the execution units.
//
// It either passes wt, widens the even elements of wt to format df (as
// special_unit1 does with the odd ones), or builds an immediate vector:
//   BSRC_U5   5-bit immediate, zero-extended, in every element of format df
//   BSRC_S5   5-bit immediate, sign-extended, in every element
//   BSRC_I8   8-bit immediate in every byte (I8 instructions are .B only)
//   BSRC_S10  10-bit immediate, sign-extended, in every element (LDI)
//   BSRC_M    bit index m of the BIT format in every element
// Combinational.
module special_unit2
  import msa_pkg::*;
(
  input  vec_t       b,
  input  df_e        df,
  input  logic       sgn,
  input  bsrc_e      sel,
  input  logic [9:0] imm,
  output vec_t       y
);
  vec_t ev [4];
  vec_t im [4];
  assign ev[0] = b;

  for (genvar f = 1; f < 4; f++) begin : g_even
    localparam int W = 8 << f;
    localparam int H = W / 2;
    localparam int N = 16 >> f;
    always_comb
      for (int i = 0; i < N; i++) begin
        logic [H-1:0] h;
        h = b[(2*i)*H +: H];
        ev[f][i*W +: W] = sgn ? W'($signed(h)) : W'(h);
      end
  end

  for (genvar f = 0; f < 4; f++) begin : g_imm
    localparam int W = 8 << f;
    localparam int N = 16 >> f;
    always_comb begin
      logic [W-1:0] v;
      unique case (sel)
        BSRC_U5:  v = W'(imm[4:0]);
        BSRC_S5:  v = W'($signed(imm[4:0]));
        BSRC_S10: v = W'($signed(imm[9:0]));
        BSRC_M:   v = W'(imm[5:0]);
        default:  v = '0;
      endcase
      for (int i = 0; i < N; i++) im[f][i*W +: W] = v;
    end
  end

  always_comb begin
    unique case (sel)
      BSRC_VREG: y = b;
      BSRC_EVEN: y = ev[df];
      BSRC_I8:   y = {16{imm[7:0]}};
      default:   y = im[df];
    endcase
  end
endmodule
