// count_unit: PCNT (population count) and NLOC/NLZC (leading ones / leading
// zeros count) for all four element formats.
//
// As in the document, the unit is built from sixteen byte counters. A byte
// population count is summed pairwise into halfword, word and doubleword
// counts. A byte leading-zero count is combined pairwise: the count of a
// double-width element is the upper half's count, plus the lower half's count
// when the upper half is all zero. Leading ones are counted by inverting the
// input. df selects the format of the result. Combinational.
module count_unit
  import msa_pkg::*;
(
  input  vec_t   a,
  input  df_e    df,
  input  subop_t op,     // CN_PCNT, CN_NLOC, CN_NLZC
  output vec_t   y
);
  vec_t       x;
  logic [3:0] pc_b [16];  // byte population counts (0..8)
  logic [3:0] lz_b [16];  // byte leading-zero counts (0..8)
  logic [4:0] pc_h [8],  lz_h [8];
  logic [5:0] pc_w [4],  lz_w [4];
  logic [6:0] pc_d [2],  lz_d [2];
  vec_t       r [4];

  assign x = (op == CN_NLOC) ? ~a : a;

  always_comb begin
    for (int i = 0; i < 16; i++) begin
      pc_b[i] = '0;
      for (int k = 0; k < 8; k++) pc_b[i] += 4'(x[i*8 + k]);
      lz_b[i] = 4'd8;
      for (int k = 0; k < 8; k++) if (x[i*8 + k]) lz_b[i] = 4'(7 - k);
    end
    for (int i = 0; i < 8; i++) begin
      pc_h[i] = 5'(pc_b[2*i]) + 5'(pc_b[2*i+1]);
      lz_h[i] = (lz_b[2*i+1] == 4'd8) ? 5'd8 + 5'(lz_b[2*i]) : 5'(lz_b[2*i+1]);
    end
    for (int i = 0; i < 4; i++) begin
      pc_w[i] = 6'(pc_h[2*i]) + 6'(pc_h[2*i+1]);
      lz_w[i] = (lz_h[2*i+1] == 5'd16) ? 6'd16 + 6'(lz_h[2*i]) : 6'(lz_h[2*i+1]);
    end
    for (int i = 0; i < 2; i++) begin
      pc_d[i] = 7'(pc_w[2*i]) + 7'(pc_w[2*i+1]);
      lz_d[i] = (lz_w[2*i+1] == 6'd32) ? 7'd32 + 7'(lz_w[2*i]) : 7'(lz_w[2*i+1]);
    end
    r = '{default: '0};
    for (int i = 0; i < 16; i++) r[0][i*8  +: 8]  = 8'((op == CN_PCNT) ? pc_b[i] : lz_b[i]);
    for (int i = 0; i < 8;  i++) r[1][i*16 +: 16] = 16'((op == CN_PCNT) ? pc_h[i] : lz_h[i]);
    for (int i = 0; i < 4;  i++) r[2][i*32 +: 32] = 32'((op == CN_PCNT) ? pc_w[i] : lz_w[i]);
    for (int i = 0; i < 2;  i++) r[3][i*64 +: 64] = 64'((op == CN_PCNT) ? pc_d[i] : lz_d[i]);
  end

  assign y = r[df];
endmodule
