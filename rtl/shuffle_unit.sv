// shuffle_unit: element permutations PCKEV, PCKOD, ILVL, ILVR, ILVEV, ILVOD,
// VSHF, SLD, SPLAT and SHF for all four data formats.
//
// a is ws, b is wt, c is the old wd. With N elements of width W:
//   PCKEV  y[i] = b[2i], y[N/2+i] = a[2i]          (i < N/2)
//   PCKOD  y[i] = b[2i+1], y[N/2+i] = a[2i+1]
//   ILVL   y[2i] = b[N/2+i], y[2i+1] = a[N/2+i]
//   ILVR   y[2i] = b[i],     y[2i+1] = a[i]
//   ILVEV  y[2i] = b[2i],    y[2i+1] = a[2i]
//   ILVOD  y[2i] = b[2i+1],  y[2i+1] = a[2i+1]
//   VSHF   k = c[i]; y[i] = 0 if bit 6 or 7 of k is set, else element
//          (k mod 2N) of the 2N-element concatenation {a, b} (b low)
//   SLD    the vector is cut into 2^df slices of 16>>df bytes; in each slice
//          {c, a} (c high) is shifted right by (n mod slice bytes) bytes
//   SPLAT  y[i] = a[n mod N]
//   SHF    y[i] = a[4*(i/4) + imm8[2(i mod 4)+1 : 2(i mod 4)]]
// n is the GPR value (SLD, SPLAT) or the immediate index (SLDI, SPLATI).
// The document describes one circuit per instruction and format; here each
// is a loop over elements and df selects the format. Combinational.
module shuffle_unit
  import msa_pkg::*;
(
  input  vec_t        a,
  input  vec_t        b,
  input  vec_t        c,
  input  df_e         df,
  input  subop_t      op,
  input  logic [31:0] n,
  input  logic [7:0]  imm8,
  output vec_t        y
);
  vec_t r [4];

  for (genvar f = 0; f < 4; f++) begin : g_fmt
    localparam int W  = 8 << f;
    localparam int N  = 16 >> f;
    localparam int SB = 16 >> f;     // SLD slice size in bytes
    localparam int NS = 1 << f;      // number of SLD slices
    always_comb begin
      logic [255:0]      cat;
      logic [2*SB*8-1:0] v;
      logic [7:0]        k;
      int unsigned       sh, idx;
      // every temporary gets a value on every path (no latches)
      cat = '0; v = '0; k = '0; sh = 0; idx = 0;
      r[f] = '0;
      unique case (op)
        SF_PCKEV: for (int i = 0; i < N/2; i++) begin
          r[f][i*W +: W]         = b[(2*i)*W +: W];
          r[f][(N/2+i)*W +: W]   = a[(2*i)*W +: W];
        end
        SF_PCKOD: for (int i = 0; i < N/2; i++) begin
          r[f][i*W +: W]         = b[(2*i+1)*W +: W];
          r[f][(N/2+i)*W +: W]   = a[(2*i+1)*W +: W];
        end
        SF_ILVL: for (int i = 0; i < N/2; i++) begin
          r[f][(2*i)*W +: W]     = b[(N/2+i)*W +: W];
          r[f][(2*i+1)*W +: W]   = a[(N/2+i)*W +: W];
        end
        SF_ILVR: for (int i = 0; i < N/2; i++) begin
          r[f][(2*i)*W +: W]     = b[i*W +: W];
          r[f][(2*i+1)*W +: W]   = a[i*W +: W];
        end
        SF_ILVEV: for (int i = 0; i < N/2; i++) begin
          r[f][(2*i)*W +: W]     = b[(2*i)*W +: W];
          r[f][(2*i+1)*W +: W]   = a[(2*i)*W +: W];
        end
        SF_ILVOD: for (int i = 0; i < N/2; i++) begin
          r[f][(2*i)*W +: W]     = b[(2*i+1)*W +: W];
          r[f][(2*i+1)*W +: W]   = a[(2*i+1)*W +: W];
        end
        SF_VSHF: begin
          cat = {a, b};
          for (int i = 0; i < N; i++) begin
            k   = c[i*W +: 8];
            idx = int'(k) % (2*N);
            r[f][i*W +: W] = (k[7] | k[6]) ? '0 : cat[idx*W +: W];
          end
        end
        SF_SLD: begin
          for (int s = 0; s < NS; s++) begin
            v  = {c[s*SB*8 +: SB*8], a[s*SB*8 +: SB*8]};
            sh = n % SB;
            r[f][s*SB*8 +: SB*8] = v[sh*8 +: SB*8];
          end
        end
        SF_SPLAT: begin
          idx = n % N;
          for (int i = 0; i < N; i++) r[f][i*W +: W] = a[idx*W +: W];
        end
        SF_SHF: for (int i = 0; i < N; i++) begin
          idx = 4*(i/4) + int'(imm8[2*(i%4) +: 2]);
          r[f][i*W +: W] = a[idx*W +: W];
        end
        default: r[f] = '0;
      endcase
    end
  end

  assign y = r[df];
endmodule
