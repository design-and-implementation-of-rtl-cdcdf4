// insert_unit: element insertion (INSERT, INSVE) and element extraction for
// COPY_S / COPY_U (the "DFN" block of path A, vector to GPR).
//
// INSERT writes the low W bits of the GPR value into element n of c (the old
// wd) and keeps the other elements. INSVE does the same with element 0 of a.
// The extraction output picks element n of a and sign- or zero-extends it to
// 32 bits; a doubleword element is truncated to its low 32 bits because the
// host core is 32-bit. df selects the format. Combinational.
module insert_unit
  import msa_pkg::*;
(
  input  vec_t        a,       // ws
  input  vec_t        c,       // old wd
  input  logic [31:0] gpr,     // value from the core (path B)
  input  df_e         df,
  input  subop_t      op,      // IN_INSERT, IN_INSVE
  input  logic [3:0]  n,       // element index
  input  logic        copy_sgn,
  output vec_t        y,       // vector result
  output logic [31:0] elem     // extracted element for the GPR (path A)
);
  vec_t        r [4];
  logic [31:0] e [4];

  for (genvar f = 0; f < 4; f++) begin : g_fmt
    localparam int W = 8 << f;
    localparam int N = 16 >> f;
    always_comb begin
      logic [W-1:0] v, x;
      int unsigned  idx;
      idx = int'(n) % N;
      v   = (op == IN_INSVE) ? a[W-1:0] : W'({{(W > 32 ? W-32 : 0){1'b0}}, gpr});
      r[f] = c;
      r[f][idx*W +: W] = v;
      x = a[idx*W +: W];
      e[f] = (W >= 32) ? 32'(x) : (copy_sgn ? 32'($signed(x)) : 32'(x));
    end
  end

  assign y    = r[df];
  assign elem = e[df];
endmodule
