// msa_ref_pkg: behavioural reference model of the integer MSA instructions,
// written element by element with wide integer arithmetic and independent of
// the RTL's structure. Testbenches compare the RTL against it.
package msa_ref_pkg;
  typedef logic [127:0] v128;
  typedef logic signed [131:0] big_t;

  function automatic int ew(int df); return 8 << df; endfunction
  function automatic int ne(int df); return 16 >> df; endfunction

  function automatic logic [63:0] msk(int w);
    return (w == 64) ? '1 : ((64'd1 << w) - 64'd1);
  endfunction

  function automatic logic [63:0] get(v128 v, int df, int i);
    return 64'((v >> (i * ew(df)))) & msk(ew(df));
  endfunction

  function automatic v128 put(v128 v, int df, int i, logic [63:0] x);
    v128 m;
    m = v128'(msk(ew(df))) << (i * ew(df));
    return (v & ~m) | ((v128'(x & msk(ew(df)))) << (i * ew(df)));
  endfunction

  // value of a W-bit element as a wide integer
  function automatic big_t val(logic [63:0] x, int w, bit s);
    big_t v;
    v = big_t'(x & msk(w));
    if (s && x[w-1]) v = v - (big_t'(1) <<< w);
    return v;
  endfunction

  function automatic big_t clip(big_t v, big_t lo, big_t hi);
    return (v < lo) ? lo : ((v > hi) ? hi : v);
  endfunction

  function automatic big_t smax(int w); return (big_t'(1) <<< (w-1)) - 1; endfunction
  function automatic big_t smin(int w); return -(big_t'(1) <<< (w-1)); endfunction
  function automatic big_t umax(int w); return (big_t'(1) <<< w) - 1; endfunction
  function automatic big_t babs(big_t v); return (v < 0) ? -v : v; endfunction

  // floor division for wide values (arithmetic shift semantics)
  function automatic big_t half(big_t v); return v >>> 1; endfunction

  // One element of an element-wise instruction. a = ws, b = wt (or
  // immediate), c = old wd. Result truncated to the element width.
  function automatic logic [63:0] elem(string op, int df, logic [63:0] a, logic [63:0] b,
                                       logic [63:0] c);
    int w; big_t sa, sb, ua, ub, r; int s; logic [63:0] x;
    w  = ew(df);
    sa = val(a, w, 1); sb = val(b, w, 1);
    ua = val(a, w, 0); ub = val(b, w, 0);
    s  = int'(b & 64'(w - 1));
    case (op)
      "ADDV":     r = ua + ub;
      "SUBV":     r = ua - ub;
      "ADD_A":    r = babs(sa) + babs(sb);
      "ADDS_A":   r = clip(babs(sa) + babs(sb), smin(w), smax(w));
      "ADDS_S":   r = clip(sa + sb, smin(w), smax(w));
      "ADDS_U":   r = clip(ua + ub, 0, umax(w));
      "AVE_S":    r = half(sa + sb);
      "AVE_U":    r = half(ua + ub);
      "AVER_S":   r = half(sa + sb + 1);
      "AVER_U":   r = half(ua + ub + 1);
      "SUBS_S":   r = clip(sa - sb, smin(w), smax(w));
      "SUBS_U":   r = clip(ua - ub, 0, umax(w));
      "SUBSUS_U": r = clip(ua - sb, 0, umax(w));
      "SUBSUU_S": r = clip(ua - ub, smin(w), smax(w));
      "ASUB_S":   r = babs(sa - sb);
      "ASUB_U":   r = babs(ua - ub);
      "MULV":     r = ua * ub;
      "MADDV":    r = val(c, w, 0) + ua * ub;
      "MSUBV":    r = val(c, w, 0) - ua * ub;
      "DIV_S":    r = (sb == 0) ? umax(w) : sa / sb;
      "DIV_U":    r = (ub == 0) ? umax(w) : ua / ub;
      "MOD_S":    r = (sb == 0) ? sa : sa % sb;
      "MOD_U":    r = (ub == 0) ? ua : ua % ub;
      "MAX_S":    r = (sa > sb) ? sa : sb;
      "MAX_U":    r = (ua > ub) ? ua : ub;
      "MIN_S":    r = (sa < sb) ? sa : sb;
      "MIN_U":    r = (ua < ub) ? ua : ub;
      "MAX_A":    r = (babs(sa) > babs(sb)) ? sa : sb;
      "MIN_A":    r = (babs(sa) < babs(sb)) ? sa : sb;
      "CEQ":      r = (ua == ub) ? -1 : 0;
      "CLT_S":    r = (sa < sb) ? -1 : 0;
      "CLT_U":    r = (ua < ub) ? -1 : 0;
      "CLE_S":    r = (sa <= sb) ? -1 : 0;
      "CLE_U":    r = (ua <= ub) ? -1 : 0;
      "SLL":      r = ua <<< s;
      "SRA":      r = sa >>> s;
      "SRL":      r = ua >>> s;
      "SRAR":     r = (sa >>> s) + ((s > 0) ? ((sa >>> (s-1)) & 1) : 0);
      "SRLR":     r = (ua >>> s) + ((s > 0) ? ((ua >>> (s-1)) & 1) : 0);
      "BCLR":     r = ua & ~(big_t'(1) <<< s);
      "BSET":     r = ua | (big_t'(1) <<< s);
      "BNEG":     r = ua ^ (big_t'(1) <<< s);
      "BINSL": begin
        x = a; for (int k = 0; k < w - s - 1; k++) x[k] = c[k];
        r = big_t'(x);
      end
      "BINSR": begin
        x = a; for (int k = s + 1; k < w; k++) x[k] = c[k];
        r = big_t'(x);
      end
      "SAT_S":    r = clip(sa, -(big_t'(1) <<< s), (big_t'(1) <<< s) - 1);   // s = m
      "SAT_U":    r = clip(ua, 0, (big_t'(1) <<< (s + 1)) - 1);
      "PCNT": begin r = 0; for (int k = 0; k < w; k++) r += big_t'(a[k]); end
      "NLZC": begin r = w; for (int k = 0; k < w; k++) if (a[k]) r = w - 1 - k; end
      "NLOC": begin r = w; for (int k = 0; k < w; k++) if (!a[k]) r = w - 1 - k; end
      default: begin r = 0; $display("msa_ref_pkg: unknown op %s", op); end
    endcase
    return 64'(r) & msk(w);
  endfunction

  // Apply an element-wise instruction to whole vectors
  function automatic v128 vec(string op, int df, v128 a, v128 b, v128 c);
    v128 r = '0;
    for (int i = 0; i < ne(df); i++)
      r = put(r, df, i, elem(op, df, get(a, df, i), get(b, df, i), get(c, df, i)));
    return r;
  endfunction

  // Horizontal add/subtract: odd half-elements of a, even half-elements of b
  function automatic v128 hop(bit sub, bit s, int df, v128 a, v128 b);
    v128 r = '0; int w;
    w = ew(df);
    for (int i = 0; i < ne(df); i++) begin
      big_t x, y;
      x = val(get(a, df - 1, 2*i + 1), w/2, s);
      y = val(get(b, df - 1, 2*i), w/2, s);
      r = put(r, df, i, 64'(sub ? x - y : x + y));
    end
    return r;
  endfunction

  // Dot products: kind 0 DOTP, 1 DPADD, 2 DPSUB
  function automatic v128 dotp(int kind, bit s, int df, v128 a, v128 b, v128 c);
    v128 r = '0; int w;
    w = ew(df);
    for (int i = 0; i < ne(df); i++) begin
      big_t p;
      p = val(get(a, df-1, 2*i), w/2, s) * val(get(b, df-1, 2*i), w/2, s)
        + val(get(a, df-1, 2*i+1), w/2, s) * val(get(b, df-1, 2*i+1), w/2, s);
      if (kind == 1) p = val(get(c, df, i), w, 0) + p;
      if (kind == 2) p = val(get(c, df, i), w, 0) - p;
      r = put(r, df, i, 64'(p));
    end
    return r;
  endfunction

  // Permutations. a = ws, b = wt, c = old wd, n = index, i8 = immediate
  function automatic v128 shuf(string op, int df, v128 a, v128 b, v128 c, int unsigned n,
                               logic [7:0] i8);
    v128 r = '0; int nn; int h;
    nn = ne(df); h = nn / 2;
    case (op)
      "PCKEV": for (int i = 0; i < h; i++) begin
                 r = put(r, df, i, get(b, df, 2*i)); r = put(r, df, h+i, get(a, df, 2*i)); end
      "PCKOD": for (int i = 0; i < h; i++) begin
                 r = put(r, df, i, get(b, df, 2*i+1)); r = put(r, df, h+i, get(a, df, 2*i+1)); end
      "ILVL":  for (int i = 0; i < h; i++) begin
                 r = put(r, df, 2*i, get(b, df, h+i)); r = put(r, df, 2*i+1, get(a, df, h+i)); end
      "ILVR":  for (int i = 0; i < h; i++) begin
                 r = put(r, df, 2*i, get(b, df, i)); r = put(r, df, 2*i+1, get(a, df, i)); end
      "ILVEV": for (int i = 0; i < h; i++) begin
                 r = put(r, df, 2*i, get(b, df, 2*i)); r = put(r, df, 2*i+1, get(a, df, 2*i)); end
      "ILVOD": for (int i = 0; i < h; i++) begin
                 r = put(r, df, 2*i, get(b, df, 2*i+1)); r = put(r, df, 2*i+1, get(a, df, 2*i+1)); end
      "VSHF":  for (int i = 0; i < nn; i++) begin
                 logic [7:0] k; int j;
                 k = 8'(get(c, df, i));
                 j = int'(k) % (2*nn);
                 if (k[7] || k[6]) r = put(r, df, i, 0);
                 else r = put(r, df, i, (j < nn) ? get(b, df, j) : get(a, df, j - nn));
               end
      "SPLAT": for (int i = 0; i < nn; i++) r = put(r, df, i, get(a, df, n % nn));
      "SHF":   for (int i = 0; i < nn; i++)
                 r = put(r, df, i, get(a, df, 4*(i/4) + int'(i8[2*(i%4) +: 2])));
      "SLD": begin
        // byte view: slices of 16>>df bytes; in each {c, a} >> (n mod size) bytes
        int sb; int ns;
        sb = 16 >> df; ns = 1 << df;
        for (int s = 0; s < ns; s++)
          for (int k = 0; k < sb; k++) begin
            int j; logic [63:0] byt;
            j = k + int'(n % sb);
            byt = (j < sb) ? get(a, 0, s*sb + j) : get(c, 0, s*sb + j - sb);
            r = put(r, 0, s*sb + k, byt);
          end
      end
      default: $display("msa_ref_pkg: unknown shuffle %s", op);
    endcase
    return r;
  endfunction

  // Replicate a value in every element of format df
  function automatic v128 splat(int df, logic [63:0] x);
    v128 r = '0;
    for (int i = 0; i < ne(df); i++) r = put(r, df, i, x);
    return r;
  endfunction

  function automatic v128 rand128();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  // Random vector with many corner values (0, 1, all ones, min, max) per element
  function automatic v128 rand_elem(int df);
    v128 r;
    r = rand128();
    for (int i = 0; i < ne(df); i++) begin
      case ($urandom_range(0, 9))
        0: r = put(r, df, i, 0);
        1: r = put(r, df, i, msk(ew(df)));
        2: r = put(r, df, i, 64'(1) << (ew(df) - 1));
        3: r = put(r, df, i, msk(ew(df) - 1));
        4: r = put(r, df, i, 1);
        5: r = put(r, df, i, 64'($urandom_range(0, 7)));
        default: ;
      endcase
    end
    return r;
  endfunction
  // Instruction encoders (MSA formats), used to build test programs
  function automatic logic [31:0] e3r(logic [5:0] minor, int op3, int df, int wt, int ws, int wd);
    return {6'h1E, 3'(op3), 2'(df), 5'(wt), 5'(ws), 5'(wd), minor};
  endfunction
  function automatic logic [31:0] eldi(int df, int s10, int wd);
    return {6'h1E, 3'd6, 2'(df), 10'(s10), 5'(wd), 6'h07};
  endfunction
  function automatic logic [31:0] ebit(logic [5:0] minor, int op3, int df, int m, int ws, int wd);
    logic [6:0] dfm;
    case (df)
      0: dfm = {4'b1110, 3'(m)};
      1: dfm = {3'b110, 4'(m)};
      2: dfm = {2'b10, 5'(m)};
      default: dfm = {1'b0, 6'(m)};
    endcase
    return {6'h1E, 3'(op3), dfm, 5'(ws), 5'(wd), minor};
  endfunction
  function automatic logic [31:0] ei8(logic [5:0] minor, int op2, int i8, int ws, int wd);
    return {6'h1E, 2'(op2), 8'(i8), 5'(ws), 5'(wd), minor};
  endfunction
  function automatic logic [31:0] eelm(int op4, int df, int n, int ws, int wd);
    logic [5:0] dfn;
    case (df)
      0: dfn = {2'b00, 4'(n)};
      1: dfn = {3'b100, 3'(n)};
      2: dfn = {4'b1100, 2'(n)};
      default: dfn = {5'b11100, 1'(n)};
    endcase
    return {6'h1E, 4'(op4), dfn, 5'(ws), 5'(wd), 6'h19};
  endfunction
  function automatic logic [31:0] ectl(int op4, int ws, int wd);
    return {6'h1E, 4'(op4), 6'h3E, 5'(ws), 5'(wd), 6'h19};
  endfunction
  function automatic logic [31:0] evec(int op5, int wt, int ws, int wd);
    return {6'h1E, 5'(op5), 5'(wt), 5'(ws), 5'(wd), 6'h1E};
  endfunction
  function automatic logic [31:0] e2r(int op2, int df, int ws, int wd);
    return {6'h1E, 6'b110000, 2'(op2), 2'(df), 5'(ws), 5'(wd), 6'h1E};
  endfunction
  function automatic logic [31:0] emi10(bit ld, int df, int s10, int rs, int wd);
    return {6'h1E, 10'(s10), 5'(rs), 5'(wd), (ld ? 4'h8 : 4'h9), 2'(df)};
  endfunction
  function automatic logic [31:0] ebr(int rsf, int wt, int off);
    return {6'h11, 5'(rsf), 5'(wt), 16'(off)};
  endfunction
endpackage
