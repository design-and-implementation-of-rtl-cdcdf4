// adder_lane: the multipurpose adder/subtractor lane for one element of W
// bits. It computes the 22 add/subtract variants of the 3R group:
//   ADD/SUB (ADDV, SUBV, ADDVI, SUBVI, HADD, HSUB), saturated when sat is set
//   (ADDS_S/U, SUBS_S/U); ADDA = |a|+|b| (ADD_A, ADDS_A saturating to the
//   signed maximum); AVE = (a+b)>>1; AVER = (a+b+1)>>1; SUBSUS = unsigned a
//   minus signed b saturated unsigned (SUBSUS_U); SUBSUU = unsigned a minus
//   unsigned b saturated signed (SUBSUU_S); ASUB = |a-b|.
// As in the document, both operands are extended by sign or zero to W+2
// bits, optionally replaced by their absolute value, then added or
// subtracted with a carry-in; the wide sum is then clipped, halved or
// truncated. Combinational.
module adder_lane
  import msa_pkg::*;
#(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  lop_e         op,
  input  logic         sgn,
  input  logic         sat,
  output logic [W-1:0] y
);
  localparam int unsigned E = W + 2;
  typedef logic signed [E-1:0] ext_t;
  localparam ext_t SMAX = ext_t'({1'b0, {(W-1){1'b1}}});
  localparam ext_t SMIN = -SMAX - ext_t'(1);
  localparam ext_t UMAX = ext_t'({W{1'b1}});

  logic sa, sb, absa, absb, addsub, cin;
  ext_t ea, eb, oa, ob, s;

  // Control signals: signed A, signed B, Abs(A), Abs(B), add/sub, carry-in
  always_comb begin
    sa = sgn; sb = sgn; absa = 1'b0; absb = 1'b0; addsub = 1'b1; cin = 1'b0;
    unique case (op)
      LOP_SUB:    addsub = 1'b0;
      LOP_ADDA:   begin sa = 1'b1; sb = 1'b1; absa = 1'b1; absb = 1'b1; end
      LOP_AVER:   cin = 1'b1;
      LOP_SUBSUS: begin sa = 1'b0; sb = 1'b1; addsub = 1'b0; end
      LOP_SUBSUU: begin sa = 1'b0; sb = 1'b0; addsub = 1'b0; end
      LOP_ASUB:   addsub = 1'b0;
      default:    ;
    endcase
  end

  function automatic ext_t sat_s(ext_t v);
    if (v > SMAX) return SMAX;
    if (v < SMIN) return SMIN;
    return v;
  endfunction

  function automatic ext_t sat_u(ext_t v);
    if (v < 0)    return '0;
    if (v > UMAX) return UMAX;
    return v;
  endfunction

  always_comb begin
    ext_t r;
    ea = sa ? ext_t'($signed(a)) : ext_t'(a);
    eb = sb ? ext_t'($signed(b)) : ext_t'(b);
    oa = (absa && ea < 0) ? -ea : ea;
    ob = (absb && eb < 0) ? -eb : eb;
    s  = addsub ? (oa + ob + ext_t'(cin)) : (oa - ob);
    unique case (op)
      LOP_ADD, LOP_SUB: r = !sat ? s : (sgn ? sat_s(s) : sat_u(s));
      LOP_ADDA:   r = sat ? sat_s(s) : s;
      LOP_AVE,
      LOP_AVER:   r = s >>> 1;
      LOP_SUBSUS: r = sat_u(s);
      LOP_SUBSUU: r = sat_s(s);
      LOP_ASUB:   r = (s < 0) ? -s : s;
      default:    r = '0;
    endcase
    y = r[W-1:0];
  end
endmodule
