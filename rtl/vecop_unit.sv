// vecop_unit: the seven whole-vector bitwise operations AND, OR, NOR, XOR,
// BMNZ, BMZ and BSEL. Their I8 forms (ANDI.B ... BSELI.B) use the same unit
// with operand B set to the 8-bit immediate replicated in every byte.
//
//   BMNZ: y = (a & b) | (c & ~b)   copy a where b is 1
//   BMZ:  y = (a & ~b) | (c & b)   copy a where b is 0
//   BSEL: y = (a & ~c) | (b & c)   c selects between a and b
// a is ws, b is wt (or the immediate), c is the old wd. Combinational.
module vecop_unit
  import msa_pkg::*;
(
  input  vec_t   a,
  input  vec_t   b,
  input  vec_t   c,
  input  subop_t op,
  output vec_t   y
);
  always_comb begin
    unique case (op)
      VO_AND:  y = a & b;
      VO_OR:   y = a | b;
      VO_NOR:  y = ~(a | b);
      VO_XOR:  y = a ^ b;
      VO_BMNZ: y = (a & b) | (c & ~b);
      VO_BMZ:  y = (a & ~b) | (c & b);
      VO_BSEL: y = (a & ~c) | (b & c);
      default: y = '0;
    endcase
  end
endmodule
