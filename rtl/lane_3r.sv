// lane_3r: one 3R lane of W bits, joining the multipurpose adder, the
// multiplier with fused add/subtract and the divider behind one output
// multiplexer selected by the lane operation code.
//
// Add/subtract and multiply results are combinational. DIV and MOD go through
// the pipelined divider: the caller raises start for one cycle, holds the
// operands, and takes y when done rises LAT cycles later (W cycles with
// DIV_SEQ = 1, the sequential divider).
module lane_3r
  import msa_pkg::*;
#(
  parameter int unsigned W       = 8,
  parameter int unsigned DIV_LAT = 4,
  parameter bit          DIV_SEQ = 1'b0   // 1: sequential divider (W cycles)
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  input  lop_e         op,
  input  logic         sgn,
  input  logic         sat,
  input  logic         start,    // start a DIV/MOD
  output logic [W-1:0] y,
  output logic         done      // DIV/MOD result valid
);
  logic [W-1:0] y_add, y_mul, y_div;
  logic         is_mul, is_div;

  assign is_mul = (op == LOP_MUL) || (op == LOP_MADD) || (op == LOP_MSUB);
  assign is_div = (op == LOP_DIV) || (op == LOP_MOD);

  adder_lane #(.W(W)) u_add (
    .a(a), .b(b), .op(op), .sgn(sgn), .sat(sat), .y(y_add)
  );

  mul_lane #(.W(W)) u_mul (
    .a(a), .b(b), .c(c), .op(op), .y(y_mul)
  );

  div_lane #(.W(W), .LAT(DIV_LAT), .SEQ(DIV_SEQ)) u_div (
    .clk(clk), .rst(rst), .start(start && is_div), .a(a), .b(b),
    .sgn(sgn), .rem(op == LOP_MOD), .y(y_div), .done(done)
  );

  assign y = is_div ? y_div : (is_mul ? y_mul : y_add);
endmodule
