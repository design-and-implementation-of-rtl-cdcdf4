// vpu_3r: the 3R part of the vector processing unit. It holds one lane per
// element of every format, 30 lanes in all: 16 of 8 bits, 8 of 16, 4 of 32
// and 2 of 64. Every lane works on its slice of the same 128-bit operands in
// lock step, so each format takes the same time; the result of the format
// selected by df is kept (result format selection).
//
// Add/subtract and multiply results are combinational; DIV/MOD take DIV_LAT
// cycles after start (see lane_3r), or the element width in cycles with
// DIV_SEQ = 1, signalled by done.
module vpu_3r
  import msa_pkg::*;
#(
  parameter int unsigned DIV_LAT = 4,
  parameter bit          DIV_SEQ = 1'b0   // 1: sequential dividers (8..64 cycles)
) (
  input  logic   clk,
  input  logic   rst,
  input  vec_t   a,
  input  vec_t   b,
  input  vec_t   c,
  input  df_e    df,
  input  lop_e   op,
  input  logic   sgn,
  input  logic   sat,
  input  logic   start,
  output vec_t   y,
  output logic   done
);
  vec_t r [4];
  logic [3:0] fdone;

  for (genvar f = 0; f < 4; f++) begin : g_fmt
    localparam int W = 8 << f;
    localparam int N = 16 >> f;
    logic [N-1:0] ldone;
    for (genvar i = 0; i < N; i++) begin : g_lane
      lane_3r #(.W(W), .DIV_LAT(DIV_LAT), .DIV_SEQ(DIV_SEQ)) u_lane (
        .clk(clk), .rst(rst),
        .a(a[i*W +: W]), .b(b[i*W +: W]), .c(c[i*W +: W]),
        .op(op), .sgn(sgn), .sat(sat), .start(start),
        .y(r[f][i*W +: W]), .done(ldone[i])
      );
    end
    assign fdone[f] = &ldone;
  end

  assign y    = r[df];
  assign done = fdone[df];
endmodule
