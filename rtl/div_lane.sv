// div_lane: divider lane for one element of W bits, computing the quotient
// (DIV_S/U) or the remainder (MOD_S/U), signed or unsigned.
//
// The operation is pipelined with a latency of LAT clock cycles: the result
// for inputs sampled while start is high appears on y with done high LAT
// cycles later. One division may be started per cycle. Signed division
// truncates toward zero and the remainder takes the sign of the dividend.
// Division by zero, which the instruction set leaves unpredictable, gives a
// quotient of all ones and a remainder equal to the dividend; the most
// negative value divided by -1 wraps to itself. The divide is one
// combinational stage followed by LAT-1 register stages.
//
// With SEQ = 1 the lane uses seq_divider instead, the document's low-area
// alternative: W cycles per division (LAT is then unused) and one division
// at a time. The default is the pipelined divider, the document's main one.
module div_lane
  import msa_pkg::*;
#(
  parameter int unsigned W   = 8,
  parameter int unsigned LAT = 4,
  parameter bit          SEQ = 1'b0
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         start,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         sgn,
  input  logic         rem,      // 1: remainder, 0: quotient
  output logic [W-1:0] y,
  output logic         done
);
  if (SEQ) begin : g_seq
    seq_divider #(.W(W)) u_seq (
      .clk(clk), .rst(rst), .start(start), .a(a), .b(b), .sgn(sgn), .rem(rem),
      .y(y), .done(done)
    );
  end else begin : g_pipe
    logic [W-1:0] res;
    logic [W-1:0] pipe_d [LAT];
    logic         pipe_v [LAT];

    always_comb begin
      logic signed [W:0] sa, sbv, sq, sr;
      sa  = (W+1)'($signed(a));
      sbv = (W+1)'($signed(b));
      sq  = sa / sbv;
      sr  = sa % sbv;
      if (b == '0) begin
        res = rem ? a : '1;
      end else if (sgn) begin
        res = rem ? sr[W-1:0] : sq[W-1:0];
      end else begin
        res = rem ? (a % b) : (a / b);
      end
    end

    always_ff @(posedge clk) begin
      if (rst) begin
        for (int i = 0; i < LAT; i++) begin
          pipe_v[i] <= 1'b0;
          pipe_d[i] <= '0;
        end
      end else begin
        pipe_v[0] <= start;
        pipe_d[0] <= res;
        for (int i = 1; i < LAT; i++) begin
          pipe_v[i] <= pipe_v[i-1];
          pipe_d[i] <= pipe_d[i-1];
        end
      end
    end

    assign y    = pipe_d[LAT-1];
    assign done = pipe_v[LAT-1];
  end
endmodule
