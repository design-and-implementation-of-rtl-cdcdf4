// seq_divider: low-area sequential divider for one element of W bits, the
// alternative to the pipelined divider (div_lane with SEQ = 1 selects it).
//
// How it works: the "schoolbook" restoring algorithm, one quotient bit per
// clock from the most significant bit down. The magnitude of the dividend
// is loaded into the numerator register and the workspace (partial
// remainder) is cleared. Every cycle the pair {workspace, numerator} shifts
// left by one; if the workspace minus the divisor is zero or positive, the
// workspace takes the difference and the new quotient bit (shifted into the
// numerator's low end) is 1, otherwise the workspace is left as it is and
// the bit is 0. After W cycles the numerator holds the quotient and the
// workspace the remainder. Signs are applied at the end: the quotient is
// negated when the operand signs differ, the remainder takes the dividend's
// sign. Division by zero gives a quotient of all ones and a remainder equal
// to the dividend, as in the pipelined divider.
//
// The algorithm, the W-cycle latency and the ready output follow the
// document's description of its alternative divider; the handling of signed
// operands and of division by zero is this design's choice.
//
// Interface and timing: start (one cycle) samples a, b, sgn and rem; W
// clock cycles later done is high for one cycle and y holds the result
// until the next start. A start while busy restarts the division.
module seq_divider #(
  parameter int unsigned W = 8
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
  localparam int unsigned CW = $clog2(W + 1);

  logic [W-1:0]  num;      // numerator register, becomes the quotient
  logic [W:0]    work;     // workspace, becomes the remainder
  logic [W-1:0]  div;      // divisor magnitude
  logic [W-1:0]  a_q;
  logic [CW-1:0] cnt;
  logic          neg_q, neg_r, dz, rem_q, busy;

  logic [W:0]    sh;
  logic [W+1:0]  diff;
  assign sh   = {work[W-1:0], num[W-1]};
  assign diff = {1'b0, sh} - {2'b00, div};

  always_ff @(posedge clk) begin
    if (rst) begin
      num <= '0; work <= '0; div <= '0; a_q <= '0; cnt <= '0;
      neg_q <= 1'b0; neg_r <= 1'b0; dz <= 1'b0; rem_q <= 1'b0;
      busy <= 1'b0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        num   <= (sgn && a[W-1]) ? -a : a;
        div   <= (sgn && b[W-1]) ? -b : b;
        work  <= '0;
        a_q   <= a;
        neg_q <= sgn && (a[W-1] ^ b[W-1]);
        neg_r <= sgn && a[W-1];
        dz    <= (b == '0);
        rem_q <= rem;
        cnt   <= CW'(W);
        busy  <= 1'b1;
      end else if (busy) begin
        if (!diff[W+1]) begin
          work <= diff[W:0];
          num  <= {num[W-2:0], 1'b1};
        end else begin
          work <= sh;
          num  <= {num[W-2:0], 1'b0};
        end
        cnt <= cnt - 1'b1;
        if (cnt == CW'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  always_comb begin
    if (dz)         y = rem_q ? a_q : '1;
    else if (rem_q) y = neg_r ? -work[W-1:0] : work[W-1:0];
    else            y = neg_q ? -num : num;
  end
endmodule
