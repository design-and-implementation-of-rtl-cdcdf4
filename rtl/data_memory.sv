// data_memory: byte-addressed data memory that reads 16 bytes and writes 1,
// 2, 4, 8 or 16 bytes at any address, aligned or not.
//
// The memory is 16 byte-wide cells. Byte k of an access at address A lives
// at address A+k, which is in cell (A+k) mod 16 at row (A+k)/16. So cell j
// serves byte k = (j - A[3:0]) mod 16 and its row is A[n:4], plus one when
// j < A[3:0] (the access wraps into the next row). Read data is rotated back
// by A[3:0]; write data and byte enables are rotated the same way. All
// cells are accessed in parallel, so an unaligned access takes one cycle
// like an aligned one. This follows the document's cell, offset and row
// computation.
//
// Timing: writes at the clock edge; reads are synchronous, rdata holds the 16
// bytes at the address presented in the previous cycle (when rd was high).
// Addresses wrap at the top of memory. ADDR_W = 19 gives 512 KB.
// (For cell 0 the test j < A[3:0] is always false; lint reports that
// comparison as constant, which is expected.)
module data_memory
  import msa_pkg::*;
#(
  parameter int unsigned ADDR_W = 19
) (
  input  logic              clk,
  input  logic [ADDR_W-1:0] addr,
  input  logic              rd,
  input  logic [4:0]        wr_bytes,   // 0 = no write, else 1, 2, 4, 8 or 16
  input  vec_t              wdata,      // byte k written at addr+k
  output vec_t              rdata
);
  localparam int unsigned RW = ADDR_W - 4;

  logic [3:0]    lo;
  logic [RW-1:0] row0;
  logic [7:0]    cell_q [16];
  logic [3:0]    lo_q;

  assign lo   = addr[3:0];
  assign row0 = addr[ADDR_W-1:4];

  for (genvar j = 0; j < 16; j++) begin : g_cell
    logic [7:0]    mem [2**RW];
    logic [3:0]    k;        // which byte of the access this cell holds
    logic [RW-1:0] row;
    logic          we;
    assign k   = 4'(j) - lo;
    assign row = row0 + RW'(4'(j) < lo);
    assign we  = (5'(k) < wr_bytes);
    initial for (int i = 0; i < 2**RW; i++) mem[i] = '0;
    always_ff @(posedge clk) begin
      if (we) mem[row] <= wdata[k*8 +: 8];
      if (rd) cell_q[j] <= mem[row];
    end
  end

  always_ff @(posedge clk)
    if (rd) lo_q <= lo;

  always_comb
    for (int k = 0; k < 16; k++) rdata[k*8 +: 8] = cell_q[4'(k) + lo_q];
endmodule
