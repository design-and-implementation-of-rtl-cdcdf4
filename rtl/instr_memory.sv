// instr_memory: instruction memory of 2^ADDR_W 32-bit rows (128k rows, 512 KB,
// by default), addressed by the word index (PC[ADDR_W+1:2]). The read is
// synchronous: instr holds the word addressed in the previous cycle in which
// rd was high. Contents may be loaded at start-up from a hex file given by
// INIT_FILE (one 32-bit word per line); with no file the memory is cleared.
// A second port allows the program to be written (for loading it at run time).
module instr_memory #(
  parameter int unsigned ADDR_W    = 17,
  parameter string       INIT_FILE = ""
) (
  input  logic              clk,
  input  logic              rd,
  input  logic [ADDR_W-1:0] raddr,
  output logic [31:0]       instr,
  input  logic              we,
  input  logic [ADDR_W-1:0] waddr,
  input  logic [31:0]       wdata
);
  logic [31:0] mem [2**ADDR_W];

  initial begin
    if (INIT_FILE != "") $readmemh(INIT_FILE, mem);
    else for (int i = 0; i < 2**ADDR_W; i++) mem[i] = '0;
  end

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (rd) instr <= mem[raddr];
  end
endmodule
