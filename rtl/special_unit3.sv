// special_unit3: produces operand C, either wd from the register file or the
// GPR value sent by the core (path B) replicated in every element.
//
// The GPR value is truncated to the element width (byte, halfword, word);
// for doubleword it is sign-extended to 64 bits, since the host core has
// 32-bit registers. Used by FILL.df (and by INSERT, which reads the raw GPR
// value itself). Combinational.
module special_unit3
  import msa_pkg::*;
(
  input  vec_t        c,
  input  logic [31:0] gpr,
  input  df_e         df,
  input  logic        use_gpr,
  output vec_t        y
);
  vec_t rep;
  always_comb begin
    unique case (df)
      DF_B: rep = {16{gpr[7:0]}};
      DF_H: rep = {8{gpr[15:0]}};
      DF_W: rep = {4{gpr}};
      DF_D: rep = {2{{32{gpr[31]}}, gpr}};
    endcase
  end
  assign y = use_gpr ? rep : c;
endmodule
