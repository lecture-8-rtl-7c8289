// mux2: two-input multiplexer, used for the four datapath selects.
//
// Output is d0 when sel is 0 and d1 when sel is 1. The datapath uses one for each of
// RegDst (rt or rd as destination register, 5 bits), ALUSrc (register or immediate as ALU
// operand B), MemToReg (ALU result or memory data as write-back value) and PCSrc (PC+4 or
// branch target as next PC). Combinational.
module mux2 #(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] d0,
  input  logic [WIDTH-1:0] d1,
  input  logic             sel,
  output logic [WIDTH-1:0] y
);

  assign y = sel ? d1 : d0;

endmodule
