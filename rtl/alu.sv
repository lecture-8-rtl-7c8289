// alu: the 32-bit ALU of the single-cycle datapath.
//
// Computes and, or, add, subtract or set-on-less-than of its two operands, selected by
// the 3-bit ALUOp, and raises Zero when the result is all zeros. The branch instruction
// uses Zero after a subtraction to test two registers for equality. Purely
// combinational: the result is valid in the same cycle as the operands.
//
// The operation codes 000 and, 001 or, 010 add, 110 subtract follow the source material.
// Code 111 is set-on-less-than (signed compare, result 1 or 0), as the control table
// assigns it to slt. The remaining codes give zero; this is a choice of this design.
module alu
  import mips_pkg::*;
#(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] a,       // operand A (Read data 1)
  input  logic [WIDTH-1:0] b,       // operand B (Read data 2 or immediate)
  input  alu_op_e          alu_op,  // operation select
  output logic [WIDTH-1:0] result,
  output logic             zero     // result == 0
);

  always_comb begin
    unique case (alu_op)
      ALU_AND: result = a & b;
      ALU_OR:  result = a | b;
      ALU_ADD: result = a + b;
      ALU_SUB: result = a - b;
      ALU_SLT: result = {{(WIDTH-1){1'b0}}, $signed(a) < $signed(b)};
      default: result = '0;
    endcase
  end

  assign zero = (result == '0);

endmodule
