// pc_incrementer: the adder that computes PC + 4, the address of the next instruction.
//
// Instructions are four bytes long, so sequential execution moves the PC by four. The sum
// wraps modulo 2^WIDTH. Combinational.
module pc_incrementer #(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] pc,
  output logic [WIDTH-1:0] pc_plus4
);

  assign pc_plus4 = pc + WIDTH'(4);

endmodule
