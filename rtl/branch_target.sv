// branch_target: the "shift left 2" unit and the second adder of the branch path.
//
// A beq instruction holds its target as a signed word offset from the following
// instruction. This block multiplies the sign-extended offset by four (a two-place left
// shift, dropping the top two bits) and adds it to PC + 4, giving
// PC + 4 + offset * 4. Combinational. A separate adder is needed because the ALU is busy
// comparing the two registers in the same cycle.
module branch_target #(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] pc_plus4,
  input  logic [WIDTH-1:0] offset_ext,  // sign-extended word offset
  output logic [WIDTH-1:0] target
);

  logic [WIDTH-1:0] byte_offset;

  assign byte_offset = {offset_ext[WIDTH-3:0], 2'b00};
  assign target      = pc_plus4 + byte_offset;

endmodule
