// sign_extend: widens the 16-bit signed immediate of an I-type instruction to 32 bits.
//
// The top bit of the constant is copied into every new upper bit, so -4 (0xFFFC) becomes
// 0xFFFFFFFC and 16 stays 16. Used for the lw/sw address offset and for the beq
// instruction offset. Combinational.
module sign_extend #(
  parameter int unsigned IN_WIDTH  = 16,
  parameter int unsigned OUT_WIDTH = 32
) (
  input  logic [IN_WIDTH-1:0]  imm,
  output logic [OUT_WIDTH-1:0] ext
);

  assign ext = {{(OUT_WIDTH-IN_WIDTH){imm[IN_WIDTH-1]}}, imm};

endmodule
