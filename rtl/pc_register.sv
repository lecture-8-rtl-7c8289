// pc_register: the program counter, the address of the instruction being executed.
//
// Loads the next PC at every rising clock edge, so each instruction takes exactly one
// cycle. A synchronous, active-high reset sets it to RESET_PC. The reset and its value are
// choices of this design; the source material does not give a start address.
module pc_register #(
  parameter int unsigned WIDTH = 32,
  parameter logic [WIDTH-1:0] RESET_PC = '0
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [WIDTH-1:0] pc_next,
  output logic [WIDTH-1:0] pc
);

  always_ff @(posedge clk) begin
    if (rst) pc <= RESET_PC;
    else     pc <= pc_next;
  end

endmodule
