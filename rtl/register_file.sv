// register_file: thirty-two 32-bit general registers with two read ports and one write port.
//
// Two registers, named by 5-bit specifiers, are read combinationally in the same cycle.
// One register is written at the rising clock edge when RegWrite is 1. Register 0 always
// reads as zero and ignores writes, as the MIPS convention makes $0 the constant zero.
// A read of the register being written returns the old value; the new one is visible
// from the next cycle, which is what a single-cycle processor needs.
//
// The size and the port set follow the source material. The hard-wired $0, the
// synchronous reset of all registers to zero, and the edge-triggered write are choices
// of this design.
module register_file
  import mips_pkg::*;
#(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned NUM_REGS = 32,
  parameter int unsigned AW = $clog2(NUM_REGS)
) (
  input  logic             clk,
  input  logic             rst,         // synchronous, active high: clears every register
  input  logic [AW-1:0]    read_reg1,   // rs
  input  logic [AW-1:0]    read_reg2,   // rt
  output logic [WIDTH-1:0] read_data1,
  output logic [WIDTH-1:0] read_data2,
  input  logic             reg_write,   // RegWrite
  input  logic [AW-1:0]    write_reg,
  input  logic [WIDTH-1:0] write_data
);

  logic [WIDTH-1:0] regs [NUM_REGS];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NUM_REGS; i++) regs[i] <= '0;
    end else if (reg_write && write_reg != '0) begin
      regs[write_reg] <= write_data;
    end
  end

  assign read_data1 = (read_reg1 == '0) ? '0 : regs[read_reg1];
  assign read_data2 = (read_reg2 == '0) ? '0 : regs[read_reg2];

endmodule
