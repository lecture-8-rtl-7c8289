// instruction_memory: the read-only program store of the Harvard-style datapath.
//
// A word-wide memory of 2^ADDR_BITS 32-bit words. The processor side is a combinational
// read: the byte address from the PC selects word addr[ADDR_BITS+1:2] and the instruction
// appears in the same cycle. The two low address bits are ignored, as instructions are
// word aligned. The processor never writes this memory.
//
// The size (2^30 words, a byte-addressable 32-bit space) and the read-only processor
// side follow the source material. To get a program into it, this design adds a load
// port: a word is written at the rising clock edge when load_we is 1. It is meant to be
// used while the processor is held in reset. The memory is not initialised.
module instruction_memory #(
  parameter int unsigned ADDR_BITS = 28,
  parameter int unsigned WIDTH = 32
) (
  input  logic                 clk,
  input  logic [31:0]          addr,        // byte address (PC)
  output logic [WIDTH-1:0]     instr,
  input  logic                 load_we,     // program load port
  input  logic [ADDR_BITS-1:0] load_addr,   // word address
  input  logic [WIDTH-1:0]     load_data
);

  logic [WIDTH-1:0] mem [2**ADDR_BITS];

  always_ff @(posedge clk) begin
    if (load_we) mem[load_addr] <= load_data;
  end

  assign instr = mem[addr[ADDR_BITS+1:2]];

endmodule
