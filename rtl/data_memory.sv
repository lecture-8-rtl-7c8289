// data_memory: the word-wide data store read by lw and written by sw.
//
// 2^ADDR_BITS words of 32 bits. The byte address from the ALU selects word
// addr[ADDR_BITS+1:2]; the two low bits are ignored, so accesses are word aligned. Reads
// are combinational and gated by MemRead: read_data is the addressed word when mem_read
// is 1 and zero otherwise. A write of write_data happens at the rising clock edge when
// mem_write is 1, so a load in the next cycle sees it.
//
// The size (2^30 words), the separate read and write enables and the address and data
// ports follow the source material. Ignoring the low address bits, the zero output when
// not reading and the combinational read are choices of this design. The memory is not
// initialised.
module data_memory #(
  parameter int unsigned ADDR_BITS = 28,
  parameter int unsigned WIDTH = 32
) (
  input  logic             clk,
  input  logic [31:0]      addr,        // byte address (ALU result)
  input  logic             mem_read,    // MemRead
  input  logic             mem_write,   // MemWrite
  input  logic [WIDTH-1:0] write_data,  // Read data 2 of the register file
  output logic [WIDTH-1:0] read_data
);

  logic [WIDTH-1:0] mem [2**ADDR_BITS];
  logic [ADDR_BITS-1:0] waddr;

  assign waddr = addr[ADDR_BITS+1:2];

  always_ff @(posedge clk) begin
    if (mem_write) mem[waddr] <= write_data;
  end

  assign read_data = mem_read ? mem[waddr] : '0;

endmodule
