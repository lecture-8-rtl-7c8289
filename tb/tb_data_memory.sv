// tb_data_memory: self-checking test of the data memory.
// Runs at 2^10 words. Issues 4000 random cycles of reads and writes against a shadow
// array: a write lands at the clock edge, a read is combinational, read data is zero
// while MemRead is 0, and the two low address bits are ignored.
module tb_data_memory;
  localparam int AB = 10;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [31:0] addr, wdata, rdata;
  logic        mem_read, mem_write;
  logic [31:0] shadow [2**AB];
  int checks = 0, failures = 0;

  data_memory #(.ADDR_BITS(AB)) dut (
    .clk, .addr, .mem_read, .mem_write, .write_data(wdata), .read_data(rdata)
  );

  initial begin
    mem_read = 0; mem_write = 0; addr = 0; wdata = 0;
    // fill so every word is known
    for (int i = 0; i < 2**AB; i++) begin
      @(negedge clk);
      mem_write = 1; addr = {20'd0, AB'(i), 2'b00}; wdata = $urandom;
      shadow[i] = wdata;
    end
    for (int i = 0; i < 4000; i++) begin
      int w;
      @(negedge clk);
      w = $urandom % (2**AB);
      addr = {20'($urandom), AB'(w), 2'($urandom)};
      mem_read = $urandom; mem_write = ($urandom % 3) == 0; wdata = $urandom;
      #1; checks++;
      if (rdata !== (mem_read ? shadow[w] : 32'd0)) begin
        failures++; $display("FAIL read word %0d got %h exp %h", w, rdata, shadow[w]);
      end
      @(posedge clk);
      if (mem_write) shadow[w] = wdata;
      #1;
      if (mem_read) begin
        checks++;
        if (rdata !== shadow[w]) begin failures++; $display("FAIL after write word %0d", w); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
