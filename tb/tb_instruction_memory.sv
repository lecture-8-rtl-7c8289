// tb_instruction_memory: self-checking test of the instruction memory.
// Runs at 2^10 words to keep the shadow copy small. Loads every word through the load
// port, then reads all of them back through the byte-addressed fetch port, including
// addresses with nonzero low bits (which must be ignored), and checks that a fetch is
// combinational.
module tb_instruction_memory;
  localparam int AB = 10;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [31:0]   addr, instr, load_data;
  logic          load_we;
  logic [AB-1:0] load_addr;
  logic [31:0]   shadow [2**AB];
  int checks = 0, failures = 0;

  instruction_memory #(.ADDR_BITS(AB)) dut (.clk, .addr, .instr, .load_we, .load_addr, .load_data);

  initial begin
    load_we = 0; load_addr = 0; load_data = 0; addr = 0;
    for (int i = 0; i < 2**AB; i++) begin
      @(negedge clk);
      load_we = 1; load_addr = AB'(i); load_data = $urandom;
      shadow[i] = load_data;
    end
    @(negedge clk) load_we = 0;
    for (int i = 0; i < 2**AB; i++) begin
      addr = {20'($urandom), AB'(i), 2'($urandom)};
      #1; checks++;
      if (instr !== shadow[i]) begin
        failures++; $display("FAIL word %0d: %h expected %h", i, instr, shadow[i]);
      end
    end
    // overwrite one word and fetch it back at once after the edge
    @(negedge clk) load_we = 1; load_addr = 5; load_data = 32'hDEAD_BEEF;
    addr = 32'd20;
    @(posedge clk); #1 load_we = 0;
    checks++;
    if (instr !== 32'hDEAD_BEEF) begin failures++; $display("FAIL reload"); end
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
