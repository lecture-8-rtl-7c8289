// tb_pc_register: self-checking test of the program counter register.
// Checks the reset value, that the PC takes pc_next at each rising edge and holds
// between edges, and that reset wins over pc_next.
module tb_pc_register;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic        rst;
  logic [31:0] pc_next, pc, exp;
  int checks = 0, failures = 0;

  pc_register #(.WIDTH(32), .RESET_PC(32'h0000_0040)) dut (.clk, .rst, .pc_next, .pc);

  initial begin
    rst = 1; pc_next = 32'h1234_5678;
    @(posedge clk); #1;
    checks++; if (pc !== 32'h40) begin failures++; $display("FAIL reset %h", pc); end
    rst = 0;
    exp = pc;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      pc_next = $urandom;
      checks++; if (pc !== exp) begin failures++; $display("FAIL hold %h exp %h", pc, exp); end
      rst = (i % 97) == 50;
      @(posedge clk); #1;
      exp = rst ? 32'h40 : pc_next;
      checks++; if (pc !== exp) begin failures++; $display("FAIL load %h exp %h", pc, exp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
