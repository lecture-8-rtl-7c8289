// tb_pc_incrementer: self-checking test of the PC + 4 adder, including wrap-around
// at the top of the address space.
module tb_pc_incrementer;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [31:0] pc, pc_plus4;
  int checks = 0, failures = 0;

  pc_incrementer #(.WIDTH(32)) dut (.pc, .pc_plus4);

  task automatic check(logic [31:0] p, logic [31:0] exp);
    pc = p; #1; checks++;
    if (pc_plus4 !== exp) begin failures++; $display("FAIL %h -> %h exp %h", p, pc_plus4, exp); end
  endtask

  initial begin
    check(32'h0, 32'h4);
    check(32'h0040_0000, 32'h0040_0004);
    check(32'hFFFF_FFFC, 32'h0);
    check(32'h0000_FFFC, 32'h0001_0000);
    for (int i = 0; i < 1000; i++) begin
      longint unsigned p;
      p = $urandom;
      check(32'(p), 32'((p + 4) % 64'h1_0000_0000));
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
