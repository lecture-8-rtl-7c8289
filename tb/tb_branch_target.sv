// tb_branch_target: self-checking test of the branch target unit.
// Checks PC + 4 + offset * 4 for the worked example of a beq three instructions ahead
// (offset 3, 12 bytes), for a backward branch, and for random offsets.
module tb_branch_target;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [31:0] pc_plus4, offset_ext, target;
  int checks = 0, failures = 0;

  branch_target #(.WIDTH(32)) dut (.pc_plus4, .offset_ext, .target);

  task automatic check(logic [31:0] p4, int signed off, logic [31:0] exp);
    pc_plus4 = p4; offset_ext = off; #1; checks++;
    if (target !== exp) begin failures++; $display("FAIL %h + %0d*4 -> %h exp %h", p4, off, target, exp); end
  endtask

  initial begin
    check(32'h0000_0104, 3, 32'h0000_0110);   // 12 bytes past PC+4
    check(32'h0000_0104, -1, 32'h0000_0100);  // branch to itself
    check(32'h0000_0010, -4, 32'h0000_0000);
    check(32'h0000_0000, 32767, 32'h0001_FFFC);
    for (int i = 0; i < 1000; i++) begin
      int signed off;
      logic [31:0] p4;
      off = $signed(16'($urandom));
      p4 = {$urandom} & 32'hFFFF_FFFC;
      check(p4, off, p4 + 32'(off * 4));
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
