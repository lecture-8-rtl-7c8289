// tb_sign_extend: self-checking test of the 16-to-32-bit sign extension, exhaustive
// over all 65536 immediates, plus the -4 and 16 offsets of the lw/sw examples.
module tb_sign_extend;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [15:0] imm;
  logic [31:0] ext;
  int checks = 0, failures = 0;

  sign_extend #(.IN_WIDTH(16), .OUT_WIDTH(32)) dut (.imm, .ext);

  initial begin
    imm = 16'hFFFC; #1; checks++;
    if (ext !== 32'hFFFF_FFFC) begin failures++; $display("FAIL -4"); end
    imm = 16'h0010; #1; checks++;
    if (ext !== 32'h0000_0010) begin failures++; $display("FAIL 16"); end
    for (int i = 0; i < 65536; i++) begin
      int signed v;
      imm = 16'(i);
      v = (i >= 32768) ? i - 65536 : i;
      #1; checks++;
      if (ext !== 32'(v)) begin failures++; $display("FAIL %h -> %h", imm, ext); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
