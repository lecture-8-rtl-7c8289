// tb_mux2: self-checking test of the two-input multiplexer at the two widths the
// datapath uses (5 bits for RegDst, 32 bits for the others).
module tb_mux2;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [31:0] a32, b32, y32;
  logic [4:0]  a5, b5, y5;
  logic        sel;
  int checks = 0, failures = 0;

  mux2 #(.WIDTH(32)) dut32 (.d0(a32), .d1(b32), .sel, .y(y32));
  mux2 #(.WIDTH(5))  dut5  (.d0(a5),  .d1(b5),  .sel, .y(y5));

  initial begin
    for (int i = 0; i < 1000; i++) begin
      a32 = $urandom; b32 = $urandom; a5 = $urandom; b5 = $urandom; sel = i[0];
      #1; checks++;
      if (y32 !== (i[0] ? b32 : a32) || y5 !== (i[0] ? b5 : a5)) begin
        failures++; $display("FAIL sel=%b", sel);
      end
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
