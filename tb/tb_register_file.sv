// tb_register_file: self-checking test of the register file.
// Resets, then runs 3000 cycles of random writes and dual reads against a shadow array.
// Checks that reads are combinational, that a write lands at the clock edge (a read of
// the register being written still returns the old value in that cycle), that RegWrite=0
// writes nothing, and that register 0 stays zero.
module tb_register_file;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic        rst, reg_write;
  logic [4:0]  ra1, ra2, wa;
  logic [31:0] rd1, rd2, wd;
  logic [31:0] shadow [32];
  int checks = 0, failures = 0;

  register_file dut (
    .clk, .rst, .read_reg1(ra1), .read_reg2(ra2), .read_data1(rd1), .read_data2(rd2),
    .reg_write, .write_reg(wa), .write_data(wd)
  );

  task automatic check_reads();
    checks++;
    if (rd1 !== shadow[ra1] || rd2 !== shadow[ra2]) begin
      failures++;
      $display("FAIL read r%0d=%h (exp %h) r%0d=%h (exp %h)", ra1, rd1, shadow[ra1], ra2, rd2, shadow[ra2]);
    end
  endtask

  initial begin
    foreach (shadow[i]) shadow[i] = '0;
    rst = 1; reg_write = 0; ra1 = 0; ra2 = 0; wa = 0; wd = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int r = 0; r < 32; r++) begin
      ra1 = 5'(r); ra2 = 5'(31 - r); #1; check_reads();
    end
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      reg_write = ($urandom % 4) != 0;
      wa = $urandom; wd = $urandom;
      ra1 = (i % 3 == 0) ? wa : 5'($urandom);
      ra2 = $urandom;
      #1 check_reads();         // before the edge: old values
      @(posedge clk);
      if (reg_write && wa != 0) shadow[wa] = wd;
      #1 check_reads();         // after the edge: new values
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
