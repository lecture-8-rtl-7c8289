// tb_control_unit: self-checking test of the control unit.
// For each of the eight instructions, with Zero at 0 and at 1, compares the ten control
// signals with the control signal table written out here as literals. Don't-care
// entries are not compared. Unsupported opcodes and function codes must assert no
// write, read or branch.
module tb_control_unit;
  import mips_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [5:0] op, funct;
  logic       zero;
  ctrl_t      ctrl;
  int checks = 0, failures = 0;

  control_unit dut (.op, .funct, .zero, .ctrl);

  // expected: {RegDst, RegWrite, ALUSrc, ALUOp[2:0], MemWrite, MemRead, MemToReg}
  // care mask marks the bits the table does not leave as X
  task automatic row(string name, logic [5:0] o, logic [5:0] f, logic [8:0] exp,
                     logic [8:0] care, logic branch);
    for (int z = 0; z < 2; z++) begin
      logic [8:0] got;
      op = o; funct = f; zero = z[0];
      #1;
      got = {ctrl.reg_dst, ctrl.reg_write, ctrl.alu_src, ctrl.alu_op,
             ctrl.mem_write, ctrl.mem_read, ctrl.mem_to_reg};
      checks++;
      if (((got ^ exp) & care) != 0 || ctrl.pc_src !== (branch && z == 1)) begin
        failures++;
        $display("FAIL %s zero=%0d got=%b pcsrc=%b expected=%b", name, z, got, ctrl.pc_src, exp);
      end
    end
  endtask

  initial begin
    row("add", 6'b000000, 6'b100000, 9'b1_1_0_010_0_0_0, 9'h1FF, 1'b0);
    row("sub", 6'b000000, 6'b100010, 9'b1_1_0_110_0_0_0, 9'h1FF, 1'b0);
    row("and", 6'b000000, 6'b100100, 9'b1_1_0_000_0_0_0, 9'h1FF, 1'b0);
    row("or",  6'b000000, 6'b100101, 9'b1_1_0_001_0_0_0, 9'h1FF, 1'b0);
    row("slt", 6'b000000, 6'b101010, 9'b1_1_0_111_0_0_0, 9'h1FF, 1'b0);
    row("lw",  6'b100011, 6'b000000, 9'b0_1_1_010_0_1_1, 9'h1FF, 1'b0);
    row("sw",  6'b101011, 6'b111111, 9'b0_0_1_010_1_0_0, 9'b0_1_1_111_1_1_0, 1'b0);
    row("beq", 6'b000100, 6'b000011, 9'b0_0_0_110_0_0_0, 9'b0_1_1_111_1_1_0, 1'b1);
    // unsupported encodings must not change state
    for (int i = 0; i < 64; i++) begin
      if (i inside {6'b000000, 6'b000100, 6'b100011, 6'b101011}) continue;
      op = 6'(i); funct = $urandom; zero = $urandom;
      #1; checks++;
      if (ctrl.reg_write || ctrl.mem_write || ctrl.pc_src) begin
        failures++; $display("FAIL opcode %b changes state", op);
      end
    end
    op = 6'b000000; funct = 6'b000111; zero = 1'b1; #1; checks++;
    if (ctrl.reg_write || ctrl.mem_write || ctrl.pc_src) begin
      failures++; $display("FAIL unsupported funct writes");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
