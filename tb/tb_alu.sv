// tb_alu: self-checking test of the ALU.
// Drives directed corner cases and 2000 random operand pairs through all five
// operations and compares result and Zero with values computed here. Also checks that
// the unused operation codes give zero.
module tb_alu;
  import mips_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [31:0] a, b, result;
  alu_op_e     op;
  logic        zero;
  int checks = 0, failures = 0;

  alu #(.WIDTH(32)) dut (.a, .b, .alu_op(op), .result, .zero);

  function automatic logic [31:0] model(alu_op_e o, logic [31:0] x, logic [31:0] y);
    int signed sx, sy;
    sx = x; sy = y;
    case (o)
      ALU_AND: return x & y;
      ALU_OR:  return x | y;
      ALU_ADD: return x + y;
      ALU_SUB: return x + ~y + 1;
      ALU_SLT: return (sx < sy) ? 32'd1 : 32'd0;
      default: return 32'd0;
    endcase
  endfunction

  task automatic check(alu_op_e o, logic [31:0] x, logic [31:0] y);
    logic [31:0] exp;
    op = o; a = x; b = y;
    #1;
    exp = model(o, x, y);
    checks++;
    if (result !== exp || zero !== (exp == 0)) begin
      failures++;
      $display("FAIL op=%b a=%h b=%h result=%h zero=%b expected %h", o, x, y, result, zero, exp);
    end
  endtask

  localparam alu_op_e OPS[5] = '{ALU_AND, ALU_OR, ALU_ADD, ALU_SUB, ALU_SLT};

  initial begin
    // directed: equality test via subtraction, signed compare, overflow wrap
    check(ALU_SUB, 32'd7, 32'd7);
    check(ALU_SUB, 32'd7, 32'd8);
    check(ALU_SLT, 32'hFFFF_FFFF, 32'd1);   // -1 < 1
    check(ALU_SLT, 32'd1, 32'hFFFF_FFFF);   // 1 < -1 false
    check(ALU_SLT, 32'h8000_0000, 32'h7FFF_FFFF);
    check(ALU_SLT, 32'd5, 32'd5);
    check(ALU_ADD, 32'hFFFF_FFFF, 32'd1);   // wraps to 0, Zero=1
    check(ALU_ADD, 32'h7FFF_FFF0, 32'hFFFF_FFFC); // base + (-4)
    check(ALU_AND, 32'hF0F0_F0F0, 32'h0F0F_0F0F);
    check(ALU_OR,  32'hF0F0_0000, 32'h0000_0F0F);
    // direct expectations, independent of the model function
    op = ALU_SLT; a = 32'hFFFF_FFFE; b = 32'd3; #1;
    checks++; if (result !== 32'd1) begin failures++; $display("FAIL slt -2<3"); end
    op = ALU_SUB; a = 32'd10; b = 32'd3; #1;
    checks++; if (result !== 32'd7 || zero) begin failures++; $display("FAIL sub 10-3"); end
    for (int i = 0; i < 2000; i++) begin
      logic [31:0] x, y;
      x = $urandom; y = (i % 7 == 0) ? x : $urandom;
      check(OPS[i % 5], x, y);
    end
    // unused codes
    for (int c = 3; c <= 5; c++) begin
      op = alu_op_e'(c); a = $urandom | 1; b = $urandom | 1; #1;
      checks++; if (result !== 0 || !zero) begin failures++; $display("FAIL unused code %0d", c); end
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
