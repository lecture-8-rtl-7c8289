// tb_single_cycle_cpu: end-to-end test of the single-cycle processor at reduced memory
// depth (2^10 words per memory). Runs the directed program and three random programs of
// 300 instructions, comparing every instruction's effect with the reference model in
// cpu_checker, and checks one cycle per instruction.
module tb_single_cycle_cpu;
  import mips_pkg::*;

  localparam int AB = 10;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic          rst, imem_load_we, dmem_load_we;
  logic [AB-1:0] imem_load_addr;
  logic [31:0]   imem_load_data, dmem_load_addr, dmem_load_data;
  logic [31:0]   retire_pc, retire_instr, retire_next_pc, retire_reg_data;
  logic [31:0]   retire_mem_addr, retire_mem_data;
  logic          retire_reg_write, retire_mem_write;
  logic [4:0]    retire_reg_addr;
  ctrl_t         retire_ctrl;
  logic          done;
  int            checks, failures, wd_fail;

  single_cycle_cpu #(.IMEM_ADDR_BITS(AB), .DMEM_ADDR_BITS(AB)) dut (.*);

  cpu_checker #(.IMEM_AB(AB), .DMEM_AB(AB), .N_RANDOM(3), .RAND_LEN(300)) chk (.*);

  initial begin
    wd_fail = 0;
    fork
      begin @(posedge clk); wait (done); end
      begin repeat (200000) @(posedge clk); wd_fail = 1; $display("watchdog expired"); end
    join_any
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + wd_fail);
    $finish;
  end
endmodule
