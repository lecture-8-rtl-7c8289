// single_cycle_cpu: a single-cycle processor for a MIPS subset (add, sub, and, or, slt,
// lw, sw, beq).
//
// Every instruction completes in one clock cycle. In that cycle the PC addresses the
// instruction memory; the register file reads rs and rt; the ALU works on Read data 1
// and either Read data 2 or the sign-extended immediate (ALUSrc); the data memory is read
// or written at the ALU result; and the register chosen by RegDst (rt or rd) receives
// either the ALU result or the loaded word (MemToReg). In parallel, one adder forms
// PC + 4 and a second adds the shifted branch offset to it; PCSrc, raised by beq when the
// ALU's Zero flag is set, picks which of the two the PC loads at the clock edge. A
// combinational control unit drives all ten control signals from the opcode, the
// function field and Zero.
//
// Instruction and data memories are separate (Harvard organisation). The processor
// cannot write the instruction memory; a program is put there through the imem_load_*
// port, and data can be preset through the dmem_load_* port, both while rst is held.
// The retire_* outputs show what the current instruction does to the architectural state
// at the coming clock edge, for observation by a testbench or a debugger.
//
// The datapath, the control table and the memory organisation follow the source
// material. Memory depth is 2^28 words each (the material gives 2^30, which the
// simulator used to check this design does not accept). The load ports, the reset and the
// retire outputs are additions of this design.
module single_cycle_cpu
  import mips_pkg::*;
#(
  parameter int unsigned IMEM_ADDR_BITS = 28,
  parameter int unsigned DMEM_ADDR_BITS = 28,
  parameter logic [31:0] RESET_PC = 32'h0000_0000
) (
  input  logic                      clk,
  input  logic                      rst,             // synchronous, active high
  // program and data preload, used while rst is 1
  input  logic                      imem_load_we,
  input  logic [IMEM_ADDR_BITS-1:0] imem_load_addr,  // word address
  input  logic [31:0]               imem_load_data,
  input  logic                      dmem_load_we,
  input  logic [31:0]               dmem_load_addr,  // byte address
  input  logic [31:0]               dmem_load_data,
  // state change of the instruction in execution
  output logic [31:0]               retire_pc,
  output logic [31:0]               retire_instr,
  output logic [31:0]               retire_next_pc,
  output logic                      retire_reg_write,
  output logic [4:0]                retire_reg_addr,
  output logic [31:0]               retire_reg_data,
  output logic                      retire_mem_write,
  output logic [31:0]               retire_mem_addr,
  output logic [31:0]               retire_mem_data,
  output ctrl_t                     retire_ctrl
);

  logic [31:0] pc, pc_next, pc_plus4, br_target;
  logic [31:0] instr;
  rtype_t      rf;  // R-type view of the instruction
  itype_t      inf; // I-type view of the instruction
  ctrl_t       ctrl;
  logic [4:0]  write_reg;
  logic [31:0] read_data1, read_data2, imm_ext, alu_b, alu_result, mem_rdata, wb_data;
  logic        alu_zero;

  // data memory port: the preload port takes it over while in reset
  logic        dm_we;
  logic [31:0] dm_addr, dm_wdata;

  assign rf  = instr;
  assign inf = instr;

  // ---- instruction fetch ----
  pc_register #(.WIDTH(32), .RESET_PC(RESET_PC)) u_pc (
    .clk, .rst, .pc_next, .pc
  );

  instruction_memory #(.ADDR_BITS(IMEM_ADDR_BITS)) u_imem (
    .clk, .addr(pc), .instr,
    .load_we(imem_load_we), .load_addr(imem_load_addr), .load_data(imem_load_data)
  );

  pc_incrementer #(.WIDTH(32)) u_pc_inc (.pc, .pc_plus4);

  // ---- decode and register read ----
  control_unit u_ctrl (.op(rf.op), .funct(rf.funct), .zero(alu_zero), .ctrl);

  mux2 #(.WIDTH(5)) u_mux_regdst (
    .d0(rf.rt), .d1(rf.rd), .sel(ctrl.reg_dst), .y(write_reg)
  );

  register_file u_regs (
    .clk, .rst,
    .read_reg1(rf.rs), .read_reg2(rf.rt),
    .read_data1, .read_data2,
    .reg_write(ctrl.reg_write & ~rst), .write_reg, .write_data(wb_data)
  );

  sign_extend #(.IN_WIDTH(16), .OUT_WIDTH(32)) u_sext (.imm(inf.imm), .ext(imm_ext));

  // ---- execute ----
  mux2 #(.WIDTH(32)) u_mux_alusrc (
    .d0(read_data2), .d1(imm_ext), .sel(ctrl.alu_src), .y(alu_b)
  );

  alu #(.WIDTH(32)) u_alu (
    .a(read_data1), .b(alu_b), .alu_op(ctrl.alu_op), .result(alu_result), .zero(alu_zero)
  );

  branch_target #(.WIDTH(32)) u_br (.pc_plus4, .offset_ext(imm_ext), .target(br_target));

  mux2 #(.WIDTH(32)) u_mux_pcsrc (
    .d0(pc_plus4), .d1(br_target), .sel(ctrl.pc_src), .y(pc_next)
  );

  // ---- memory access ----
  assign dm_we    = rst ? dmem_load_we   : ctrl.mem_write;
  assign dm_addr  = rst ? dmem_load_addr : alu_result;
  assign dm_wdata = rst ? dmem_load_data : read_data2;

  data_memory #(.ADDR_BITS(DMEM_ADDR_BITS)) u_dmem (
    .clk, .addr(dm_addr), .mem_read(ctrl.mem_read), .mem_write(dm_we),
    .write_data(dm_wdata), .read_data(mem_rdata)
  );

  // ---- write back ----
  mux2 #(.WIDTH(32)) u_mux_memtoreg (
    .d0(alu_result), .d1(mem_rdata), .sel(ctrl.mem_to_reg), .y(wb_data)
  );

  // ---- observation ----
  assign retire_pc        = pc;
  assign retire_instr     = instr;
  assign retire_next_pc   = pc_next;
  assign retire_reg_write = ctrl.reg_write;
  assign retire_reg_addr  = write_reg;
  assign retire_reg_data  = wb_data;
  assign retire_mem_write = ctrl.mem_write;
  assign retire_mem_addr  = alu_result;
  assign retire_mem_data  = read_data2;
  assign retire_ctrl      = ctrl;

  // ---- rules of the datapath ----
  // lw and sw are the only memory instructions, and no instruction both reads and writes.
  a_mem_rw_exclusive: assert property (@(posedge clk) disable iff (rst)
    !(ctrl.mem_read && ctrl.mem_write));
  // The PC only moves in whole instructions, so it stays word aligned after reset.
  a_pc_aligned: assert property (@(posedge clk) disable iff (rst)
    pc[1:0] == RESET_PC[1:0]);

endmodule
