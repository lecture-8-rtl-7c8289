// cpu_checker: program generator, loader and instruction-by-instruction reference
// model for testing single_cycle_cpu end to end.
//
// For each test program it holds the processor in reset, writes the program through the
// instruction-memory load port and a table of constants through the data-memory load
// port, then releases reset. A reference model of the instruction set, written here
// independently of the RTL, executes the same program. At every falling clock edge the
// processor's retire outputs (PC, instruction, next PC, register write, memory write)
// are compared with what the model says the instruction must do; the model then
// advances. A program ends at the halt instruction, a beq $0,$0 to itself.
//
// Program 0 is directed: it runs the lecture-style examples (add $s4,$t1,$t2;
// lw $t0,-4($sp); sw with a positive offset; a taken beq that skips three instructions)
// and a loop that sums an eight-word array with a backward branch. Its final register
// values are also checked against hand-computed numbers. The other programs are random
// mixes of all eight instructions.
//
// Every instruction must take exactly one cycle: the cycle count from reset release to
// the halt must equal the number of instructions the model executed. The counters of
// each instruction kind (and of taken/not-taken branches, negative offsets and writes to
// $0) must all end above zero.
module cpu_checker
  import mips_pkg::*;
#(
  parameter int unsigned IMEM_AB = 10,
  parameter int unsigned DMEM_AB = 10,
  parameter int unsigned N_RANDOM = 3,
  parameter int unsigned RAND_LEN = 300
) (
  input  logic               clk,
  output logic               rst,
  output logic               imem_load_we,
  output logic [IMEM_AB-1:0] imem_load_addr,
  output logic [31:0]        imem_load_data,
  output logic               dmem_load_we,
  output logic [31:0]        dmem_load_addr,
  output logic [31:0]        dmem_load_data,
  input  logic [31:0]        retire_pc,
  input  logic [31:0]        retire_instr,
  input  logic [31:0]        retire_next_pc,
  input  logic               retire_reg_write,
  input  logic [4:0]         retire_reg_addr,
  input  logic [31:0]        retire_reg_data,
  input  logic               retire_mem_write,
  input  logic [31:0]        retire_mem_addr,
  input  logic [31:0]        retire_mem_data,
  output logic               done,
  output int                 checks,
  output int                 failures
);

  localparam logic [31:0] HALT = 32'h1000_FFFF;  // beq $0, $0, -1
  localparam int DATA_WORDS = 512;               // preset words 0..511
  localparam int SP = 29;                        // base register of the random programs

  // ---- instruction encoders ----
  function automatic logic [31:0] r_ins(funct_e f, int rd, int rs, int rt);
    return {OP_RTYPE, 5'(rs), 5'(rt), 5'(rd), 5'd0, f};
  endfunction
  function automatic logic [31:0] i_ins(opcode_e o, int rt, int rs, int imm);
    return {o, 5'(rs), 5'(rt), 16'(imm)};
  endfunction

  // ---- program image ----
  logic [31:0] prog [$];
  logic [31:0] dinit [DATA_WORDS];

  // ---- reference model state ----
  logic [31:0] r [32];
  logic [31:0] dm [int unsigned];
  logic [31:0] mpc;

  // ---- mechanism counters ----
  int n_add, n_sub, n_and, n_or, n_slt, n_lw, n_sw, n_beq_t, n_beq_nt, n_negoff, n_r0;
  int cycles, executed;

  task automatic fail(string msg);
    failures++;
    if (failures < 20) $display("FAIL: %s (pc=%h instr=%h)", msg, retire_pc, retire_instr);
  endtask

  function automatic logic [31:0] fetch(logic [31:0] pc);
    int unsigned w = pc[IMEM_AB+1:2];
    return (w < prog.size()) ? prog[w] : HALT;
  endfunction

  // Compare the processor's retire outputs with the model for one instruction, then
  // advance the model.
  task automatic step_and_compare();
    logic [31:0] ins, a, b, res, nxt, ea;
    logic        we;
    logic [4:0]  wa;
    int signed   imm;
    int unsigned wd;
    ins = fetch(mpc);
    a = r[ins[25:21]];
    b = r[ins[20:16]];
    imm = $signed(ins[15:0]);
    nxt = mpc + 4;
    we = 0; wa = 0; res = 0;
    checks++;
    if (retire_pc !== mpc || retire_instr !== ins) fail($sformatf("fetch: expected pc %h instr %h", mpc, ins));
    case (ins[31:26])
      OP_RTYPE: begin
        we = 1; wa = ins[15:11];
        case (ins[5:0])
          FN_ADD: begin res = a + b; n_add++; end
          FN_SUB: begin res = a - b; n_sub++; end
          FN_AND: begin res = a & b; n_and++; end
          FN_OR:  begin res = a | b; n_or++;  end
          FN_SLT: begin res = ($signed(a) < $signed(b)) ? 1 : 0; n_slt++; end
          default: we = 0;
        endcase
      end
      OP_LW: begin
        ea = a + 32'(imm);
        wd = ea[DMEM_AB+1:2];
        if (imm < 0) n_negoff++;
        if (!dm.exists(wd)) fail("test program reads an unset data word");
        we = 1; wa = ins[20:16]; res = dm.exists(wd) ? dm[wd] : 32'd0; n_lw++;
      end
      OP_SW: begin
        ea = a + 32'(imm);
        wd = ea[DMEM_AB+1:2];
        if (imm < 0) n_negoff++;
        checks++;
        if (!retire_mem_write || retire_mem_addr !== ea || retire_mem_data !== b)
          fail($sformatf("store: expected M[%h] = %h", ea, b));
        dm[wd] = b; n_sw++;
      end
      OP_BEQ: begin
        if (a == b) begin nxt = mpc + 4 + 32'(imm * 4); n_beq_t++; end
        else n_beq_nt++;
      end
      default: ;
    endcase
    if (ins[31:26] != OP_SW) begin
      checks++;
      if (retire_mem_write) fail("unexpected memory write");
    end
    checks++;
    if (retire_next_pc !== nxt) fail($sformatf("next pc: expected %h got %h", nxt, retire_next_pc));
    checks++;
    if (we) begin
      if (wa == 0) n_r0++;
      if (!retire_reg_write || retire_reg_addr !== wa || retire_reg_data !== res)
        fail($sformatf("register write: expected r%0d = %h, got we=%b r%0d = %h",
                       wa, res, retire_reg_write, retire_reg_addr, retire_reg_data));
      if (wa != 0) r[wa] = res;
    end else if (retire_reg_write) fail("unexpected register write");
    mpc = nxt;
    executed++;
  endtask

  // ---- program builders ----
  task automatic build_directed();
    prog.delete();
    foreach (dinit[i]) dinit[i] = 32'h1000 + i;
    dinit[0] = 32'h200;           // $sp
    dinit[1] = 7;                 // $t1
    dinit[2] = 5;                 // $t2
    dinit[3] = 32'hFFFF_FFFD;     // -3
    dinit[4] = 9;                 // $v0
    dinit[6] = 32'h80;            // array start
    dinit[7] = 32'hA0;            // array end
    dinit[8] = 4;                 // stride
    dinit[127] = 32'h0000_CAFE;   // the word at $sp - 4
    for (int i = 0; i < 8; i++) dinit[32 + i] = i + 1;
    prog.push_back(i_ins(OP_LW, SP, 0, 0));            // lw $sp, 0($0)
    prog.push_back(i_ins(OP_LW, 9, 0, 4));             // lw $t1, 4($0)
    prog.push_back(i_ins(OP_LW, 10, 0, 8));            // lw $t2, 8($0)
    prog.push_back(i_ins(OP_LW, 2, 0, 16));            // lw $v0, 16($0)
    prog.push_back(r_ins(FN_ADD, 20, 9, 10));          // add $s4, $t1, $t2
    prog.push_back(r_ins(FN_SUB, 11, 9, 10));          // sub $t3, $t1, $t2
    prog.push_back(r_ins(FN_AND, 12, 9, 10));          // and $t4, $t1, $t2
    prog.push_back(r_ins(FN_OR,  13, 9, 10));          // or  $t5, $t1, $t2
    prog.push_back(r_ins(FN_SLT, 14, 10, 9));          // slt $t6, $t2, $t1
    prog.push_back(i_ins(OP_LW, 15, 0, 12));           // lw  $t7, 12($0)
    prog.push_back(r_ins(FN_SLT, 24, 15, 9));          // slt $t8, $t7, $t1 (signed)
    prog.push_back(i_ins(OP_SW, 20, SP, 16));          // sw  $s4, 16($sp)
    prog.push_back(i_ins(OP_LW, 8, SP, -4));           // lw  $t0, -4($sp)
    prog.push_back(i_ins(OP_LW, 4, SP, 16));           // lw  $a0, 16($sp)
    prog.push_back(r_ins(FN_ADD, 0, 9, 9));            // add $0, $t1, $t1 (no effect)
    prog.push_back(i_ins(OP_BEQ, 0, 1, 3));            // beq $at, $0, L
    prog.push_back(r_ins(FN_ADD, 3, 2, 0));            // add $v1, $v0, $0
    prog.push_back(r_ins(FN_ADD, 3, 3, 3));            // add $v1, $v1, $v1
    prog.push_back(r_ins(FN_ADD, 3, 9, 9));            // stands in for j Somewhere
    prog.push_back(r_ins(FN_ADD, 3, 2, 2));            // L: add $v1, $v0, $v0
    prog.push_back(i_ins(OP_BEQ, 9, 10, 5));           // beq $t2, $t1 (not taken)
    prog.push_back(i_ins(OP_LW, 16, 0, 24));           // lw $s0, 24($0)  array start
    prog.push_back(i_ins(OP_LW, 17, 0, 28));           // lw $s1, 28($0)  array end
    prog.push_back(i_ins(OP_LW, 19, 0, 32));           // lw $s3, 32($0)  stride
    prog.push_back(r_ins(FN_SUB, 18, 18, 18));         // sum = 0
    prog.push_back(i_ins(OP_BEQ, 17, 16, 4));          // loop: beq $s0, $s1, exit
    prog.push_back(i_ins(OP_LW, 25, 16, 0));           // lw $t9, 0($s0)
    prog.push_back(r_ins(FN_ADD, 18, 18, 25));         // add $s2, $s2, $t9
    prog.push_back(r_ins(FN_ADD, 16, 16, 19));         // add $s0, $s0, $s3
    prog.push_back(i_ins(OP_BEQ, 0, 0, -5));           // beq $0, $0, loop
    prog.push_back(i_ins(OP_SW, 18, 0, 32'hC0));       // exit: sw $s2, 0xC0($0)
    prog.push_back(i_ins(OP_LW, 26, 0, 32'hC0));       // lw $k0, 0xC0($0)
    prog.push_back(HALT);
  endtask

  task automatic build_random();
    int n;
    prog.delete();
    foreach (dinit[i]) dinit[i] = $urandom;
    dinit[0] = 32'h400;                                // $sp, words 256 +- 64
    foreach (dinit[i]) if (i % 16 == 5) dinit[i] = dinit[i - 1]; // equal pairs for beq
    prog.push_back(i_ins(OP_LW, SP, 0, 0));
    for (int i = 0; i < 31; i++) if (i != 0 && i != SP) prog.push_back(i_ins(OP_LW, i, 0, 4 * i));
    n = RAND_LEN;
    for (int i = 0; i < n; i++) begin
      int k, rd, rs, rt;
      k = $urandom % 10;
      rs = $urandom % 32; rt = $urandom % 32; rd = $urandom % 32;
      if (rd == SP) rd = 0;
      case (k)
        0: prog.push_back(r_ins(FN_ADD, rd, rs, rt));
        1: prog.push_back(r_ins(FN_SUB, rd, rs, rt));
        2: prog.push_back(r_ins(FN_AND, rd, rs, rt));
        3: prog.push_back(r_ins(FN_OR,  rd, rs, rt));
        4: prog.push_back(r_ins(FN_SLT, rd, rs, rt));
        5: begin
          if (rt == SP) rt = 0;
          if ($urandom % 2 == 1) prog.push_back(i_ins(OP_LW, rt, 0, 4 * ($urandom % 256)));
          else prog.push_back(i_ins(OP_LW, rt, SP, 4 * (int'($urandom % 128) - 64)));
        end
        6, 7: begin
          if ($urandom % 2 == 1) prog.push_back(i_ins(OP_SW, rt, 0, 4 * ($urandom % 256)));
          else prog.push_back(i_ins(OP_SW, rt, SP, 4 * (int'($urandom % 128) - 64)));
        end
        default: begin
          if ($urandom % 2 == 1) rt = rs;  // make about half of the branches taken
          prog.push_back(i_ins(OP_BEQ, rt, rs, $urandom % 4));
        end
      endcase
    end
    repeat (4) prog.push_back(HALT);
  endtask

  // ---- run one program ----
  task automatic run_program(int id);
    int start_exec, limit;
    @(negedge clk);
    rst = 1'b1;
    foreach (prog[i]) begin
      @(negedge clk);
      imem_load_we = 1'b1; imem_load_addr = IMEM_AB'(i); imem_load_data = prog[i];
    end
    @(negedge clk) imem_load_we = 1'b0;
    dm.delete();
    for (int i = 0; i < DATA_WORDS; i++) begin
      @(negedge clk);
      dmem_load_we = 1'b1; dmem_load_addr = 32'(i * 4); dmem_load_data = dinit[i];
      dm[i] = dinit[i];
    end
    @(negedge clk) dmem_load_we = 1'b0;
    foreach (r[i]) r[i] = '0;
    mpc = 32'h0;
    @(negedge clk) rst = 1'b0;
    start_exec = executed;
    cycles = 0;
    limit = 20 * prog.size() + 100;
    #1;
    forever begin
      if (fetch(mpc) == HALT) begin
        step_and_compare();  // the halt itself: a taken beq to its own address
        break;
      end
      step_and_compare();
      cycles++;
      if (cycles > limit) begin fail("program did not reach the halt"); break; end
      @(negedge clk);
    end
    // one cycle per instruction
    checks++;
    if (cycles != executed - start_exec - 1)
      fail($sformatf("program %0d: %0d cycles for %0d instructions", id, cycles, executed - start_exec - 1));
    $display("program %0d: %0d instructions in %0d cycles", id, executed - start_exec - 1, cycles);
  endtask

  task automatic expect_reg(int n, logic [31:0] v);
    checks++;
    if (r[n] !== v) fail($sformatf("directed program: r%0d = %h, expected %h", n, r[n], v));
  endtask

  initial begin
    checks = 0; failures = 0; done = 1'b0; executed = 0;
    {n_add, n_sub, n_and, n_or, n_slt, n_lw, n_sw, n_beq_t, n_beq_nt, n_negoff, n_r0} = '0;
    rst = 1'b1;
    imem_load_we = 1'b0; imem_load_addr = '0; imem_load_data = '0;
    dmem_load_we = 1'b0; dmem_load_addr = '0; dmem_load_data = '0;
    repeat (2) @(posedge clk);

    build_directed();
    run_program(0);
    // hand-computed results (the model tracked the processor's writes cycle by cycle)
    expect_reg(20, 12);            // add $s4 = 7 + 5
    expect_reg(11, 2);             // sub
    expect_reg(12, 5);             // and 0111 & 0101
    expect_reg(13, 7);             // or
    expect_reg(14, 1);             // slt 5 < 7
    expect_reg(24, 1);             // slt -3 < 7
    expect_reg(8, 32'hCAFE);       // lw $t0, -4($sp)
    expect_reg(4, 12);             // value stored by sw and loaded back
    expect_reg(3, 18);             // L: $v1 = 9 + 9, the skipped adds had no effect
    expect_reg(18, 36);            // 1 + 2 + ... + 8
    expect_reg(26, 36);
    expect_reg(0, 0);

    for (int p = 1; p <= int'(N_RANDOM); p++) begin
      build_random();
      run_program(p);
    end

    $display("mechanisms: add=%0d sub=%0d and=%0d or=%0d slt=%0d lw=%0d sw=%0d beq_taken=%0d beq_not_taken=%0d neg_offset=%0d write_r0=%0d",
             n_add, n_sub, n_and, n_or, n_slt, n_lw, n_sw, n_beq_t, n_beq_nt, n_negoff, n_r0);
    checks++;
    if (n_add == 0 || n_sub == 0 || n_and == 0 || n_or == 0 || n_slt == 0 || n_lw == 0 ||
        n_sw == 0 || n_beq_t == 0 || n_beq_nt == 0 || n_negoff == 0 || n_r0 == 0)
      fail("a mechanism was never exercised");
    done = 1'b1;
  end

endmodule
