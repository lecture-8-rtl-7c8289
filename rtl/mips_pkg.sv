// mips_pkg: encodings and types shared by the single-cycle MIPS-subset processor.
//
// The processor runs seven instructions: the R-type add, sub, and, or and slt, and the
// I-type lw, sw and beq. This package holds their opcode and function-field values, the
// 3-bit ALU operation codes, and the bundle of control signals that the control unit
// drives into the datapath.
//
// The lw, sw, beq and add encodings and the ALU operation codes follow the lecture
// material this design is built from. The function fields of sub, and, or and slt are the
// standard MIPS values, as the material defers them to the instruction set reference.
package mips_pkg;

  // Opcode field, instr[31:26]
  typedef enum logic [5:0] {
    OP_RTYPE = 6'b000000,
    OP_BEQ   = 6'b000100,
    OP_LW    = 6'b100011,
    OP_SW    = 6'b101011
  } opcode_e;

  // Function field of R-type instructions, instr[5:0]
  typedef enum logic [5:0] {
    FN_ADD = 6'b100000,
    FN_SUB = 6'b100010,
    FN_AND = 6'b100100,
    FN_OR  = 6'b100101,
    FN_SLT = 6'b101010
  } funct_e;

  // ALU operation select (the ALUOp control signal)
  typedef enum logic [2:0] {
    ALU_AND = 3'b000,
    ALU_OR  = 3'b001,
    ALU_ADD = 3'b010,
    ALU_SUB = 3'b110,
    ALU_SLT = 3'b111
  } alu_op_e;

  // The ten control signal bits, in the order of the control signal table.
  typedef struct packed {
    logic    reg_dst;     // 1: destination register from rd, 0: from rt
    logic    reg_write;   // 1: write the register file
    logic    alu_src;     // 1: ALU operand B is the sign-extended immediate
    alu_op_e alu_op;      // ALU operation
    logic    mem_write;   // 1: write data memory
    logic    mem_read;    // 1: read data memory
    logic    mem_to_reg;  // 1: write-back data comes from data memory
    logic    pc_src;      // 1: next PC is the branch target
  } ctrl_t;

  // Instruction field views
  typedef struct packed {
    logic [5:0] op;
    logic [4:0] rs;
    logic [4:0] rt;
    logic [4:0] rd;
    logic [4:0] shamt;
    logic [5:0] funct;
  } rtype_t;

  typedef struct packed {
    logic [5:0]  op;
    logic [4:0]  rs;
    logic [4:0]  rt;
    logic [15:0] imm;
  } itype_t;

endpackage
