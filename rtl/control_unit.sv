// control_unit: decodes the instruction into the ten datapath control signals.
//
// Inputs are the 6-bit opcode, the 6-bit function field and the ALU's Zero flag, 13 bits
// in all. The outputs are RegDst, RegWrite, ALUSrc, ALUOp (3 bits), MemWrite, MemRead,
// MemToReg and PCSrc. R-type instructions take ALUOp from the function field; lw and sw
// add (010) to form the effective address; beq subtracts (110) so that Zero tells
// equality, and PCSrc is raised when the instruction is beq and Zero is 1.
// Combinational: PCSrc depends on Zero, which the ALU produces in the same cycle.
//
// The table of signal values per instruction follows the source material. Its
// don't-care entries (RegDst and MemToReg of sw and beq) are driven 0 here, and an
// opcode or function code outside the supported set drives every signal 0, so it changes
// no state and only advances the PC; both are choices of this design.
module control_unit
  import mips_pkg::*;
(
  input  logic [5:0] op,     // instr[31:26]
  input  logic [5:0] funct,  // instr[5:0]
  input  logic       zero,   // ALU Zero flag
  output ctrl_t      ctrl
);

  always_comb begin
    ctrl = '{reg_dst: 1'b0, reg_write: 1'b0, alu_src: 1'b0, alu_op: ALU_AND,
             mem_write: 1'b0, mem_read: 1'b0, mem_to_reg: 1'b0, pc_src: 1'b0};
    case (op)
      OP_RTYPE: begin
        case (funct)
          FN_ADD: ctrl.alu_op = ALU_ADD;
          FN_SUB: ctrl.alu_op = ALU_SUB;
          FN_AND: ctrl.alu_op = ALU_AND;
          FN_OR:  ctrl.alu_op = ALU_OR;
          FN_SLT: ctrl.alu_op = ALU_SLT;
          default: ;
        endcase
        if (funct inside {FN_ADD, FN_SUB, FN_AND, FN_OR, FN_SLT}) begin
          ctrl.reg_dst   = 1'b1;
          ctrl.reg_write = 1'b1;
        end
      end
      OP_LW: begin
        ctrl.reg_write  = 1'b1;
        ctrl.alu_src    = 1'b1;
        ctrl.alu_op     = ALU_ADD;
        ctrl.mem_read   = 1'b1;
        ctrl.mem_to_reg = 1'b1;
      end
      OP_SW: begin
        ctrl.alu_src   = 1'b1;
        ctrl.alu_op    = ALU_ADD;
        ctrl.mem_write = 1'b1;
      end
      OP_BEQ: begin
        ctrl.alu_op = ALU_SUB;
        ctrl.pc_src = zero;
      end
      default: ;
    endcase
  end

endmodule
