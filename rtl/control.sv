// control: the single-cycle control unit.
//
// A flat combinational decoder with 13 input bits (opcode I[31:26], func
// I[5:0] and the ALU's Zero flag) and 10 output bits (RegDst, RegWrite,
// ALUSrc, ALUOp[2:0], MemWrite, MemRead, MemToReg, PCSrc), implementing
// the control table of the design:
//
//   instr  RegDst RegWrite ALUSrc ALUOp MemWrite MemRead MemToReg
//   add      1      1        0     010     0       0       0
//   sub      1      1        0     110     0       0       0
//   and      1      1        0     000     0       0       0
//   or       1      1        0     001     0       0       0
//   slt      1      1        0     111     0       0       0
//   lw       0      1        1     010     0       1       1
//   sw       -      0        1     010     1       0       -
//   beq      -      0        0     110     0       0       -
//
// PCSrc is set for beq when Zero is 1. The don't-care entries are
// driven 0. Any other opcode or R-type func sets no write enable and
// no branch, so an unknown instruction changes nothing but the PC;
// that, and the func codes other than add, are this design's choices.
module control
  import mips_pkg::*;
(
  input  logic [5:0] opcode,
  input  logic [5:0] func,
  input  logic       zero,
  output ctrl_t      ctrl
);
  always_comb begin
    ctrl = '{reg_dst: 1'b0, reg_write: 1'b0, alu_src: 1'b0, alu_op: ALU_ADD,
             mem_write: 1'b0, mem_read: 1'b0, mem_to_reg: 1'b0, pc_src: 1'b0};
    unique case (opcode)
      OP_RTYPE: begin
        ctrl.reg_dst   = 1'b1;
        ctrl.reg_write = 1'b1;
        unique case (func)
          FN_ADD:  ctrl.alu_op = ALU_ADD;
          FN_SUB:  ctrl.alu_op = ALU_SUB;
          FN_AND:  ctrl.alu_op = ALU_AND;
          FN_OR:   ctrl.alu_op = ALU_OR;
          FN_SLT:  ctrl.alu_op = ALU_SLT;
          default: begin
            ctrl.reg_dst   = 1'b0;
            ctrl.reg_write = 1'b0;
          end
        endcase
      end
      OP_LW: begin
        ctrl.reg_write  = 1'b1;
        ctrl.alu_src    = 1'b1;
        ctrl.mem_read   = 1'b1;
        ctrl.mem_to_reg = 1'b1;
      end
      OP_SW: begin
        ctrl.alu_src   = 1'b1;
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
