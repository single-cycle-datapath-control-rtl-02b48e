// alu: the WIDTH-bit arithmetic-logic unit.
//
// The 3-bit ALUOp selects the operation: 000 and, 001 or, 010 add,
// 110 subtract, 111 set-on-less-than (result 1 if a < b as signed
// numbers, else 0). These codes come from the design's control table.
// Zero is 1 when the result is 0; beq subtracts its two registers and
// branches on Zero. Other ALUOp codes give 0. There is no overflow
// detection. Signed slt and the result of unused codes are this
// design's choices. Combinational.
module alu
  import mips_pkg::*;
#(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  alu_op_e          op,
  output logic [WIDTH-1:0] result,
  output logic             zero
);
  always_comb begin
    unique case (op)
      ALU_AND: result = a & b;
      ALU_OR:  result = a | b;
      ALU_ADD: result = a + b;
      ALU_SUB: result = a - b;
      ALU_SLT: result = {{(WIDTH-1){1'b0}}, $signed(a) < $signed(b)};
      default: result = '0;
    endcase
    zero = (result == '0);
  end
endmodule
