// mips_pkg: types and constants shared by the single-cycle MIPS datapath.
//
// Holds the instruction-field encodings the control unit decodes, the
// 3-bit ALU operation codes the control unit drives onto ALUOp, and the
// struct that bundles the ten control outputs. The ALUOp codes and the
// R-type/lw/sw/beq opcodes follow the design's control tables; the func
// codes other than add are the standard MIPS ones.
package mips_pkg;

  // ALU operation selected by ALUOp (3 bits).
  typedef enum logic [2:0] {
    ALU_AND = 3'b000,
    ALU_OR  = 3'b001,
    ALU_ADD = 3'b010,
    ALU_SUB = 3'b110,
    ALU_SLT = 3'b111
  } alu_op_e;

  // Opcode field I[31:26].
  localparam logic [5:0] OP_RTYPE = 6'b000000;
  localparam logic [5:0] OP_LW    = 6'b100011;
  localparam logic [5:0] OP_SW    = 6'b101011;
  localparam logic [5:0] OP_BEQ   = 6'b000100;

  // Func field I[5:0] of R-type instructions.
  localparam logic [5:0] FN_ADD = 6'b100000;
  localparam logic [5:0] FN_SUB = 6'b100010;
  localparam logic [5:0] FN_AND = 6'b100100;
  localparam logic [5:0] FN_OR  = 6'b100101;
  localparam logic [5:0] FN_SLT = 6'b101010;

  // The ten control outputs of the control unit.
  typedef struct packed {
    logic    reg_dst;    // 1: write register is rd (I[15:11]); 0: rt (I[20:16])
    logic    reg_write;  // write the register file at the clock edge
    logic    alu_src;    // 1: ALU operand B is the sign-extended immediate
    alu_op_e alu_op;     // ALU operation
    logic    mem_write;  // write data memory at the clock edge
    logic    mem_read;   // read data memory
    logic    mem_to_reg; // 1: register write data comes from data memory
    logic    pc_src;     // 1: next PC is the branch target
  } ctrl_t;

endpackage
