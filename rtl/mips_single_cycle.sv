// mips_single_cycle: a single-cycle MIPS processor for add, sub, and,
// or, slt, lw, sw and beq.
//
// Every instruction takes exactly one clock cycle. During the cycle the
// PC addresses the instruction memory; the instruction's rs and rt
// fields read the register file; the control unit decodes the opcode and
// func fields; the ALU combines Read data 1 with either Read data 2 or
// the sign-extended immediate; the data memory is read at the ALU
// result; and PC+4 and the branch target PC+4+offset*4 are formed. At
// the rising edge that ends the cycle the register file is written (R
// type and lw), the data memory is written (sw), and the PC takes PC+4
// or, for a taken beq, the branch target. The clock period must
// therefore cover the slowest path, that of lw.
//
// Blocks and wiring follow the classic single-cycle datapath diagram:
// I[25:21] -> Read register 1, I[20:16] -> Read register 2 and RegDst
// mux input 0, I[15:11] -> RegDst mux input 1, I[15:0] -> sign extend ->
// ALUSrc mux input 1 and shift-left-2 -> branch adder. The Zero flag of
// the ALU goes back into the control unit, which raises PCSrc for a beq
// whose operands are equal.
//
// Interface: clk, rst (synchronous, active high: PC and registers to 0).
// The two load ports write one word per clock into the instruction and
// data memories, so a program and its data can be placed while rst is
// held. The outputs expose the current PC and instruction and what the
// instruction will commit at the next edge (register write, memory
// write, branch taken), for observation. The memory sizes, the load
// ports, the reset and these observation outputs are this design's own.
// Assertions at the end state that no instruction writes both a register
// and memory, that a taken branch writes nothing, and that the PC stays
// word aligned.
module mips_single_cycle
  import mips_pkg::*;
#(
  parameter int unsigned IMEM_WORDS = 256,
  parameter int unsigned DMEM_WORDS = 256
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        imem_load_we,
  input  logic [31:0] imem_load_addr,
  input  logic [31:0] imem_load_data,
  input  logic        dmem_load_we,
  input  logic [31:0] dmem_load_addr,
  input  logic [31:0] dmem_load_data,
  output logic [31:0] pc,
  output logic [31:0] instr,
  output logic        reg_write,
  output logic [4:0]  reg_waddr,
  output logic [31:0] reg_wdata,
  output logic        mem_write,
  output logic [31:0] mem_addr,
  output logic [31:0] mem_wdata,
  output logic        pc_src
);
  ctrl_t       ctrl;
  logic [31:0] pc_plus4, pc_next, branch_target;
  logic [31:0] imm_ext, imm_shifted;
  logic [31:0] rd1, rd2, alu_b, alu_result, mem_rdata, wb_data;
  logic [4:0]  wa;
  logic        zero;

  // Fetch and next-PC logic.
  pc_reg      #(.WIDTH(32)) u_pc        (.clk, .rst, .pc_next, .pc);
  adder       #(.WIDTH(32)) u_pc_add4   (.a(pc), .b(32'd4), .y(pc_plus4));
  imem        #(.WORDS(IMEM_WORDS)) u_imem (
    .clk, .addr(pc), .instr,
    .load_we(imem_load_we), .load_addr(imem_load_addr), .load_data(imem_load_data));
  sign_extend #(.IN_WIDTH(16), .OUT_WIDTH(32)) u_sext (.imm(instr[15:0]), .y(imm_ext));
  shift_left2 #(.WIDTH(32)) u_sl2       (.a(imm_ext), .y(imm_shifted));
  adder       #(.WIDTH(32)) u_br_add    (.a(pc_plus4), .b(imm_shifted), .y(branch_target));
  mux2        #(.WIDTH(32)) u_pcsrc_mux (.d0(pc_plus4), .d1(branch_target), .sel(ctrl.pc_src), .y(pc_next));

  // Decode.
  control u_ctrl (.opcode(instr[31:26]), .func(instr[5:0]), .zero, .ctrl);

  // Register read and write.
  mux2    #(.WIDTH(5)) u_regdst_mux (.d0(instr[20:16]), .d1(instr[15:11]), .sel(ctrl.reg_dst), .y(wa));
  regfile #(.NREGS(32), .WIDTH(32)) u_rf (
    .clk, .rst, .ra1(instr[25:21]), .ra2(instr[20:16]), .rd1, .rd2,
    .we(ctrl.reg_write), .wa, .wd(wb_data));

  // Execute.
  mux2 #(.WIDTH(32)) u_alusrc_mux (.d0(rd2), .d1(imm_ext), .sel(ctrl.alu_src), .y(alu_b));
  alu  #(.WIDTH(32)) u_alu (.a(rd1), .b(alu_b), .op(ctrl.alu_op), .result(alu_result), .zero);

  // Memory and write-back.
  dmem #(.WORDS(DMEM_WORDS)) u_dmem (
    .clk, .addr(alu_result), .wdata(rd2), .mem_write(ctrl.mem_write), .mem_read(ctrl.mem_read),
    .rdata(mem_rdata),
    .load_we(dmem_load_we), .load_addr(dmem_load_addr), .load_data(dmem_load_data));
  mux2 #(.WIDTH(32)) u_memtoreg_mux (.d0(alu_result), .d1(mem_rdata), .sel(ctrl.mem_to_reg), .y(wb_data));

  // Observation outputs.
  always_comb begin
    reg_write = ctrl.reg_write;
    reg_waddr = wa;
    reg_wdata = wb_data;
    mem_write = ctrl.mem_write;
    mem_addr  = alu_result;
    mem_wdata = rd2;
    pc_src    = ctrl.pc_src;
  end

  // Rules of the instruction set: no instruction writes both a register
  // and memory, a branch never writes, and the PC stays word aligned.
  a_one_writer: assert property (@(posedge clk) disable iff (rst)
    !(ctrl.reg_write && ctrl.mem_write));
  a_branch_no_write: assert property (@(posedge clk) disable iff (rst)
    ctrl.pc_src |-> !(ctrl.reg_write || ctrl.mem_write));
  a_pc_aligned: assert property (@(posedge clk) disable iff (rst)
    pc[1:0] == 2'b00);
endmodule
