// tb_control: self-checking test of the control unit.
// The expected outputs are the rows of the control table, written here
// as literal 10-bit vectors {RegDst, RegWrite, ALUSrc, ALUOp[2:0],
// MemWrite, MemRead, MemToReg, PCSrc} with don't-cares as 0. Every row
// is applied with Zero at 0 and at 1 (only beq's PCSrc may follow Zero),
// with random bits in the fields the row does not decode. Other opcodes
// and R-type func codes must set no write enable and no branch.
module tb_control;
  import mips_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic [5:0] opcode, func;
  logic       zero;
  ctrl_t      ctrl;
  int checks = 0, failures = 0;

  control dut (.opcode, .func, .zero, .ctrl);

  typedef struct {
    string      name;
    logic [5:0] op;
    logic [5:0] fn;
    logic       fn_used;
    logic [9:0] row;   // PCSrc bit 0 here is the value with Zero = 1
  } row_t;

  row_t table_rows [8] = '{
    '{"add", 6'b000000, 6'b100000, 1'b1, 10'b1_1_0_010_0_0_0_0},
    '{"sub", 6'b000000, 6'b100010, 1'b1, 10'b1_1_0_110_0_0_0_0},
    '{"and", 6'b000000, 6'b100100, 1'b1, 10'b1_1_0_000_0_0_0_0},
    '{"or",  6'b000000, 6'b100101, 1'b1, 10'b1_1_0_001_0_0_0_0},
    '{"slt", 6'b000000, 6'b101010, 1'b1, 10'b1_1_0_111_0_0_0_0},
    '{"lw",  6'b100011, 6'b000000, 1'b0, 10'b0_1_1_010_0_1_1_0},
    '{"sw",  6'b101011, 6'b000000, 1'b0, 10'b0_0_1_010_1_0_0_0},
    '{"beq", 6'b000100, 6'b000000, 1'b0, 10'b0_0_0_110_0_0_0_1}
  };

  initial begin
    for (int rep = 0; rep < 20; rep++) begin
      foreach (table_rows[r]) begin
        for (int z = 0; z < 2; z++) begin
          logic [9:0] expected;
          opcode = table_rows[r].op;
          func   = table_rows[r].fn_used ? table_rows[r].fn : 6'($urandom);
          zero   = 1'(z);
          #1;
          expected = table_rows[r].row;
          if (z == 0) expected[0] = 1'b0;
          checks++;
          if (10'(ctrl) !== expected) begin
            failures++;
            $display("FAIL %s zero=%0d ctrl=%b expected=%b", table_rows[r].name, z, 10'(ctrl), expected);
          end
        end
      end
    end
    // Unknown opcodes and func codes: no state may change except the PC.
    for (int k = 0; k < 2000; k++) begin
      opcode = 6'($urandom); func = 6'($urandom); zero = 1'($urandom);
      if (opcode inside {6'b100011, 6'b101011, 6'b000100}) continue;
      if (opcode == 6'b000000 && func inside {6'b100000, 6'b100010, 6'b100100, 6'b100101, 6'b101010})
        continue;
      #1;
      checks++;
      if (ctrl.reg_write || ctrl.mem_write || ctrl.pc_src) begin
        failures++; $display("FAIL unknown op=%b fn=%b ctrl=%b", opcode, func, 10'(ctrl));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
