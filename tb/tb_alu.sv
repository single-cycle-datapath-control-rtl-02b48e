// tb_alu: self-checking test of the ALU. For each ALUOp code of the
// control table (and 000, or 001, add 010, sub 110, slt 111) it applies
// corner and random operands and compares result and Zero with values
// computed here in integer arithmetic; unused codes must give 0.
module tb_alu;
  import mips_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic [31:0] a, b, result;
  alu_op_e     op;
  logic        zero;
  int checks = 0, failures = 0;

  alu #(.WIDTH(32)) dut (.a, .b, .op, .result, .zero);

  function automatic logic [31:0] model(input logic [2:0] code, input logic [31:0] x, input logic [31:0] y);
    longint sx, sy;
    sx = longint'($signed(x)); sy = longint'($signed(y));
    case (code)
      3'b000: return x & y;
      3'b001: return x | y;
      3'b010: return 32'(longint'(x) + longint'(y));
      3'b110: return 32'(longint'(x) - longint'(y));
      3'b111: return (sx < sy) ? 32'd1 : 32'd0;
      default: return 32'd0;
    endcase
  endfunction

  task automatic check(input logic [2:0] code, input logic [31:0] x, input logic [31:0] y);
    logic [31:0] exp_r;
    op = alu_op_e'(code); a = x; b = y;
    #1;
    exp_r = model(code, x, y);
    checks += 2;
    if (result !== exp_r) begin
      failures++; $display("FAIL op=%b a=%h b=%h result=%h expected=%h", code, x, y, result, exp_r);
    end
    if (zero !== (exp_r == 32'd0)) begin
      failures++; $display("FAIL zero op=%b a=%h b=%h", code, x, y);
    end
  endtask

  logic [31:0] corner [6] = '{32'd0, 32'd1, 32'd2, 32'hFFFF_FFFF, 32'h7FFF_FFFF, 32'h8000_0000};

  initial begin
    for (int c = 0; c < 8; c++)
      for (int i = 0; i < 6; i++)
        for (int j = 0; j < 6; j++) check(3'(c), corner[i], corner[j]);
    check(3'b010, 32'd1, 32'd2);                   // 1 + 2 = 3
    for (int k = 0; k < 4000; k++) begin
      logic [31:0] x;
      x = $urandom;
      check(3'($urandom), x, (k % 4 == 0) ? x : $urandom);
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
