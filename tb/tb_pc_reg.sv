// tb_pc_reg: self-checking test of the program counter register.
// Checks that reset gives 0, that the PC holds its value between edges
// and takes pc_next at each rising edge (one update per cycle), and that
// reset wins over pc_next.
module tb_pc_reg;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic        rst;
  logic [31:0] pc_next, pc, expected;
  int checks = 0, failures = 0;

  pc_reg #(.WIDTH(32)) dut (.clk, .rst, .pc_next, .pc);

  initial begin
    rst = 1'b1; pc_next = 32'hDEAD_BEEF;
    @(posedge clk); #1;
    checks++;
    if (pc !== 32'd0) begin failures++; $display("FAIL reset pc=%h", pc); end
    rst = 1'b0;
    expected = 32'd0;
    for (int i = 0; i < 500; i++) begin
      pc_next = $urandom;
      #2;
      checks++;  // no change before the edge
      if (pc !== expected) begin failures++; $display("FAIL pc changed early %h", pc); end
      @(posedge clk); #1;
      expected = pc_next;
      checks++;
      if (pc !== expected) begin failures++; $display("FAIL pc=%h expected=%h", pc, expected); end
      if (i == 250) begin
        rst = 1'b1;
        @(posedge clk); #1;
        checks++;
        if (pc !== 32'd0) begin failures++; $display("FAIL mid reset pc=%h", pc); end
        rst = 1'b0;
        expected = 32'd0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
