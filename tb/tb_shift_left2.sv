// tb_shift_left2: self-checking test of the branch-offset shifter.
// The output must be the input times 4, modulo 2^32; checked for the
// offsets 3 and -1 and for random inputs.
module tb_shift_left2;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic [31:0] a, y;
  int checks = 0, failures = 0;

  shift_left2 #(.WIDTH(32)) dut (.a, .y);

  task automatic check(input logic [31:0] ta);
    logic [31:0] expected;
    a = ta;
    #1;
    expected = ta * 32'd4;
    checks++;
    if (y !== expected) begin
      failures++; $display("FAIL a=%h y=%h expected=%h", ta, y, expected);
    end
  endtask

  initial begin
    check(32'd3);
    check(32'hFFFF_FFFF);
    for (int i = 0; i < 1000; i++) check($urandom);
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
