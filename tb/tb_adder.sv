// tb_adder: self-checking test of the WIDTH-bit adder.
// Applies the constant-4 case used for PC+4, wrap-around corner cases and
// random operands, and compares y with a+b computed in 64-bit arithmetic
// and truncated. A watchdog ends the run after a fixed number of cycles.
module tb_adder;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic [31:0] a, b, y;
  int checks = 0, failures = 0;

  adder #(.WIDTH(32)) dut (.a, .b, .y);

  task automatic check(input logic [31:0] ta, input logic [31:0] tb_);
    longint unsigned full;
    a = ta; b = tb_;
    #1;
    full = longint'(ta) + longint'(tb_);
    checks++;
    if (y !== full[31:0]) begin
      failures++;
      $display("FAIL a=%h b=%h y=%h expected=%h", ta, tb_, y, full[31:0]);
    end
  endtask

  initial begin
    check(32'h0000_0000, 32'd4);
    check(32'h0000_0040, 32'd4);
    check(32'hFFFF_FFFC, 32'd4);
    check(32'h0000_0010, 32'hFFFF_FFF0);
    check(32'h7FFF_FFFF, 32'h0000_0001);
    for (int i = 0; i < 1000; i++) check($urandom, $urandom);
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
