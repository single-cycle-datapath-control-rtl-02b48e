// tb_sign_extend: self-checking test of the 16-to-32-bit sign extender.
// Checks -4 (the displacement of "lw $t0, -4($sp)"), 16, the extremes
// and all 65536 inputs, against the integer value of the 16-bit field
// read as a signed number.
module tb_sign_extend;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic [15:0] imm;
  logic [31:0] y;
  int checks = 0, failures = 0;

  sign_extend #(.IN_WIDTH(16), .OUT_WIDTH(32)) dut (.imm, .y);

  initial begin
    imm = 16'hFFFC; #1; checks++;
    if (y !== 32'hFFFF_FFFC) begin failures++; $display("FAIL -4 gave %h", y); end
    imm = 16'd16; #1; checks++;
    if (y !== 32'd16) begin failures++; $display("FAIL 16 gave %h", y); end
    for (int v = -32768; v < 32768; v++) begin
      imm = 16'(v);
      #1;
      checks++;
      if ($signed(y) != v) begin
        failures++;
        if (failures < 10) $display("FAIL imm=%h y=%h", imm, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
