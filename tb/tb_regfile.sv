// tb_regfile: self-checking test of the 32 x 32-bit register file
// against a reference array. After reset all registers read 0. Random
// cycles write a random register (sometimes register 0, which must stay
// 0) while both read ports read random registers. Before the edge the
// read of the register being written must still return the old value;
// after the edge it returns the new one.
module tb_regfile;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic        rst, we;
  logic [4:0]  ra1, ra2, wa;
  logic [31:0] rd1, rd2, wd;
  logic [31:0] ref_r [32];
  int checks = 0, failures = 0, same_cycle = 0;

  regfile #(.NREGS(32), .WIDTH(32)) dut (.clk, .rst, .ra1, .ra2, .rd1, .rd2, .we, .wa, .wd);

  task automatic compare(input string what);
    checks += 2;
    if (rd1 !== ref_r[ra1]) begin
      failures++; $display("FAIL %s rd1 r%0d=%h expected=%h", what, ra1, rd1, ref_r[ra1]);
    end
    if (rd2 !== ref_r[ra2]) begin
      failures++; $display("FAIL %s rd2 r%0d=%h expected=%h", what, ra2, rd2, ref_r[ra2]);
    end
  endtask

  initial begin
    rst = 1'b1; we = 1'b0; ra1 = '0; ra2 = '0; wa = '0; wd = '0;
    for (int i = 0; i < 32; i++) ref_r[i] = '0;
    @(posedge clk); #1;
    rst = 1'b0;
    for (int i = 0; i < 32; i++) begin
      ra1 = 5'(i); ra2 = 5'(31 - i); #1; compare("after reset");
    end
    for (int k = 0; k < 3000; k++) begin
      @(negedge clk);
      we = ($urandom_range(3) != 0);
      wa = (k % 50 == 0) ? 5'd0 : 5'($urandom);
      wd = $urandom;
      ra1 = (k % 3 == 0) ? wa : 5'($urandom);
      ra2 = 5'($urandom);
      if (ra1 == wa && we) same_cycle++;
      #1;
      compare("before edge");
      @(posedge clk);
      if (we && wa != 0) ref_r[wa] = wd;
      #1;
      compare("after edge");
    end
    checks++;
    if (same_cycle == 0) begin failures++; $display("FAIL no read-during-write case"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
