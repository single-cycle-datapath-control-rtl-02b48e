// tb_imem: self-checking test of the instruction memory.
// Loads random words through the load port into a reference array, then
// reads every word back through the PC-side port by byte address (with
// random low address bits, which are ignored) and checks that the read
// is combinational: the word is there without waiting for a clock edge.
module tb_imem;
  localparam int WORDS = 256;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic [31:0] addr, instr, load_addr, load_data;
  logic        load_we;
  logic [31:0] ref_mem [WORDS];
  int checks = 0, failures = 0;

  imem #(.WORDS(WORDS)) dut (.clk, .addr, .instr, .load_we, .load_addr, .load_data);

  initial begin
    load_we = 1'b0; load_addr = '0; load_data = '0; addr = '0;
    for (int i = 0; i < WORDS; i++) begin
      ref_mem[i] = $urandom;
      @(negedge clk);
      load_we = 1'b1; load_addr = 32'(i * 4); load_data = ref_mem[i];
    end
    @(negedge clk);
    load_we = 1'b0;
    for (int k = 0; k < 4 * WORDS; k++) begin
      int w;
      w = int'($urandom_range(WORDS - 1));
      addr = 32'(w * 4) | 32'($urandom_range(3));
      #1;
      checks++;
      if (instr !== ref_mem[w]) begin
        failures++; $display("FAIL addr=%h instr=%h expected=%h", addr, instr, ref_mem[w]);
      end
    end
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
