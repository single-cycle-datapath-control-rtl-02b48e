// tb_dmem: self-checking test of the data memory against a reference
// array. Fills it through the load port, then runs random cycles of
// reads and MemWrite writes: a read returns the stored word in the same
// cycle, a write shows only after the clock edge, the read data is 0 when
// MemRead is 0, and the load port wins over MemWrite when both are set.
module tb_dmem;
  localparam int WORDS = 256;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic [31:0] addr, wdata, rdata, load_addr, load_data;
  logic        mem_write, mem_read, load_we;
  logic [31:0] ref_mem [WORDS];
  int checks = 0, failures = 0;

  dmem #(.WORDS(WORDS)) dut (.clk, .addr, .wdata, .mem_write, .mem_read, .rdata,
                             .load_we, .load_addr, .load_data);

  initial begin
    load_we = 1'b0; mem_write = 1'b0; mem_read = 1'b0;
    addr = '0; wdata = '0; load_addr = '0; load_data = '0;
    for (int i = 0; i < WORDS; i++) begin
      ref_mem[i] = $urandom;
      @(negedge clk);
      load_we = 1'b1; load_addr = 32'(i * 4); load_data = ref_mem[i];
    end
    @(negedge clk);
    load_we = 1'b0;
    for (int k = 0; k < 3000; k++) begin
      int w;
      w = int'($urandom_range(WORDS - 1));
      addr = 32'(w * 4);
      mem_read = 1'($urandom);
      mem_write = ($urandom_range(2) == 0);
      wdata = $urandom;
      #1;
      checks++;
      if (rdata !== (mem_read ? ref_mem[w] : 32'd0)) begin
        failures++; $display("FAIL read addr=%h rd=%b rdata=%h", addr, mem_read, rdata);
      end
      if (k % 100 == 7) begin
        // load and MemWrite in the same cycle: the load must win
        load_we = 1'b1; load_addr = 32'(((w + 1) % WORDS) * 4); load_data = $urandom;
      end
      @(posedge clk);
      if (load_we) ref_mem[(w + 1) % WORDS] = load_data;
      else if (mem_write) ref_mem[w] = wdata;
      #1;
      load_we = 1'b0;
      mem_read = 1'b1;
      addr = 32'(w * 4);
      #1;
      checks++;
      if (rdata !== ref_mem[w]) begin
        failures++; $display("FAIL after edge addr=%h rdata=%h expected=%h", addr, rdata, ref_mem[w]);
      end
      @(negedge clk);
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
