// tb_mux2: self-checking test of the two-input multiplexer at the 32-bit
// and 5-bit widths used in the datapath. Random data on both inputs, both
// select values; y must equal d1 when sel is 1 and d0 when sel is 0.
module tb_mux2;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic [31:0] d0, d1, y;
  logic [4:0]  n0, n1, ny;
  logic        sel;
  int checks = 0, failures = 0;

  mux2 #(.WIDTH(32)) dut32 (.d0, .d1, .sel, .y);
  mux2 #(.WIDTH(5))  dut5  (.d0(n0), .d1(n1), .sel, .y(ny));

  initial begin
    for (int i = 0; i < 1000; i++) begin
      d0 = $urandom; d1 = $urandom; n0 = 5'($urandom); n1 = 5'($urandom);
      sel = 1'(i);
      #1;
      checks += 2;
      if (y !== (i % 2 == 1 ? d1 : d0)) begin
        failures++; $display("FAIL 32-bit sel=%b y=%h", sel, y);
      end
      if (ny !== (i % 2 == 1 ? n1 : n0)) begin
        failures++; $display("FAIL 5-bit sel=%b y=%h", sel, ny);
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
