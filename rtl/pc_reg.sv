// pc_reg: the program counter.
//
// A WIDTH-bit register that takes the next PC (PC+4 or the branch
// target, chosen by the PCSrc mux) at every rising clock edge, so the
// processor starts one new instruction per cycle. A synchronous,
// active-high reset sets it to 0; the reset and its value are this
// design's choice.
module pc_reg #(
  parameter int unsigned WIDTH = 32
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [WIDTH-1:0] pc_next,
  output logic [WIDTH-1:0] pc
);
  always_ff @(posedge clk) begin
    if (rst) pc <= '0;
    else     pc <= pc_next;
  end
endmodule
