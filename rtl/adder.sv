// adder: WIDTH-bit binary adder, y = a + b, carry out dropped.
//
// The datapath uses two of them: one adds the constant 4 to the PC to
// form the address of the next sequential instruction, the other adds
// PC+4 and the shifted branch offset to form the branch target.
// Purely combinational. Dropping the carry (address arithmetic wraps)
// is this design's choice.
module adder #(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] y
);
  always_comb y = a + b;
endmodule
