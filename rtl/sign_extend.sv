// sign_extend: widens the 16-bit immediate field I[15:0] to 32 bits.
//
// The top bit of the field is replicated into the upper bits, so that a
// negative displacement such as the -4 in "lw $t0, -4($sp)"
// (1111 1111 1111 1100) stays -4 when added to a 32-bit base register.
// Its output feeds ALU operand B (through the ALUSrc mux) and the
// branch-target shifter. Combinational.
module sign_extend #(
  parameter int unsigned IN_WIDTH  = 16,
  parameter int unsigned OUT_WIDTH = 32
) (
  input  logic [IN_WIDTH-1:0]  imm,
  output logic [OUT_WIDTH-1:0] y
);
  always_comb y = {{(OUT_WIDTH-IN_WIDTH){imm[IN_WIDTH-1]}}, imm};
endmodule
