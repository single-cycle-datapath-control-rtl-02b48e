// shift_left2: multiplies the sign-extended branch offset by 4.
//
// Branch offsets count instructions, and instructions are 4 bytes, so
// the target is PC + 4 + offset*4. This block shifts its input left by
// two bit positions, filling with zeros and dropping the top two bits.
// Combinational.
module shift_left2 #(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] a,
  output logic [WIDTH-1:0] y
);
  always_comb y = {a[WIDTH-3:0], 2'b00};
endmodule
