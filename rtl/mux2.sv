// mux2: WIDTH-bit two-input multiplexer, y = sel ? d1 : d0.
//
// Used four times in the datapath, with the input numbering of the
// datapath diagram: RegDst picks the write register (0: rt, 1: rd),
// ALUSrc picks ALU operand B (0: Read data 2, 1: immediate), MemToReg
// picks the register write data (0: ALU result, 1: memory data) and
// PCSrc picks the next PC (0: PC+4, 1: branch target). Combinational.
module mux2 #(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] d0,
  input  logic [WIDTH-1:0] d1,
  input  logic             sel,
  output logic [WIDTH-1:0] y
);
  always_comb y = sel ? d1 : d0;
endmodule
