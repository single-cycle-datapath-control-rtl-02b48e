// imem: instruction memory.
//
// WORDS 32-bit words. The read side takes the PC as a byte address and
// returns the word at addr[AW+1:2] combinationally, so the instruction
// is available within the same clock cycle, as a single-cycle datapath
// requires. addr[1:0] is ignored and addresses wrap modulo the size.
// The load port (load_we/load_addr/load_data) writes one word at a
// rising clock edge; it exists so that a program can be placed before
// the processor is released from reset. The size and the load port are
// this design's choices.
module imem #(
  parameter int unsigned WORDS = 256
) (
  input  logic        clk,
  input  logic [31:0] addr,
  output logic [31:0] instr,
  input  logic        load_we,
  input  logic [31:0] load_addr,
  input  logic [31:0] load_data
);
  localparam int unsigned AW = (WORDS > 1) ? $clog2(WORDS) : 1;

  logic [31:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (load_we) mem[load_addr[AW+1:2]] <= load_data;
  end

  always_comb instr = mem[addr[AW+1:2]];
endmodule
