// dmem: data memory.
//
// WORDS 32-bit words, word accesses only, byte address with addr[1:0]
// ignored and wrapping modulo the size. Reading is combinational and
// gated by MemRead (rdata is 0 when mem_read is 0), so a lw gets its
// data within its own cycle. Writing happens at the rising clock edge
// when MemWrite is set, which is the second step of a sw. A separate
// load port writes one word per edge to place data before a run and has
// priority over MemWrite. The size, the read gating and the load port
// are this design's choices.
module dmem #(
  parameter int unsigned WORDS = 256
) (
  input  logic        clk,
  input  logic [31:0] addr,
  input  logic [31:0] wdata,
  input  logic        mem_write,
  input  logic        mem_read,
  output logic [31:0] rdata,
  input  logic        load_we,
  input  logic [31:0] load_addr,
  input  logic [31:0] load_data
);
  localparam int unsigned AW = (WORDS > 1) ? $clog2(WORDS) : 1;

  logic [31:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (load_we)        mem[load_addr[AW+1:2]] <= load_data;
    else if (mem_write) mem[addr[AW+1:2]]      <= wdata;
  end

  always_comb rdata = mem_read ? mem[addr[AW+1:2]] : '0;
endmodule
