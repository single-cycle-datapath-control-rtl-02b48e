// regfile: the register file, NREGS registers of WIDTH bits.
//
// Two read ports (ra1/rd1, ra2/rd2) are combinational; the write port
// (we/wa/wd, driven by RegWrite, the RegDst mux and the MemToReg mux)
// updates a register only at the rising clock edge. That is what lets
// "add $t1, $t1, $t2" read the old $t1 during its cycle and write the
// sum at the end of it: a read of the register being written returns
// the old value until the edge. Register 0 always reads 0 and ignores
// writes, as in MIPS. A synchronous active-high reset clears all
// registers; the reset is this design's choice.
module regfile #(
  parameter int unsigned NREGS = 32,
  parameter int unsigned WIDTH = 32,
  localparam int unsigned AW   = $clog2(NREGS)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [AW-1:0]    ra1,
  input  logic [AW-1:0]    ra2,
  output logic [WIDTH-1:0] rd1,
  output logic [WIDTH-1:0] rd2,
  input  logic             we,
  input  logic [AW-1:0]    wa,
  input  logic [WIDTH-1:0] wd
);
  logic [WIDTH-1:0] regs [NREGS];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else if (we && wa != '0) begin
      regs[wa] <= wd;
    end
  end

  always_comb begin
    rd1 = (ra1 == '0) ? '0 : regs[ra1];
    rd2 = (ra2 == '0) ? '0 : regs[ra2];
  end
endmodule
