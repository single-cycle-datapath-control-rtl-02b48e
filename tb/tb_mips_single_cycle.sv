// tb_mips_single_cycle: end-to-end test of the single-cycle processor at
// its default sizes.
//
// An instruction-level reference model in this file (its own decoder,
// register array, memory array and PC) executes the same program. At the
// middle of every clock cycle the processor's PC, instruction and the
// commit it is about to make (register write, memory write, branch
// taken) are compared with the model; after the edge the model steps one
// instruction, so every cycle must retire exactly one instruction (CPI 1).
// After each random program its registers are stored to memory and a
// read-back program loads the data memory word by word, so the memory
// contents the program left are compared too.
//
// Program 1 is the worked examples: add $t1,$t1,$t2 with $t1=1, $t2=2
// (must write 3 to $t1), lw $t0,-4($sp), sw $a0,16($sp) and a taken
// beq $at,$0,3. Then random programs of add, sub, and, or, slt, lw, sw,
// beq and a few undecoded instructions run, each ending in a halt loop
// (beq $0,$0,-1). Each mechanism (every instruction kind, taken and
// untaken branches, writes to $0 ignored, undecoded instructions) is
// counted; one that never occurred counts as a failure.
module tb_mips_single_cycle;
  import mips_pkg::*;
  localparam int IW = 256;   // instruction memory words (top default)
  localparam int DW = 256;   // data memory words (top default)
  localparam logic [31:0] HALT = 32'h1000_FFFF;  // beq $0,$0,-1

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic        rst;
  logic        imem_load_we, dmem_load_we;
  logic [31:0] imem_load_addr, imem_load_data, dmem_load_addr, dmem_load_data;
  logic [31:0] pc, instr, reg_wdata, mem_addr, mem_wdata;
  logic        reg_write, mem_write, pc_src;
  logic [4:0]  reg_waddr;

  mips_single_cycle dut (.*);

  // Reference model state.
  logic [31:0] prog [IW];
  logic [31:0] mref [DW];
  logic [31:0] rref [32];
  logic [31:0] pcref;

  int checks = 0, failures = 0, cycles = 0, retired = 0;
  int n_add, n_sub, n_and, n_or, n_slt, n_lw, n_sw, n_beq_taken, n_beq_not, n_r0_write, n_undecoded;

  task automatic fail(input string msg);
    failures++;
    if (failures < 20) $display("FAIL t=%0t %s", $time, msg);
  endtask

  function automatic logic [31:0] rtype(input logic [4:0] rs, rt, rd, input logic [5:0] fn);
    return {6'b000000, rs, rt, rd, 5'd0, fn};
  endfunction
  function automatic logic [31:0] itype(input logic [5:0] op, input logic [4:0] rs, rt, input logic [15:0] imm);
    return {op, rs, rt, imm};
  endfunction

  // Place prog/mref into the processor through the load ports, under reset.
  task automatic load_and_reset(input bit with_data);
    rst = 1'b1;
    for (int i = 0; i < IW || i < DW; i++) begin
      @(negedge clk);
      imem_load_we = (i < IW); imem_load_addr = 32'(i * 4); imem_load_data = prog[i % IW];
      dmem_load_we = with_data && (i < DW); dmem_load_addr = 32'(i * 4); dmem_load_data = mref[i % DW];
    end
    @(negedge clk);
    imem_load_we = 1'b0; dmem_load_we = 1'b0;
    @(negedge clk);
    for (int r = 0; r < 32; r++) rref[r] = '0;
    pcref = '0;
    rst = 1'b0;
  endtask

  // Run until the model reaches the halt loop; compare every cycle.
  task automatic run(input int max_cycles);
    int n = 0;
    forever begin
      logic [31:0] ins, a, b, res, nxt, ea;
      logic [5:0]  op, fn;
      logic [4:0]  rs, rt, rd;
      logic        exp_rw, exp_mw, taken;
      logic [4:0]  exp_wa;
      logic [31:0] exp_wd;
      logic [31:0] simm;
      #4;  // mid-cycle: combinational paths settled (clock low half)
      ins = prog[pcref[9:2]];
      op = ins[31:26]; rs = ins[25:21]; rt = ins[20:16]; rd = ins[15:11]; fn = ins[5:0];
      simm = {{16{ins[15]}}, ins[15:0]};
      a = rref[rs]; b = rref[rt];
      exp_rw = 1'b0; exp_mw = 1'b0; taken = 1'b0; exp_wa = '0; exp_wd = '0; res = '0;
      nxt = pcref + 32'd4;
      ea = a + simm;
      if (op == 6'b000000 && fn inside {6'h20, 6'h22, 6'h24, 6'h25, 6'h2a}) begin
        case (fn)
          6'h20: begin res = a + b; n_add++; end
          6'h22: begin res = a - b; n_sub++; end
          6'h24: begin res = a & b; n_and++; end
          6'h25: begin res = a | b; n_or++;  end
          default: begin res = ($signed(a) < $signed(b)) ? 32'd1 : 32'd0; n_slt++; end
        endcase
        exp_rw = 1'b1; exp_wa = rd; exp_wd = res;
      end else if (op == 6'b100011) begin
        exp_rw = 1'b1; exp_wa = rt; exp_wd = mref[ea[9:2]]; n_lw++;
      end else if (op == 6'b101011) begin
        exp_mw = 1'b1; n_sw++;
      end else if (op == 6'b000100) begin
        taken = (a == b);
        if (taken) begin nxt = pcref + 32'd4 + (simm << 2); if (ins != HALT) n_beq_taken++; end
        else n_beq_not++;
      end else begin
        n_undecoded++;
      end
      if (exp_rw && exp_wa == 5'd0) n_r0_write++;

      checks += 4;
      if (pc !== pcref) fail($sformatf("pc=%h expected %h", pc, pcref));
      if (instr !== ins) fail($sformatf("instr=%h expected %h", instr, ins));
      if (reg_write !== exp_rw || (exp_rw && (reg_waddr !== exp_wa || reg_wdata !== exp_wd)))
        fail($sformatf("pc=%h %h regwrite %b r%0d=%h expected %b r%0d=%h",
                       pc, ins, reg_write, reg_waddr, reg_wdata, exp_rw, exp_wa, exp_wd));
      if (mem_write !== exp_mw || (exp_mw && (mem_addr !== ea || mem_wdata !== b)))
        fail($sformatf("pc=%h %h memwrite %b [%h]=%h expected %b [%h]=%h",
                       pc, ins, mem_write, mem_addr, mem_wdata, exp_mw, ea, b));
      checks++;
      if (pc_src !== taken) fail($sformatf("pc=%h pc_src=%b expected %b", pc, pc_src, taken));

      // Commit in the model, as the processor does at the coming edge.
      if (exp_rw && exp_wa != 5'd0) rref[exp_wa] = exp_wd;
      if (exp_mw) mref[ea[9:2]] = b;
      pcref = nxt;
      @(posedge clk);
      cycles++; retired++; n++;
      #1;
      if (ins == HALT || n >= max_cycles) break;
    end
  endtask

  // Program 1: the worked examples.
  task automatic directed();
    int p = 0;
    for (int i = 0; i < IW; i++) prog[i] = HALT;
    for (int i = 0; i < DW; i++) mref[i] = $urandom;
    mref[0] = 32'd1; mref[1] = 32'd2; mref[2] = 32'h0000_0100; mref[3] = 32'hA0A0_0004;
    prog[p++] = itype(6'b100011, 5'd0, 5'd9,  16'd0);     // lw $t1, 0($0)     -> 1
    prog[p++] = itype(6'b100011, 5'd0, 5'd10, 16'd4);     // lw $t2, 4($0)     -> 2
    prog[p++] = itype(6'b100011, 5'd0, 5'd29, 16'd8);     // lw $sp, 8($0)     -> 0x100
    prog[p++] = itype(6'b100011, 5'd0, 5'd4,  16'd12);    // lw $a0, 12($0)
    prog[p++] = 32'h012A_4820;                            // add $t1, $t1, $t2
    prog[p++] = 32'h8FA8_FFFC;                            // lw $t0, -4($sp)
    prog[p++] = 32'hAFA4_0010;                            // sw $a0, 16($sp)
    prog[p++] = 32'h1020_0003;                            // beq $at, $0, 3  (taken)
    prog[p++] = rtype(5'd9, 5'd9, 5'd9, 6'h20);           // skipped
    prog[p++] = rtype(5'd9, 5'd9, 5'd9, 6'h20);           // skipped
    prog[p++] = rtype(5'd9, 5'd9, 5'd9, 6'h20);           // skipped
    prog[p++] = itype(6'b000100, 5'd9, 5'd10, 16'd1);     // beq $t1, $t2, 1 (not taken)
    prog[p++] = HALT;
  endtask

  // Read-back program: loads every data word but the last into $1, so
  // that the trace comparison checks the whole data memory left by the
  // previous program. The data memory is not reloaded for it.
  task automatic readback();
    for (int i = 0; i < IW; i++) prog[i] = HALT;
    for (int w = 0; w < DW - 1 && w < IW - 1; w++) prog[w] = itype(6'b100011, 5'd0, 5'd1, 16'(4 * w));
  endtask

  // Random program of n instructions, then the halt loop.
  task automatic random_prog(input int n);
    logic [5:0] fns [5] = '{6'h20, 6'h22, 6'h24, 6'h25, 6'h2a};
    for (int i = 0; i < IW; i++) prog[i] = HALT;
    for (int i = 0; i < DW; i++) mref[i] = (i % 3 == 0) ? 32'($urandom_range(8 * DW)) : $urandom;
    for (int i = 0; i < 8; i++)   // registers 1..8 from memory first
      prog[i] = itype(6'b100011, 5'd0, 5'(i + 1), 16'(4 * $urandom_range(DW - 1)));
    for (int i = n; i < n + 8; i++)  // store registers 1..8 at the end
      prog[i] = itype(6'b101011, 5'd0, 5'(i - n + 1), 16'(4 * (i - n)));
    for (int i = 8; i < n; i++) begin
      logic [4:0] rs, rt, rd;
      int kind;
      rs = 5'($urandom_range(8)); rt = 5'($urandom_range(8)); rd = 5'($urandom_range(8));
      kind = int'($urandom_range(99));
      if (kind < 45)      prog[i] = rtype(rs, rt, rd, fns[$urandom_range(4)]);
      else if (kind < 60) prog[i] = itype(6'b100011, rs, rt, 16'($signed(4 * $urandom_range(64)) - 128));
      else if (kind < 75) prog[i] = itype(6'b101011, rs, rt, 16'($signed(4 * $urandom_range(64)) - 128));
      else if (kind < 95) prog[i] = itype(6'b000100, rs, (kind < 85) ? rs : rt, 16'($urandom_range(4)));
      else if (kind < 98) prog[i] = itype(6'b001010, rs, rt, 16'($urandom));  // slti: not decoded
      else                prog[i] = rtype(rs, rt, rd, 6'h00);                 // undecoded func
    end
  endtask

  initial begin
    {n_add, n_sub, n_and, n_or, n_slt, n_lw, n_sw, n_beq_taken, n_beq_not, n_r0_write, n_undecoded} = '0;
    rst = 1'b1;
    imem_load_we = 1'b0; dmem_load_we = 1'b0;
    imem_load_addr = '0; imem_load_data = '0; dmem_load_addr = '0; dmem_load_data = '0;

    // Program 1, with explicit checks of the worked examples.
    directed();
    load_and_reset(1'b1);
    fork
      run(100);
      begin : examples
        // cycle 4 is the add: it must write 3 into $t1 (register 9)
        repeat (4) @(posedge clk);
        #4;
        checks++;
        if (!(reg_write && reg_waddr == 5'd9 && reg_wdata == 32'd3))
          fail("add $t1,$t1,$t2 did not write 3");
        @(posedge clk); #4;             // lw $t0,-4($sp): address 0xFC
        checks++;
        if (!(reg_write && reg_waddr == 5'd8 && mem_addr == 32'h0000_00FC)) fail("lw $t0,-4($sp)");
        @(posedge clk); #4;             // sw $a0,16($sp): address 0x110
        checks++;
        if (!(mem_write && mem_addr == 32'h0000_0110 && mem_wdata == 32'hA0A0_0004)) fail("sw $a0,16($sp)");
        @(posedge clk); #4;             // beq $at,$0,3 at PC 0x1C: target 0x1C+4+12
        checks++;
        if (!(pc == 32'h1C && pc_src)) fail("beq $at,$0,3 not taken");
        @(posedge clk); #1;
        checks++;
        if (pc != 32'h2C) fail($sformatf("beq target pc=%h expected 2c", pc));
      end
    join

    // Random programs.
    for (int t = 0; t < 40; t++) begin
      random_prog(IW - 16);
      load_and_reset(1'b1);
      run(4 * IW);
      readback();
      load_and_reset(1'b0);
      run(4 * IW);
    end

    checks++;
    if (retired != cycles) fail("retired instructions differ from cycles");
    $display("counts: add=%0d sub=%0d and=%0d or=%0d slt=%0d lw=%0d sw=%0d beq_taken=%0d beq_not_taken=%0d r0_write=%0d undecoded=%0d cycles=%0d",
             n_add, n_sub, n_and, n_or, n_slt, n_lw, n_sw, n_beq_taken, n_beq_not, n_r0_write, n_undecoded, cycles);
    checks++;
    if (n_add == 0 || n_sub == 0 || n_and == 0 || n_or == 0 || n_slt == 0 || n_lw == 0 || n_sw == 0 ||
        n_beq_taken == 0 || n_beq_not == 0 || n_r0_write == 0 || n_undecoded == 0)
      fail("a mechanism never occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
