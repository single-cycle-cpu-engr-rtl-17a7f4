// single_cycle_cpu_tb: end-to-end test of the CPU at its default sizes.
//
// A program is loaded through the instruction-memory load port and run
// against an instruction-level reference model kept in this testbench
// (its own PC, register and memory arrays). Every cycle the CPU's PC,
// instruction, register write and memory write are compared with the
// model, which also checks that each instruction completes in exactly one
// clock cycle.
//
// The program has two parts. The directed part (words 0..63) initialises
// all registers with addi, clears the data memory with an sw loop, then
// sums 10+9+...+1 into memory, reads it back with lw, branches forward and
// backward, jumps, and writes to register 0. Its result (55) is checked
// against a constant as well. The rest of the memory holds random add,
// sub, addi, lw, sw, beq and j instructions and a few undefined words,
// which the model follows for a further few thousand cycles. Control flow
// in the random part only goes forward, so execution runs off the end of
// the memory, wraps to word 0 and repeats the directed part as well.
//
// Each mechanism is counted: the seven instruction kinds, taken and
// not-taken beq, backward branch, jump, a load of a stored value, a write
// to register 0 and an undefined instruction. One that never happens
// counts as a failure.
module single_cycle_cpu_tb;
  import cpu_pkg::*;
  localparam int unsigned IW = 256;  // defaults of the CPU
  localparam int unsigned DW = 256;

  logic        clk = 0, rst;
  logic        imem_we;
  logic [29:0] imem_waddr;
  logic [31:0] imem_wdata;
  logic [31:0] pc, instr;
  logic        reg_we, mem_we;
  logic [4:0]  reg_waddr;
  logic [31:0] reg_wdata, mem_addr, mem_wdata;

  single_cycle_cpu dut (
    .clk(clk), .rst(rst), .imem_we(imem_we), .imem_waddr(imem_waddr), .imem_wdata(imem_wdata),
    .pc(pc), .instr(instr), .reg_we(reg_we), .reg_waddr(reg_waddr), .reg_wdata(reg_wdata),
    .mem_we(mem_we), .mem_addr(mem_addr), .mem_wdata(mem_wdata));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // ---------------- assembler ----------------
  function automatic logic [31:0] r_add(int rd, int rs, int rt);
    return {6'b000000, 5'(rs), 5'(rt), 5'(rd), 5'd0, 6'b100000};
  endfunction
  function automatic logic [31:0] r_sub(int rd, int rs, int rt);
    return {6'b000000, 5'(rs), 5'(rt), 5'(rd), 5'd0, 6'b100010};
  endfunction
  function automatic logic [31:0] i_addi(int rt, int rs, int imm);
    return {6'b001000, 5'(rs), 5'(rt), 16'(imm)};
  endfunction
  function automatic logic [31:0] i_lw(int rt, int imm, int rs);
    return {6'b100011, 5'(rs), 5'(rt), 16'(imm)};
  endfunction
  function automatic logic [31:0] i_sw(int rt, int imm, int rs);
    return {6'b101011, 5'(rs), 5'(rt), 16'(imm)};
  endfunction
  // branch from word 'at' to word 'to'
  function automatic logic [31:0] i_beq(int rs, int rt, int at, int to);
    return {6'b000100, 5'(rs), 5'(rt), 16'(to - at - 1)};
  endfunction
  function automatic logic [31:0] j_j(int to);
    return {6'b000010, 26'(to)};
  endfunction

  logic [31:0] prog [IW];

  // ---------------- reference model ----------------
  logic [31:0] m_pc;
  logic [31:0] m_regs [32];
  logic [31:0] m_dmem [DW];
  logic [DW-1:0] m_stored;

  int n_add, n_sub, n_addi, n_lw, n_sw, n_beq_taken, n_beq_not, n_back, n_j;
  int n_load_stored, n_r0, n_undef, n_sum_ok;

  task automatic model_step();
    logic [31:0] iw, a, b, sx, addr, wd;
    logic [5:0]  op, fn;
    logic [4:0]  rs, rt, rd;
    logic        exp_rwe, exp_mwe;
    logic [4:0]  exp_wa;
    logic [31:0] next_pc;
    #1;
    iw = prog[(m_pc >> 2) % IW];
    op = iw[31:26]; rs = iw[25:21]; rt = iw[20:16]; rd = iw[15:11]; fn = iw[5:0];
    a = m_regs[rs]; b = m_regs[rt];
    sx = {{16{iw[15]}}, iw[15:0]};
    addr = a + sx;
    exp_rwe = 0; exp_mwe = 0; exp_wa = 0; wd = 0;
    next_pc = m_pc + 4;
    if (op == 6'b000000 && fn == 6'b100000) begin
      exp_rwe = 1; exp_wa = rd; wd = a + b; n_add++;
    end else if (op == 6'b000000 && fn == 6'b100010) begin
      exp_rwe = 1; exp_wa = rd; wd = a - b; n_sub++;
    end else if (op == 6'b001000) begin
      exp_rwe = 1; exp_wa = rt; wd = addr; n_addi++;
    end else if (op == 6'b100011) begin
      exp_rwe = 1; exp_wa = rt; wd = m_dmem[(addr >> 2) % DW]; n_lw++;
      if (m_stored[(addr >> 2) % DW]) n_load_stored++;
    end else if (op == 6'b101011) begin
      exp_mwe = 1; n_sw++;
    end else if (op == 6'b000100) begin
      if (a == b) begin
        next_pc = m_pc + 4 + (sx << 2); n_beq_taken++;
        if (iw[15]) n_back++;
      end else n_beq_not++;
    end else if (op == 6'b000010) begin
      next_pc = {m_pc[31:28], iw[25:0], 2'b00}; n_j++;
    end else n_undef++;
    if (exp_rwe && exp_wa == 0) n_r0++;

    // compare with the CPU during the cycle
    checks += 4;
    if (pc !== m_pc) begin failures++; $display("FAIL pc %h expected %h", pc, m_pc); end
    if (instr !== iw) begin failures++; $display("FAIL instr %h expected %h at %h", instr, iw, m_pc); end
    if (reg_we !== exp_rwe) begin failures++; $display("FAIL reg_we at %h", m_pc); end
    if (mem_we !== exp_mwe) begin failures++; $display("FAIL mem_we at %h", m_pc); end
    if (exp_rwe) begin
      checks += 2;
      if (reg_waddr !== exp_wa) begin failures++; $display("FAIL reg_waddr %0d expected %0d at %h", reg_waddr, exp_wa, m_pc); end
      if (reg_wdata !== wd) begin failures++; $display("FAIL reg_wdata %h expected %h at %h", reg_wdata, wd, m_pc); end
    end
    if (exp_mwe) begin
      checks += 2;
      if ((mem_addr >> 2) % DW != (addr >> 2) % DW) begin failures++; $display("FAIL mem_addr %h expected %h", mem_addr, addr); end
      if (mem_wdata !== b) begin failures++; $display("FAIL mem_wdata %h expected %h", mem_wdata, b); end
      if (b == 32'd55 && (addr >> 2) % DW == 32'd16) n_sum_ok++;
    end

    // commit at the clock edge
    @(posedge clk);
    if (exp_rwe && exp_wa != 0) m_regs[exp_wa] = wd;
    if (exp_mwe) begin
      m_dmem[(addr >> 2) % DW] = b;
      m_stored[(addr >> 2) % DW] = 1'b1;
    end
    m_pc = next_pc;
    @(negedge clk);
  endtask

  // ---------------- program ----------------
  task automatic build_program();
    int p = 0;
    // registers 1..31 := r*3 - 40
    for (int r = 1; r < 32; r++) prog[p++] = i_addi(r, 0, r * 3 - 40);   // words 0..30
    // clear data memory: r1 = 0, r2 = 4*DW
    prog[p++] = i_addi(1, 0, 0);                         // 31
    prog[p++] = i_addi(2, 0, 4 * DW);                    // 32
    prog[p++] = i_sw(0, 0, 1);                           // 33 clear loop
    prog[p++] = i_addi(1, 1, 4);                         // 34
    prog[p++] = i_beq(1, 2, 35, 37);                     // 35 -> 37 when done (forward)
    prog[p++] = j_j(33);                                 // 36
    // sum 10..1: r1 = counter, r2 = sum, r4 = -1
    prog[p++] = i_addi(1, 0, 10);                        // 37
    prog[p++] = i_addi(2, 0, 0);                         // 38
    prog[p++] = i_addi(4, 0, -1);                        // 39
    prog[p++] = r_add(2, 2, 1);                          // 40 loop
    prog[p++] = r_add(1, 1, 4);                          // 41
    prog[p++] = i_beq(1, 0, 42, 44);                     // 42 exit forward
    prog[p++] = i_beq(0, 0, 43, 40);                     // 43 backward branch (always taken)
    prog[p++] = i_sw(2, 64, 0);                          // 44 mem[16] = 55
    prog[p++] = i_lw(6, 64, 0);                          // 45 load stored value
    prog[p++] = r_sub(7, 6, 2);                          // 46 r7 = 0
    prog[p++] = i_beq(7, 0, 47, 49);                     // 47 taken forward, skips 48
    prog[p++] = i_addi(8, 0, 1);                         // 48 skipped
    prog[p++] = r_add(0, 2, 2);                          // 49 write to r0, ignored
    prog[p++] = i_beq(0, 0, 50, 52);                     // 50
    prog[p++] = 32'hfc00_0000;                           // 51 skipped
    prog[p++] = 32'hfc00_0000;                           // 52 undefined opcode: no effect
    prog[p++] = r_add(9, 0, 0);                          // 53 r9 = r0 (must be 0)
    prog[p++] = j_j(64);                                 // 54 into the random part
    while (p < 64) prog[p++] = j_j(64);
    // random part
    for (int w = 64; w < IW; w++) begin
      int k;
      k = $urandom % 16;
      case (k)
        0, 1:    prog[w] = r_add($urandom % 32, $urandom % 32, $urandom % 32);
        2, 3:    prog[w] = r_sub($urandom % 32, $urandom % 32, $urandom % 32);
        4, 5:    prog[w] = i_addi($urandom % 32, $urandom % 32, int'($urandom % 256) - 128);
        6, 7:    prog[w] = i_lw($urandom % 32, 4 * ($urandom % 64), 0);
        8:       prog[w] = i_lw($urandom % 32, int'($urandom % 64) - 32, $urandom % 32);
        9, 10:   prog[w] = i_sw($urandom % 32, 4 * ($urandom % 64), 0);
        11:      prog[w] = i_sw($urandom % 32, int'($urandom % 64) - 32, $urandom % 32);
        12:      prog[w] = {6'b000100, 5'($urandom), 5'($urandom), 16'($urandom % 16)};
        13:      prog[w] = {6'b000100, 5'(w % 32), 5'(w % 32), 16'($urandom % 16)};
        14:      prog[w] = j_j(w + 1 + $urandom % 16);
        default: prog[w] = {6'b011111, 26'($urandom)};
      endcase
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int missing;
    missing = 0;
    n_add = 0; n_sub = 0; n_addi = 0; n_lw = 0; n_sw = 0; n_beq_taken = 0; n_beq_not = 0;
    n_back = 0; n_j = 0; n_load_stored = 0; n_r0 = 0; n_undef = 0; n_sum_ok = 0;
    build_program();
    rst = 1; imem_we = 0; imem_waddr = 0; imem_wdata = 0;
    for (int w = 0; w < IW; w++) begin
      @(negedge clk);
      imem_we = 1; imem_waddr = 30'(w); imem_wdata = prog[w];
    end
    @(negedge clk); imem_we = 0;
    @(negedge clk); rst = 0;
    m_pc = 0;
    m_regs[0] = 0;
    for (int i = 0; i < DW; i++) m_dmem[i] = 0;   // cleared by the program before any load
    m_stored = '0;
    // directed part: until the jump into the random part
    repeat (5000) begin
      if (m_pc == 32'(64 * 4)) break;
      model_step();
    end
    checks++;
    if (m_pc != 32'(64 * 4)) begin failures++; $display("FAIL directed part did not finish"); end
    checks++;
    if (n_sum_ok != 1) begin failures++; $display("FAIL sum 55 not stored at word 16"); end
    $display("directed part done at cycle count add=%0d sw=%0d", n_add, n_sw);
    // random part
    repeat (4000) model_step();

    $display("add=%0d sub=%0d addi=%0d lw=%0d sw=%0d beq_taken=%0d beq_not_taken=%0d backward=%0d j=%0d",
             n_add, n_sub, n_addi, n_lw, n_sw, n_beq_taken, n_beq_not, n_back, n_j);
    $display("load_of_stored=%0d r0_writes=%0d undefined=%0d", n_load_stored, n_r0, n_undef);
    if (n_add == 0) missing++;
    if (n_sub == 0) missing++;
    if (n_addi == 0) missing++;
    if (n_lw == 0) missing++;
    if (n_sw == 0) missing++;
    if (n_beq_taken == 0) missing++;
    if (n_beq_not == 0) missing++;
    if (n_back == 0) missing++;
    if (n_j == 0) missing++;
    if (n_load_stored == 0) missing++;
    if (n_r0 == 0) missing++;
    if (n_undef == 0) missing++;
    checks++;
    if (missing != 0) begin failures++; $display("FAIL %0d mechanisms never happened", missing); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
