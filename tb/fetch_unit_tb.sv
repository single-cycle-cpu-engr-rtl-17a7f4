// fetch_unit_tb: loads random instruction words into the fetch unit's
// memory, releases reset and then drives Branch, Jump and Zero at random
// for many cycles. Each cycle the instruction read and the PC are compared
// with a byte-address model of the next-PC rules:
//   PC+4, PC+4+SignExtend(imm16)*4 when Branch and Zero,
//   {PC[31:28], target, 00} when Jump.
// One instruction per cycle is checked by counting PC updates per edge.
module fetch_unit_tb;
  localparam int unsigned WORDS = 64;
  logic        clk = 0, rst;
  logic        branch, jump, zero;
  logic [31:0] pc, instr;
  logic        load_we;
  logic [29:0] load_addr;
  logic [31:0] load_data;
  logic [31:0] mem [WORDS];
  logic [31:0] exp_pc;
  int checks = 0, failures = 0;
  int n_branch = 0, n_jump = 0, n_seq = 0, n_notaken = 0;

  fetch_unit #(.IMEM_WORDS(WORDS)) dut (
    .clk(clk), .rst(rst), .branch(branch), .jump(jump), .zero(zero),
    .pc(pc), .instr(instr), .load_we(load_we), .load_addr(load_addr), .load_data(load_data));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] off;
    rst = 1; branch = 0; jump = 0; zero = 0; load_we = 0; load_addr = 0; load_data = 0;
    for (int i = 0; i < WORDS; i++) begin
      @(negedge clk);
      load_we = 1; load_addr = 30'(i); load_data = $urandom; mem[i] = load_data;
    end
    @(negedge clk); load_we = 0;
    @(negedge clk); rst = 0;
    exp_pc = 32'd0;
    repeat (2000) begin
      // present the controls for the current instruction
      branch = 1'($urandom); jump = ($urandom % 4) == 0; zero = 1'($urandom);
      #1;
      checks += 2;
      if (pc !== exp_pc) begin failures++; $display("FAIL pc %h expected %h", pc, exp_pc); end
      if (instr !== mem[(exp_pc >> 2) % WORDS]) begin failures++; $display("FAIL instr at %h", exp_pc); end
      off = {{16{mem[(exp_pc >> 2) % WORDS][15]}}, mem[(exp_pc >> 2) % WORDS][15:0]};
      if (jump) begin
        exp_pc = {exp_pc[31:28], mem[(exp_pc >> 2) % WORDS][25:0], 2'b00}; n_jump++;
      end else if (branch && zero) begin
        exp_pc = exp_pc + 32'd4 + (off << 2); n_branch++;
      end else begin
        exp_pc = exp_pc + 32'd4;
        if (branch) n_notaken++; else n_seq++;
      end
      @(negedge clk);
    end
    // reset returns the PC to 0 at the next edge
    rst = 1;
    @(negedge clk);
    checks++;
    if (pc !== 32'd0) begin failures++; $display("FAIL reset pc %h", pc); end
    checks++;
    if (n_branch == 0 || n_jump == 0 || n_seq == 0 || n_notaken == 0) begin
      failures++; $display("FAIL a next-PC case never happened");
    end
    $display("taken=%0d jump=%0d seq=%0d not_taken=%0d", n_branch, n_jump, n_seq, n_notaken);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
