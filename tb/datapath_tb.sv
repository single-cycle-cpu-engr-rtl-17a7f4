// datapath_tb: drives the datapath with instruction words and the control
// word of each instruction (written out here, not taken from the decoder)
// and compares the register write address and data, the ALU result, the
// store data and Zero with a model holding its own register and memory
// arrays. The registers and the data memory are first filled through the
// datapath itself (addi from register 0 and sw), then random add, sub,
// addi, lw, sw and beq instructions follow.
module datapath_tb;
  import cpu_pkg::*;
  localparam int unsigned DW = 32;
  logic        clk = 0;
  logic [31:0] instr;
  ctrl_t       ctrl;
  logic        zero;
  logic [4:0]  reg_waddr;
  logic [31:0] reg_wdata, alu_result, store_data;
  logic [31:0] regs [32];
  logic [31:0] dmem [DW];
  int checks = 0, failures = 0;

  datapath #(.DMEM_WORDS(DW)) dut (
    .clk(clk), .instr(instr), .ctrl(ctrl), .zero(zero), .reg_waddr(reg_waddr),
    .reg_wdata(reg_wdata), .alu_result(alu_result), .store_data(store_data));

  always #5 clk = ~clk;

  function automatic logic [31:0] sx(input logic [15:0] v);
    return {{16{v[15]}}, v};
  endfunction

  // kind: 0 add, 1 sub, 2 addi, 3 lw, 4 sw, 5 beq
  task automatic step(input int kind, input logic [4:0] rs, input logic [4:0] rt,
                      input logic [4:0] rd, input logic [15:0] imm);
    logic [31:0] a, b, res, wd;
    logic [4:0]  wa;
    logic        we;
    ctrl = '{default: '0, alu_op: ALU_ADD};
    case (kind)
      0: begin instr = {6'b000000, rs, rt, rd, 5'd0, 6'b100000}; ctrl.reg_dst = 1; ctrl.reg_wr = 1; end
      1: begin instr = {6'b000000, rs, rt, rd, 5'd0, 6'b100010}; ctrl.reg_dst = 1; ctrl.reg_wr = 1; ctrl.alu_op = ALU_SUB; end
      2: begin instr = {6'b001000, rs, rt, imm}; ctrl.alu_src = 1; ctrl.reg_wr = 1; end
      3: begin instr = {6'b100011, rs, rt, imm}; ctrl.alu_src = 1; ctrl.reg_wr = 1; ctrl.mem_to_reg = 1; end
      4: begin instr = {6'b101011, rs, rt, imm}; ctrl.alu_src = 1; ctrl.mem_wr = 1; end
      default: begin instr = {6'b000100, rs, rt, imm}; ctrl.branch = 1; ctrl.alu_op = ALU_SUB; end
    endcase
    a = regs[rs];
    b = (kind >= 2 && kind <= 4) ? sx(imm) : regs[rt];
    res = (kind == 1 || kind == 5) ? a - b : a + b;
    wa = (kind <= 1) ? rd : rt;
    wd = (kind == 3) ? dmem[(res >> 2) % DW] : res;
    we = (kind <= 3);
    #1;
    checks += 2;
    if (alu_result !== res) begin failures++; $display("FAIL kind %0d alu %h expected %h", kind, alu_result, res); end
    if (zero !== (res == 0)) begin failures++; $display("FAIL kind %0d zero", kind); end
    if (kind == 4) begin
      checks++;
      if (store_data !== regs[rt]) begin failures++; $display("FAIL store data"); end
    end
    if (we) begin
      checks += 2;
      if (reg_waddr !== wa) begin failures++; $display("FAIL kind %0d waddr %0d expected %0d", kind, reg_waddr, wa); end
      if (reg_wdata !== wd) begin failures++; $display("FAIL kind %0d wdata %h expected %h", kind, reg_wdata, wd); end
    end
    @(posedge clk);
    if (we && wa != 0) regs[wa] = wd;
    if (kind == 4) dmem[(res >> 2) % DW] = regs[rt];
    @(negedge clk);
  endtask

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int zeros;
    zeros = 0;
    regs[0] = 0;
    ctrl = '{default: '0, alu_op: ALU_ADD};
    instr = 0;
    @(negedge clk);
    for (int r = 1; r < 32; r++) step(2, 5'd0, 5'(r), 5'd0, 16'($urandom));
    for (int w = 0; w < DW; w++) step(4, 5'd0, 5'($urandom), 5'd0, 16'(w * 4));
    repeat (1500) begin
      int k;
      logic [4:0] rs, rt;
      k = $urandom % 6;
      rs = 5'($urandom); rt = 5'($urandom);
      if (k == 5 && ($urandom % 3) == 0) rt = rs;   // make equal-operand beq likely
      step(k, rs, rt, 5'($urandom), 16'($urandom));
      if (k == 5 && regs[rs] == regs[rt]) zeros++;
    end
    checks++;
    if (zeros == 0) begin failures++; $display("FAIL beq with equal operands never happened"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
