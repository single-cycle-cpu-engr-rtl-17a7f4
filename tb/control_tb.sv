// control_tb: checks the decoder against the control table, written out
// here row by row as independent expected values, for add, sub, addi, lw,
// sw, beq and j with random bits in the unused instruction fields, and
// checks that undefined opcodes and function codes write no state.
module control_tb;
  import cpu_pkg::*;
  logic [5:0] op, funct;
  ctrl_t      ctrl;
  int checks = 0, failures = 0;

  control dut (.op(op), .funct(funct), .ctrl(ctrl));

  // expected: {RegDst, ALUSrc, MemToReg, RegWr, MemWr, Branch, Jump, ALUCntrl(0=Add,1=Sub)}
  task automatic check(input string name, input logic [5:0] o, input logic [5:0] f,
                       input logic [7:0] expected);
    logic [7:0] got;
    op = o; funct = f;
    #1;
    got = {ctrl.reg_dst, ctrl.alu_src, ctrl.mem_to_reg, ctrl.reg_wr,
           ctrl.mem_wr, ctrl.branch, ctrl.jump, ctrl.alu_op == ALU_SUB};
    checks++;
    if (got !== expected) begin
      failures++;
      $display("FAIL %s op=%b funct=%b got %b expected %b", name, o, f, got, expected);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [5:0] r;
    repeat (20) begin
      r = 6'($urandom);
      check("add",  6'b000000, 6'b100000, 8'b1001_0000);
      check("sub",  6'b000000, 6'b100010, 8'b1001_0001);
      check("addi", 6'b001000, r,         8'b0101_0000);
      check("lw",   6'b100011, r,         8'b0111_0000);
      check("sw",   6'b101011, r,         8'b0100_1000);
      check("beq",  6'b000100, r,         8'b0000_0101);
      check("j",    6'b000010, r,         8'b0000_0010);
    end
    // undefined R-type function codes and opcodes: no register or memory write,
    // no branch, no jump
    for (int f = 0; f < 64; f++) begin
      if (f != 32'b100000 && f != 32'b100010) begin
        op = 6'b000000; funct = 6'(f); #1;
        checks++;
        if (ctrl.reg_wr || ctrl.mem_wr || ctrl.branch || ctrl.jump) begin
          failures++; $display("FAIL undefined funct %b", f[5:0]);
        end
      end
    end
    for (int o = 1; o < 64; o++) begin
      if (!(o inside {32'b100011, 32'b101011, 32'b000100, 32'b000010, 32'b001000})) begin
        op = 6'(o); funct = 6'($urandom); #1;
        checks++;
        if (ctrl.reg_wr || ctrl.mem_wr || ctrl.branch || ctrl.jump) begin
          failures++; $display("FAIL undefined op %b", o[5:0]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
