// alu_tb: checks add and subtract results and the Zero flag against
// integer arithmetic for corner operands and random operands, including
// equal operands so that Zero is seen high on subtract.
module alu_tb;
  import cpu_pkg::*;
  alu_op_e     op;
  logic [31:0] a, b, result;
  logic        zero;
  int checks = 0, failures = 0, zero_seen = 0;

  alu dut (.alu_op(op), .a(a), .b(b), .result(result), .zero(zero));

  task automatic check(input alu_op_e o, input logic [31:0] x, input logic [31:0] y);
    longint unsigned full;
    logic [31:0] expected;
    op = o; a = x; b = y;
    #1;
    full = (o == ALU_ADD) ? (longint'(x) + longint'(y)) : (longint'(x) + 64'h1_0000_0000 - longint'(y));
    expected = full[31:0];
    checks++;
    if (result !== expected || zero !== (expected == 32'd0)) begin
      failures++;
      $display("FAIL op=%s a=%h b=%h got %h/%b expected %h", o.name(), x, y, result, zero, expected);
    end
    if (zero) zero_seen++;
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] r;
    check(ALU_ADD, 32'd1, 32'd2);
    check(ALU_ADD, 32'hffff_ffff, 32'd1);
    check(ALU_SUB, 32'd5, 32'd7);
    check(ALU_SUB, 32'h8000_0000, 32'h8000_0000);
    check(ALU_ADD, 32'd0, 32'd0);
    repeat (500) begin
      r = $urandom;
      check(ALU_ADD, $urandom, $urandom);
      check(ALU_SUB, $urandom, $urandom);
      check(ALU_SUB, r, r);
    end
    checks++;
    if (zero_seen == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
