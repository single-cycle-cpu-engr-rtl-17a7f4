// sign_extend_tb: checks the 16-to-32-bit sign extension against the
// arithmetic definition (value in [-32768, 32767] as a 32-bit signed
// number) for boundary values and random immediates.
module sign_extend_tb;
  logic [15:0] imm16;
  logic [31:0] imm32;
  int checks = 0, failures = 0;

  sign_extend dut (.imm16(imm16), .imm32(imm32));

  task automatic check(input logic [15:0] v);
    int signed expected;
    imm16 = v;
    #1;
    expected = (v >= 16'h8000) ? int'(v) - 65536 : int'(v);
    checks++;
    if (imm32 !== 32'(expected)) begin
      failures++;
      $display("FAIL imm16=%h got %h expected %h", v, imm32, expected);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(16'h0000); check(16'h0001); check(16'h7fff);
    check(16'h8000); check(16'hffff); check(16'hfffc);
    repeat (500) check(16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
