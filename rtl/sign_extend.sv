// sign_extend: widens the 16-bit immediate of an I-format instruction to
// 32 bits by replicating bit 15, as SignExtend(imm) in the instruction
// semantics. Purely combinational. Used twice: for the ALU B operand of
// addi/lw/sw and for the branch offset in the fetch unit.
module sign_extend (
  input  logic [15:0] imm16,
  output logic [31:0] imm32
);
  always_comb imm32 = {{16{imm16[15]}}, imm16};
endmodule
