// alu: the execute unit of the datapath. ALUCntrl selects a 32-bit
// two's-complement add or subtract of A (Reg[rs]) and B (Reg[rt] or the
// sign-extended immediate). Zero is high when the result is all zeros; beq
// subtracts and tests Zero for Reg[rs] == Reg[rt]. Overflow is not detected
// (the design defines no overflow behaviour). Purely combinational.
module alu
  import cpu_pkg::*;
(
  input  alu_op_e     alu_op,
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] result,
  output logic        zero
);
  always_comb begin
    unique case (alu_op)
      ALU_ADD: result = a + b;
      ALU_SUB: result = a - b;
      default: result = a + b;
    endcase
    zero = (result == '0);
  end
endmodule
