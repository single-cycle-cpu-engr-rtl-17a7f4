// control: single-cycle main decoder. From the opcode (instr[31:26]) and,
// for R-type instructions, the function code (instr[5:0]) it produces the
// eight control points of the datapath and the fetch unit, one table row per
// instruction:
//
//            RegDst ALUSrc MemToReg RegWr MemWr Branch Jump ALUCntrl
//   add        1      0      0       1     0     0      0    Add
//   sub        1      0      0       1     0     0      0    Sub
//   addi       0      1      0       1     0     0      0    Add
//   lw         0      1      1       1     0     0      0    Add
//   sw         0      1      0       0     1     0      0    Add
//   beq        0      0      0       0     0     1      0    Sub
//   j          0      0      0       0     0     0      1    Add
//
// The add/sub/lw/sw/beq/j rows follow the design's control table; its
// don't-care entries are driven to 0 (ALUCntrl to Add) here. The addi row is
// derived from the addi datapath (write Rt, immediate operand, ALU result
// written back). Any other opcode or function code decodes to all-zero
// controls, so it changes no state and simply advances the PC.
// Purely combinational. An immediate assertion checks that every decoded
// row changes at most one kind of state.
module control
  import cpu_pkg::*;
(
  input  logic [5:0] op,
  input  logic [5:0] funct,
  output ctrl_t      ctrl
);
  always_comb begin
    ctrl = '{default: '0, alu_op: ALU_ADD};
    unique case (op)
      OP_RTYPE: begin
        if (funct == FN_ADD || funct == FN_SUB) begin
          ctrl.reg_dst = 1'b1;
          ctrl.reg_wr  = 1'b1;
          ctrl.alu_op  = (funct == FN_SUB) ? ALU_SUB : ALU_ADD;
        end
      end
      OP_ADDI: begin
        ctrl.alu_src = 1'b1;
        ctrl.reg_wr  = 1'b1;
      end
      OP_LW: begin
        ctrl.alu_src    = 1'b1;
        ctrl.mem_to_reg = 1'b1;
        ctrl.reg_wr     = 1'b1;
      end
      OP_SW: begin
        ctrl.alu_src = 1'b1;
        ctrl.mem_wr  = 1'b1;
      end
      OP_BEQ: begin
        ctrl.branch = 1'b1;
        ctrl.alu_op = ALU_SUB;
      end
      OP_J: begin
        ctrl.jump = 1'b1;
      end
      default: ;
    endcase
  end

  // Each row of the table changes at most one kind of state (a register, a
  // memory word, or the PC by a branch or a jump).
  always_comb begin
    assert ($countones({ctrl.reg_wr, ctrl.mem_wr, ctrl.branch, ctrl.jump}) <= 1)
      else $error("control: more than one state change decoded for op %b", op);
  end
endmodule
