// datapath: register file, ALU and data memory of the single-cycle CPU
// with the three control muxes between them.
//
//   RegDst   : write address is Rd (instr[15:11]) when 1, Rt (instr[20:16]) when 0
//   ALUSrc   : ALU B is SignExtend(imm16) when 1, Reg[rt] (Db) when 0
//   MemToReg : register write data is data memory Dout when 1, ALU result when 0
//
// Da = Reg[rs] always feeds ALU A; Db = Reg[rt] also feeds the data memory
// Din for sw; the ALU result is the data memory address for lw/sw and
// drives Zero to the fetch unit for beq. Everything between the register
// read and the write-back is combinational; the register file and data
// memory update at the rising clock edge that ends the instruction. The
// write-back and store buses are brought out for observation.
module datapath
  import cpu_pkg::*;
#(
  parameter int unsigned DMEM_WORDS = 256
) (
  input  logic        clk,
  input  logic [31:0] instr,
  input  ctrl_t       ctrl,
  output logic        zero,
  output logic [4:0]  reg_waddr,
  output logic [31:0] reg_wdata,
  output logic [31:0] alu_result,
  output logic [31:0] store_data
);
  logic [31:0] da, db, imm32, alu_b, mem_dout;
  r_fmt_t      ir;   // instruction viewed as R format
  i_fmt_t      ii;   // instruction viewed as I format

  always_comb begin
    ir        = r_fmt_t'(instr);
    ii        = i_fmt_t'(instr);
    reg_waddr = ctrl.reg_dst ? ir.rd : ir.rt;
  end

  reg_file u_rf (
    .clk   (clk),
    .aa    (ir.rs),
    .ab    (ir.rt),
    .da    (da),
    .db    (db),
    .aw    (reg_waddr),
    .dw    (reg_wdata),
    .wr_en (ctrl.reg_wr)
  );

  sign_extend u_sext (
    .imm16 (ii.imm16),
    .imm32 (imm32)
  );

  always_comb alu_b = ctrl.alu_src ? imm32 : db;

  alu u_alu (
    .alu_op (ctrl.alu_op),
    .a      (da),
    .b      (alu_b),
    .result (alu_result),
    .zero   (zero)
  );

  data_mem #(.WORDS(DMEM_WORDS)) u_dmem (
    .clk   (clk),
    .wr_en (ctrl.mem_wr),
    .addr  (alu_result),
    .din   (db),
    .dout  (mem_dout)
  );

  always_comb begin
    reg_wdata  = ctrl.mem_to_reg ? mem_dout : alu_result;
    store_data = db;
  end
endmodule
