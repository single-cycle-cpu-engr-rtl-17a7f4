// single_cycle_cpu: a 32-bit CPU for a MIPS subset (add, sub, addi, lw, sw,
// beq, j) that completes one instruction per clock cycle.
//
// Three blocks: the fetch unit (PC, instruction memory, next-PC logic), the
// control decoder (opcode/function code to control points) and the datapath
// (register file, ALU, data memory and muxes). In each cycle the instruction
// at PC is read, decoded, its operands read, the ALU evaluated, the data
// memory read, and at the rising clock edge the register file, the data
// memory and the PC are all updated together. The clock period therefore
// has to cover the longest path, that of lw.
//
// Interface: clk, synchronous active-high rst (PC := 0; register and
// memory writes are masked while it is high), a program load
// port into the instruction memory (word address), and observation outputs
// showing the current PC and instruction and the register and memory writes
// that the current instruction will commit at the next rising edge.
module single_cycle_cpu
  import cpu_pkg::*;
#(
  parameter int unsigned IMEM_WORDS = 256,
  parameter int unsigned DMEM_WORDS = 256
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        imem_we,
  input  logic [29:0] imem_waddr,
  input  logic [31:0] imem_wdata,
  output logic [31:0] pc,
  output logic [31:0] instr,
  output logic        reg_we,
  output logic [4:0]  reg_waddr,
  output logic [31:0] reg_wdata,
  output logic        mem_we,
  output logic [31:0] mem_addr,
  output logic [31:0] mem_wdata
);
  ctrl_t ctrl;      // decoder output
  ctrl_t ctrl_g;    // same, with the state writes masked during reset
  logic  zero;
  r_fmt_t ir;       // instruction viewed as R format

  always_comb ir = r_fmt_t'(instr);

  fetch_unit #(.IMEM_WORDS(IMEM_WORDS)) u_fetch (
    .clk       (clk),
    .rst       (rst),
    .branch    (ctrl.branch),
    .jump      (ctrl.jump),
    .zero      (zero),
    .pc        (pc),
    .instr     (instr),
    .load_we   (imem_we),
    .load_addr (imem_waddr),
    .load_data (imem_wdata)
  );

  control u_ctrl (
    .op    (ir.op),
    .funct (ir.funct),
    .ctrl  (ctrl)
  );

  datapath #(.DMEM_WORDS(DMEM_WORDS)) u_dp (
    .clk        (clk),
    .instr      (instr),
    .ctrl       (ctrl_g),
    .zero       (zero),
    .reg_waddr  (reg_waddr),
    .reg_wdata  (reg_wdata),
    .alu_result (mem_addr),
    .store_data (mem_wdata)
  );

  // Register writes and stores are suppressed while reset is held, so
  // whatever the memory holds at PC during reset cannot change state.
  always_comb begin
    ctrl_g        = ctrl;
    ctrl_g.reg_wr = ctrl.reg_wr && !rst;
    ctrl_g.mem_wr = ctrl.mem_wr && !rst;
    reg_we        = ctrl_g.reg_wr;
    mem_we        = ctrl_g.mem_wr;
  end
endmodule
