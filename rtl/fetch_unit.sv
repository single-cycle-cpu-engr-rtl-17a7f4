// fetch_unit: the instruction fetch unit. It holds the program counter,
// reads the instruction memory and computes the next PC.
//
// The PC register keeps only the 30-bit word address PC[31:2]; the
// instruction memory is addressed with it and byte-address bits [1:0] are
// the constant "00". One adder with carry-in 1 produces
//   PC[31:2] + 1 + (Branch & Zero ? SignExtend(imm16) : 0),
// i.e. PC+4 or PC+4+SignExtend(imm16)*4 in byte terms. A second mux, under
// Jump, replaces that with {PC[31:28], target[25:0]} (the jump target, word
// aligned). The PC register loads the chosen value at every rising clock
// edge, so each instruction takes exactly one cycle. Synchronous active-high
// reset sets the PC to 0 (the reset address is this implementation's
// choice). The load port passes straight to the instruction memory.
module fetch_unit #(
  parameter int unsigned IMEM_WORDS = 256
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        branch,     // Branch control
  input  logic        jump,       // Jump control
  input  logic        zero,       // ALU Zero from the datapath
  output logic [31:0] pc,         // byte address of the current instruction
  output logic [31:0] instr,      // Instr[31:0]
  input  logic        load_we,
  input  logic [29:0] load_addr,
  input  logic [31:0] load_data
);
  logic [29:0] pc_w;       // PC[31:2]
  logic [29:0] next_pc_w;
  logic [29:0] seq_pc_w;   // adder output
  logic [31:0] offset;     // SignExtend(imm16)
  logic [29:0] addend;     // branch mux output

  instr_mem #(.WORDS(IMEM_WORDS)) u_imem (
    .clk       (clk),
    .addr      (pc_w),
    .instr     (instr),
    .load_we   (load_we),
    .load_addr (load_addr),
    .load_data (load_data)
  );

  sign_extend u_sext (
    .imm16 (instr[15:0]),
    .imm32 (offset)
  );

  always_comb begin
    addend    = (branch && zero) ? offset[29:0] : '0;
    seq_pc_w  = pc_w + addend + 30'd1;
    next_pc_w = jump ? {pc_w[29:26], instr[25:0]} : seq_pc_w;
  end

  always_ff @(posedge clk) begin
    if (rst) pc_w <= '0;
    else     pc_w <= next_pc_w;
  end

  always_comb pc = {pc_w, 2'b00};
endmodule
