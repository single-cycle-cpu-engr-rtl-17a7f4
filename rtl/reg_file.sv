// reg_file: 32 x 32-bit register file with two read ports and one write
// port, named as in the design's diagrams: Aa/Ab select the registers read
// onto Da/Db, Aw/Dw/WrEn form the write port.
//
// Reads are combinational so an instruction reads its operands in the same
// cycle it is fetched; the write happens at the rising clock edge that ends
// the instruction, so a read of the register being written returns the old
// value during that cycle. Register 0 always reads as zero and ignores
// writes (the MIPS $zero convention, a choice of this implementation). There
// is no reset: software initialises registers before using them.
module reg_file
  import cpu_pkg::*;
(
  input  logic             clk,
  input  logic [RADDR-1:0] aa,
  input  logic [RADDR-1:0] ab,
  output logic [XLEN-1:0]  da,
  output logic [XLEN-1:0]  db,
  input  logic [RADDR-1:0] aw,
  input  logic [XLEN-1:0]  dw,
  input  logic             wr_en
);
  logic [XLEN-1:0] regs [NREGS];

  always_ff @(posedge clk) begin
    if (wr_en && aw != '0) regs[aw] <= dw;
  end

  always_comb begin
    da = (aa == '0) ? '0 : regs[aa];
    db = (ab == '0) ? '0 : regs[ab];
  end
endmodule
