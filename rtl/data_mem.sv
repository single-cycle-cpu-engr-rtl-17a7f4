// data_mem: data store of WORDS 32-bit words with the ports of the design's
// Data Memory block: Addr (the ALU result, a byte address), Din (Reg[rt]),
// Dout, WrEn (MemWr).
//
// Only whole words are accessed: Addr[1:0] is ignored and the word index is
// Addr[31:2], of which the low $clog2(WORDS) bits are decoded. Dout follows
// Addr combinationally, so lw reads in the same cycle; a write takes effect
// at the rising clock edge that ends the sw instruction.
module data_mem #(
  parameter int unsigned WORDS = 256
) (
  input  logic        clk,
  input  logic        wr_en,
  input  logic [31:0] addr,
  input  logic [31:0] din,
  output logic [31:0] dout
);
  localparam int unsigned AW = (WORDS > 1) ? $clog2(WORDS) : 1;

  logic [31:0] mem [WORDS];
  logic [AW-1:0] widx;

  always_comb widx = addr[AW+1:2];

  always_ff @(posedge clk) begin
    if (wr_en) mem[widx] <= din;
  end

  always_comb dout = mem[widx];
endmodule
