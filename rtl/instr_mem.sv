// instr_mem: program store of WORDS 32-bit words. The fetch unit drives
// the word address PC[31:2] (byte address bits [1:0] are always "00"), and
// the instruction appears combinationally on instr, so fetch completes
// within the cycle. Word addresses beyond WORDS wrap (only the low
// $clog2(WORDS) bits are decoded).
//
// A clocked load port (load_we/load_addr/load_data) writes a word at the
// rising edge; it exists so that a program can be placed in the memory
// before reset is released, and is not part of instruction execution.
module instr_mem #(
  parameter int unsigned WORDS = 256
) (
  input  logic        clk,
  input  logic [29:0] addr,       // word address = PC[31:2]
  output logic [31:0] instr,
  input  logic        load_we,
  input  logic [29:0] load_addr,  // word address
  input  logic [31:0] load_data
);
  localparam int unsigned AW = (WORDS > 1) ? $clog2(WORDS) : 1;

  logic [31:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (load_we) mem[load_addr[AW-1:0]] <= load_data;
  end

  always_comb instr = mem[addr[AW-1:0]];
endmodule
