// cpu_pkg: shared types and constants of the single-cycle CPU.
//
// Instruction field positions follow the three MIPS formats (R: op rs rt rd
// shamt funct, I: op rs rt imm16, J: op target26). The opcode and function
// codes of add, sub, lw, sw, beq and j are those of the control table of the
// design; the addi opcode (6'b001000) is the standard MIPS one, because the
// control table leaves addi out. The control word bundles the eight control
// points of the datapath and the fetch unit; the format structs give the
// instruction fields by name when a 32-bit word is cast to them.
package cpu_pkg;

  localparam int unsigned XLEN = 32;   // data and address width
  localparam int unsigned NREGS = 32;  // architectural registers
  localparam int unsigned RADDR = 5;   // register address width ("5 bits/ea")

  // Opcodes (instr[31:26])
  localparam logic [5:0] OP_RTYPE = 6'b000000;
  localparam logic [5:0] OP_LW    = 6'b100011;
  localparam logic [5:0] OP_SW    = 6'b101011;
  localparam logic [5:0] OP_BEQ   = 6'b000100;
  localparam logic [5:0] OP_J     = 6'b000010;
  localparam logic [5:0] OP_ADDI  = 6'b001000;

  // Function codes of R-type instructions (instr[5:0])
  localparam logic [5:0] FN_ADD = 6'b100000;
  localparam logic [5:0] FN_SUB = 6'b100010;

  // ALU operation selected by ALUCntrl
  typedef enum logic {
    ALU_ADD = 1'b0,
    ALU_SUB = 1'b1
  } alu_op_e;

  // Control points of the datapath and the fetch unit
  typedef struct packed {
    logic    reg_dst;     // 1: write Rd, 0: write Rt
    logic    alu_src;     // 1: ALU B is SignExtend(imm16), 0: Reg[rt]
    logic    mem_to_reg;  // 1: write data memory output, 0: ALU result
    logic    reg_wr;      // register file write enable
    logic    mem_wr;      // data memory write enable
    logic    branch;      // take PC+4+imm*4 when the ALU result is zero
    logic    jump;        // take {PC[31:28], target, 00}
    alu_op_e alu_op;      // ALUCntrl
  } ctrl_t;

  // Instruction formats (bit positions of the R, I and J formats)
  typedef struct packed {
    logic [5:0] op;      // [31:26]
    logic [4:0] rs;      // [25:21]
    logic [4:0] rt;      // [20:16]
    logic [4:0] rd;      // [15:11]
    logic [4:0] shamt;   // [10:6]
    logic [5:0] funct;   // [5:0]
  } r_fmt_t;

  typedef struct packed {
    logic [5:0]  op;     // [31:26]
    logic [4:0]  rs;     // [25:21]
    logic [4:0]  rt;     // [20:16]
    logic [15:0] imm16;  // [15:0]
  } i_fmt_t;

  typedef struct packed {
    logic [5:0]  op;     // [31:26]
    logic [25:0] target; // [25:0]
  } j_fmt_t;

endpackage
