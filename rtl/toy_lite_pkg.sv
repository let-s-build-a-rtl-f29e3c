// toy_lite_pkg: types and constants shared by the TOY-Lite CPU blocks.
//
// TOY-Lite is a 10-bit machine: 16 words of main memory, 4 general registers
// and a 4-bit program counter. An instruction is one 10-bit word in one of
// two formats, both with a 4-bit opcode in the top bits:
//   register format : opcode[9:6] | Rs[5:4] | Rd1[3:2] | Rd2[1:0]
//   address format  : opcode[9:6] | Rs[5:4] | addr[3:0]
// Field names and widths follow the instruction-format drawing of the design.
// Rs names the register the instruction writes (or, for store, branch and
// jump, the register it uses); Rd1 and Rd2 name the two registers that are
// read for the ALU. Rd2 also holds the pointer register of the indirect
// load/store. That reading of the field roles is this design's choice.
//
// The control word (ctrl_t) is the set of control lines the control block
// drives into the datapath. Every multiplexer select is one-hot, as in the
// multiplexers of the design, where exactly one select line is hot.
package toy_lite_pkg;

  localparam int unsigned WORD_W    = 10;  // memory word, register and IR width
  localparam int unsigned ADDR_W    = 4;   // PC and memory address width
  localparam int unsigned MEM_WORDS = 16;  // main memory size
  localparam int unsigned NUM_REGS  = 4;   // number of TOY-Lite registers
  localparam int unsigned REG_SEL_W = 2;   // register field width
  localparam int unsigned OPCODE_W  = 4;

  typedef logic [WORD_W-1:0] word_t;
  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [REG_SEL_W-1:0] regsel_t;

  // The sixteen instructions, by opcode.
  typedef enum logic [OPCODE_W-1:0] {
    OP_HALT  = 4'h0,
    OP_ADD   = 4'h1,
    OP_SUB   = 4'h2,
    OP_AND   = 4'h3,
    OP_XOR   = 4'h4,
    OP_SHL   = 4'h5,
    OP_SHR   = 4'h6,
    OP_LDA   = 4'h7,  // load address
    OP_LD    = 4'h8,  // load
    OP_ST    = 4'h9,  // store
    OP_LDI   = 4'hA,  // load indirect
    OP_STI   = 4'hB,  // store indirect
    OP_BZ    = 4'hC,  // branch zero
    OP_BP    = 4'hD,  // branch positive
    OP_JR    = 4'hE,  // jump register
    OP_JL    = 4'hF   // jump and link
  } opcode_e;

  typedef enum logic [2:0] {
    ALU_ADD = 3'd0,
    ALU_SUB = 3'd1,
    ALU_AND = 3'd2,
    ALU_XOR = 3'd3,
    ALU_SHL = 3'd4,
    ALU_SHR = 3'd5
  } alu_op_e;

  // Decoded instruction word.
  typedef struct packed {
    opcode_e op;
    regsel_t rs;   // written / used register
    regsel_t rd1;  // first ALU source
    regsel_t rd2;  // second ALU source, pointer for indirect access
  } instr_t;

  // One-hot select positions of the datapath multiplexers.
  // Address MUX (memory address): PC, IR address field, register (Rd2), switches.
  localparam int unsigned AMUX_PC = 0, AMUX_IR = 1, AMUX_REG = 2, AMUX_SW = 3, AMUX_N = 4;
  // Register input MUX: ALU, memory, IR address field, PC.
  localparam int unsigned RMUX_ALU = 0, RMUX_MEM = 1, RMUX_IR = 2, RMUX_PC = 3, RMUX_N = 4;
  // PC input MUX: IR address field, register (Rs), switches.
  localparam int unsigned PMUX_IR = 0, PMUX_REG = 1, PMUX_SW = 2, PMUX_N = 3;
  // Memory input MUX: register (Rs), switches.
  localparam int unsigned DMUX_REG = 0, DMUX_SW = 1, DMUX_N = 2;
  // First register read select: Rd1 field, Rs field.
  localparam int unsigned SMUX_RD1 = 0, SMUX_RS = 1, SMUX_N = 2;

  typedef struct packed {
    logic [AMUX_N-1:0] addr_sel;
    logic              mem_we;
    logic [DMUX_N-1:0] mem_din_sel;
    logic              ir_we;
    logic [PMUX_N-1:0] pc_in_sel;
    logic              pc_load;
    logic              pc_inc;
    logic              pc_we;
    logic [SMUX_N-1:0] rd1_sel;
    logic              reg_we;
    logic [RMUX_N-1:0] reg_in_sel;
    alu_op_e           alu_op;
  } ctrl_t;

endpackage
