// i281e_pkg: types and constants shared by the i281e CPU blocks.
//
// The i281e is a single-cycle 8-bit teaching processor with a 16-bit
// instruction word, four 8-bit registers (A..D), a four-function ALU with
// four flags, a code memory split into a 128-word boot ROM and a banked code
// RAM, and a byte-wide data memory whose first eight bytes are mirrored on a
// seven-segment video card.
//
// Instruction word (16 bits):
//   [15:12] opcode   [11:10] X register   [9:8] Y register / sub-function
//   [7:0]   immediate value, data address or branch offset
// The 4-bit opcode field and the use of bits 9:8 as a sub-function for the
// INPUT, SHIFT and branch groups follow the processor's decoder description.
// The numeric opcode values themselves are this design's choice (they follow
// the customary i281 assignment) because no opcode table is given.
//
// Control lines carry the numbers c1..c18 used throughout the processor:
// c1 code-memory write, c2 PC mux, c3 PC write, c4/c5 read port 0 select,
// c6/c7 read port 1 select, c8/c9 write select, c10 register write,
// c11 ALU source mux, c12/c13 ALU select 1/0, c14 flag write,
// c15 ALU result mux, c16 data-memory input mux, c17 data-memory write,
// c18 register write-back mux.
package i281e_pkg;

  localparam int unsigned DATA_W  = 8;
  localparam int unsigned INSTR_W = 16;
  localparam int unsigned PC_W    = 8;

  typedef logic [DATA_W-1:0]  byte_t;
  typedef logic [INSTR_W-1:0] instr_t;

  // Opcode field values (bits 15:12).
  localparam logic [3:0] OPC_NOOP   = 4'h0;
  localparam logic [3:0] OPC_INPUT  = 4'h1;  // INPUTC/INPUTCF/INPUTD/INPUTDF by bits 9:8
  localparam logic [3:0] OPC_MOVE   = 4'h2;
  localparam logic [3:0] OPC_LOADI  = 4'h3;  // LOADI and LOADP share this code
  localparam logic [3:0] OPC_ADD    = 4'h4;
  localparam logic [3:0] OPC_ADDI   = 4'h5;
  localparam logic [3:0] OPC_SUB    = 4'h6;
  localparam logic [3:0] OPC_SUBI   = 4'h7;
  localparam logic [3:0] OPC_LOAD   = 4'h8;
  localparam logic [3:0] OPC_LOADF  = 4'h9;
  localparam logic [3:0] OPC_STORE  = 4'hA;
  localparam logic [3:0] OPC_STOREF = 4'hB;
  localparam logic [3:0] OPC_SHIFT  = 4'hC;  // SHIFTL / SHIFTR by bit 8
  localparam logic [3:0] OPC_CMP    = 4'hD;
  localparam logic [3:0] OPC_JUMP   = 4'hE;
  localparam logic [3:0] OPC_BRANCH = 4'hF;  // condition in bits 11:8

  // One entry per decoded operation; the opcode decoder drives exactly one
  // bit of an op_vec_t high.  The first 23 are the i281 operations, the last
  // six are the flag branches added by the i281e (BRC ... BRNN).
  typedef enum logic [4:0] {
    OP_NOOP, OP_INPUTC, OP_INPUTCF, OP_INPUTD, OP_INPUTDF, OP_MOVE, OP_LOADI,
    OP_ADD, OP_ADDI, OP_SUB, OP_SUBI, OP_LOAD, OP_LOADF, OP_STORE, OP_STOREF,
    OP_SHIFTL, OP_SHIFTR, OP_CMP, OP_JUMP, OP_BRE, OP_BRNE, OP_BRG, OP_BRGE,
    OP_BRC, OP_BRNC, OP_BRO, OP_BRNO, OP_BRN, OP_BRNN
  } op_e;

  localparam int unsigned NUM_OPS = 29;
  typedef logic [NUM_OPS-1:0] op_vec_t;

  // ALU select (c12 = ALU_SELECT1, c13 = ALU_SELECT0).
  typedef enum logic [1:0] {
    ALU_SHL = 2'b00,  // shift left (NOR in the ALU NOR board variant)
    ALU_SHR = 2'b01,
    ALU_ADD = 2'b10,
    ALU_SUB = 2'b11
  } alu_sel_e;

  // Flag register layout: bit 0 zero, bit 1 negative, bit 2 overflow, bit 3 carry.
  typedef struct packed {
    logic c;
    logic o;
    logic n;
    logic z;
  } flags_t;

  // The eighteen control lines c1..c18.
  typedef struct packed {
    logic       cmem_we;      // c1
    logic       pc_mux;       // c2: 0 = PC+1, 1 = PC+1+offset
    logic       pc_we;        // c3
    logic [1:0] p0_sel;       // c4,c5
    logic [1:0] p1_sel;       // c6,c7
    logic [1:0] wr_sel;       // c8,c9
    logic       reg_we;       // c10
    logic       alu_src;      // c11: 0 = port 1, 1 = immediate
    alu_sel_e   alu_sel;      // c12,c13
    logic       flags_we;     // c14
    logic       result_mux;   // c15: 0 = ALU result, 1 = immediate
    logic       dmem_in_mux;  // c16: 0 = port 1, 1 = switches low byte
    logic       dmem_we;      // c17
    logic       reg_wb_mux;   // c18: 0 = c15 output, 1 = data memory
  } ctrl_t;

  // Code- and data-memory side controls of the i281e whose instruction
  // encodings are not part of the decoded instruction set here.
  typedef struct packed {
    logic cmem_bank_n;  // active low: load the code-RAM bank register
    logic wb_n;         // active low: write-back module assembles RAM words from registers
    logic dmem_bank_we; // load the data-memory bank register
  } ext_ctrl_t;

  // Instruction builders, used by the debug module and by testbenches.
  function automatic instr_t mk_instr(logic [3:0] opc, logic [1:0] x, logic [1:0] y,
                                      byte_t imm);
    return {opc, x, y, imm};
  endfunction

endpackage
