// i281e_asm_pkg: instruction assembler functions for the i281e testbenches.
//
// One function per mnemonic returns the 16-bit word; register arguments
// are 0..3 for A..D, offsets and immediates are 8-bit two's complement.
// Branch and jump offsets are relative: target = address + 1 + offset.
package i281e_asm_pkg;
  import i281e_pkg::*;

  localparam logic [1:0] RA = 2'd0, RB = 2'd1, RC = 2'd2, RD = 2'd3;

  function automatic instr_t NOOP();                          return 16'h0000; endfunction
  function automatic instr_t INPUTC(byte_t a);                return {OPC_INPUT, 2'd0, 2'd0, a}; endfunction
  function automatic instr_t INPUTCF(logic [1:0] x, byte_t a); return {OPC_INPUT, x, 2'd1, a}; endfunction
  function automatic instr_t INPUTD(byte_t a);                return {OPC_INPUT, 2'd0, 2'd2, a}; endfunction
  function automatic instr_t INPUTDF(logic [1:0] x, byte_t a); return {OPC_INPUT, x, 2'd3, a}; endfunction
  function automatic instr_t MOVE(logic [1:0] x, logic [1:0] y);   return {OPC_MOVE, x, y, 8'd0}; endfunction
  function automatic instr_t LOADI(logic [1:0] x, byte_t v);       return {OPC_LOADI, x, 2'd0, v}; endfunction
  function automatic instr_t ADD(logic [1:0] x, logic [1:0] y);    return {OPC_ADD, x, y, 8'd0}; endfunction
  function automatic instr_t ADDI(logic [1:0] x, byte_t v);        return {OPC_ADDI, x, 2'd0, v}; endfunction
  function automatic instr_t SUB(logic [1:0] x, logic [1:0] y);    return {OPC_SUB, x, y, 8'd0}; endfunction
  function automatic instr_t SUBI(logic [1:0] x, byte_t v);        return {OPC_SUBI, x, 2'd0, v}; endfunction
  function automatic instr_t LOAD(logic [1:0] x, byte_t a);        return {OPC_LOAD, x, 2'd0, a}; endfunction
  function automatic instr_t LOADF(logic [1:0] x, logic [1:0] y, byte_t a); return {OPC_LOADF, x, y, a}; endfunction
  function automatic instr_t STORE(byte_t a, logic [1:0] x);       return {OPC_STORE, x, 2'd0, a}; endfunction
  function automatic instr_t STOREF(logic [1:0] y, byte_t a, logic [1:0] x); return {OPC_STOREF, x, y, a}; endfunction
  function automatic instr_t SHIFTL(logic [1:0] x);                return {OPC_SHIFT, x, 2'd0, 8'd0}; endfunction
  function automatic instr_t SHIFTR(logic [1:0] x);                return {OPC_SHIFT, x, 2'd1, 8'd0}; endfunction
  function automatic instr_t CMP(logic [1:0] x, logic [1:0] y);    return {OPC_CMP, x, y, 8'd0}; endfunction
  function automatic instr_t JUMP(byte_t off);                     return {OPC_JUMP, 4'd0, off}; endfunction
  function automatic instr_t BRZ(byte_t off);                      return {OPC_BRANCH, 4'd0, off}; endfunction
  function automatic instr_t BRNZ(byte_t off);                     return {OPC_BRANCH, 4'd1, off}; endfunction
  function automatic instr_t BRG(byte_t off);                      return {OPC_BRANCH, 4'd2, off}; endfunction
  function automatic instr_t BRGE(byte_t off);                     return {OPC_BRANCH, 4'd3, off}; endfunction
  function automatic instr_t BRC(byte_t off);                      return {OPC_BRANCH, 4'd4, off}; endfunction
  function automatic instr_t BRNC(byte_t off);                     return {OPC_BRANCH, 4'd5, off}; endfunction
  function automatic instr_t BRO(byte_t off);                      return {OPC_BRANCH, 4'd6, off}; endfunction
  function automatic instr_t BRNO(byte_t off);                     return {OPC_BRANCH, 4'd7, off}; endfunction
  function automatic instr_t BRN(byte_t off);                      return {OPC_BRANCH, 4'd8, off}; endfunction
  function automatic instr_t BRNN(byte_t off);                     return {OPC_BRANCH, 4'd9, off}; endfunction

  // offset from the branch at address 'from' to 'to'
  function automatic byte_t rel(int from, int to);
    return byte_t'(to - from - 1);
  endfunction

  // seven-segment glyph of a hex digit, bit 0 = a ... bit 6 = g
  function automatic byte_t hex_glyph(logic [3:0] v);
    string lit [16] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg", "acdfg", "acdefg", "abc",
                        "abcdefg", "abcdfg", "abcefg", "cdefg", "adef", "bcdeg", "adefg", "aefg"};
    byte_t g = '0;
    for (int i = 0; i < lit[v].len(); i++) g[lit[v][i] - "a"] = 1'b1;
    return g;
  endfunction
endpackage
