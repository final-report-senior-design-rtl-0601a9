// i281e_opcode_decoder: turns an instruction word into a one-hot operation.
//
// A 4-to-16 decode of the opcode field (bits 15:12) picks the operation
// group; for the INPUT, SHIFT and branch groups bits 9:8 pick the member,
// as in the processor's decoder.  Exactly one bit of op is high for every
// instruction word, which an assertion checks.  Purely combinational.
//
// Branch group (opcode 1111), condition in bits 11:8:
//   0000 BRE/BRZ  0001 BRNE/BRNZ  0010 BRG   0011 BRGE
//   0100 BRC      0101 BRNC       0110 BRO   0111 BRNO
//   1000 BRN      1001 BRNN       others decode as NOOP
// The first four follow the i281 branch set; BRC..BRNN are flag branches of
// the i281e whose encoding here (bits 11:10 = 01 / 10) is this design's
// choice.  SHIFT uses bit 8 (0 left, 1 right), also this design's choice.
module i281e_opcode_decoder
  import i281e_pkg::*;
(
  input  instr_t  instr,
  output op_vec_t op
);

  logic [3:0] opc;
  logic [1:0] x, y;

  assign opc = instr[15:12];
  assign x   = instr[11:10];
  assign y   = instr[9:8];

  always_comb begin
    op = '0;
    unique case (opc)
      OPC_NOOP:   op[OP_NOOP]  = 1'b1;
      OPC_INPUT:
        unique case (y)
          2'b00: op[OP_INPUTC]  = 1'b1;
          2'b01: op[OP_INPUTCF] = 1'b1;
          2'b10: op[OP_INPUTD]  = 1'b1;
          2'b11: op[OP_INPUTDF] = 1'b1;
        endcase
      OPC_MOVE:   op[OP_MOVE]   = 1'b1;
      OPC_LOADI:  op[OP_LOADI]  = 1'b1;
      OPC_ADD:    op[OP_ADD]    = 1'b1;
      OPC_ADDI:   op[OP_ADDI]   = 1'b1;
      OPC_SUB:    op[OP_SUB]    = 1'b1;
      OPC_SUBI:   op[OP_SUBI]   = 1'b1;
      OPC_LOAD:   op[OP_LOAD]   = 1'b1;
      OPC_LOADF:  op[OP_LOADF]  = 1'b1;
      OPC_STORE:  op[OP_STORE]  = 1'b1;
      OPC_STOREF: op[OP_STOREF] = 1'b1;
      OPC_SHIFT:
        if (y[0]) op[OP_SHIFTR] = 1'b1;
        else      op[OP_SHIFTL] = 1'b1;
      OPC_CMP:    op[OP_CMP]    = 1'b1;
      OPC_JUMP:   op[OP_JUMP]   = 1'b1;
      OPC_BRANCH:
        unique case ({x, y})
          4'b0000: op[OP_BRE]  = 1'b1;
          4'b0001: op[OP_BRNE] = 1'b1;
          4'b0010: op[OP_BRG]  = 1'b1;
          4'b0011: op[OP_BRGE] = 1'b1;
          4'b0100: op[OP_BRC]  = 1'b1;
          4'b0101: op[OP_BRNC] = 1'b1;
          4'b0110: op[OP_BRO]  = 1'b1;
          4'b0111: op[OP_BRNO] = 1'b1;
          4'b1000: op[OP_BRN]  = 1'b1;
          4'b1001: op[OP_BRNN] = 1'b1;
          default: op[OP_NOOP] = 1'b1;
        endcase
    endcase
  end

  always_comb begin
    assert ($onehot(op)) else $error("opcode decoder: not one-hot for %h", instr);
  end

endmodule
