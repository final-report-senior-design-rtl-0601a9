// tb_i281e_opcode_decoder: exhaustive test of the opcode decoder.
//
// Every one of the 65536 instruction words is decoded; the output must be
// one-hot and name the operation given by a reference written as a lookup
// on the opcode nibble and the sub-function bits.
module tb_i281e_opcode_decoder;
  import i281e_pkg::*;

  logic    clk = 1'b0;
  always #5 clk = ~clk;

  instr_t  instr;
  op_vec_t op;
  int checks = 0, failures = 0;

  i281e_opcode_decoder dut (.instr, .op);

  function automatic op_e expected(instr_t w);
    op_e inputs [4]  = '{OP_INPUTC, OP_INPUTCF, OP_INPUTD, OP_INPUTDF};
    op_e singles [16] = '{OP_NOOP, OP_NOOP, OP_MOVE, OP_LOADI, OP_ADD, OP_ADDI, OP_SUB, OP_SUBI,
                          OP_LOAD, OP_LOADF, OP_STORE, OP_STOREF, OP_NOOP, OP_CMP, OP_JUMP, OP_NOOP};
    op_e branches [16] = '{OP_BRE, OP_BRNE, OP_BRG, OP_BRGE, OP_BRC, OP_BRNC, OP_BRO, OP_BRNO,
                           OP_BRN, OP_BRNN, OP_NOOP, OP_NOOP, OP_NOOP, OP_NOOP, OP_NOOP, OP_NOOP};
    int opc = int'(w[15:12]);
    if (opc === 1)  return inputs[w[9:8]];
    if (opc === 12) return w[8] ? OP_SHIFTR : OP_SHIFTL;
    if (opc === 15) return branches[w[11:8]];
    return singles[opc];
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int unsigned w = 0; w < 65536; w++) begin
      op_e e;
      instr = instr_t'(w);
      #1;
      e = expected(instr);
      checks++;
      if (op !== op_vec_t'(1) << e) begin
        failures++;
        if (failures < 10) $display("FAIL: instr %h gives %b, expected %s", instr, op, e.name());
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
