// i281e_control_table: maps the decoded operation to the control lines c1..c18.
//
// Inputs are the one-hot operation from the opcode decoder, the register
// fields X (bits 11:10) and Y (bits 9:8) of the instruction and the flag
// register.  The output is one ctrl_t holding all eighteen control lines.
// The table is the processor's control-line table: a line not listed for an
// operation is 0, X/Y entries copy the register field, and a branch drives
// the PC mux (c2) with its condition.  On the board this table lives in
// EEPROMs addressed by the same inputs; here it is combinational logic with
// the same contents.
//
// Operation summary (R[x] = register x, imm = instruction bits 7:0):
//   INPUTC   CMEM[imm] <- switches        INPUTCF  CMEM[R[X]+imm] <- switches
//   INPUTD   DMEM[imm] <- switches[7:0]   INPUTDF  DMEM[R[X]+imm] <- switches[7:0]
//   MOVE     R[X] <- R[Y] + imm           LOADI    R[X] <- imm
//   ADD/SUB  R[X] <- R[X] +/- R[Y], flags ADDI/SUBI R[X] <- R[X] +/- imm, flags
//   LOAD     R[X] <- DMEM[imm]            LOADF    R[X] <- DMEM[R[Y]+imm]
//   STORE    DMEM[imm] <- R[X]            STOREF   DMEM[R[Y]+imm] <- R[X]
//   SHIFTL/R R[X] <- R[X] shifted, flags  CMP      flags of R[X] - R[Y]
//   JUMP     PC <- PC+1+imm               Bxx      PC <- PC+1+imm if condition
// Signed branches: BRG takes when !Z and N == O, BRGE when N == O (this
// design's reading of "greater" after CMP X,Y).
module i281e_control_table
  import i281e_pkg::*;
(
  input  op_vec_t    op,
  input  logic [1:0] x,
  input  logic [1:0] y,
  input  flags_t     flags,
  output ctrl_t      ctrl
);

  logic ge;
  assign ge = (flags.n == flags.o);

  always_comb begin
    ctrl = '0;
    ctrl.alu_sel = ALU_SHL;
    // Every operation advances or loads the PC.
    ctrl.pc_we = 1'b1;

    if (op[OP_INPUTC]) begin
      ctrl.cmem_we    = 1'b1;
      ctrl.result_mux = 1'b1;
    end
    if (op[OP_INPUTCF]) begin
      ctrl.cmem_we = 1'b1;
      ctrl.p0_sel  = x;
      ctrl.alu_src = 1'b1;
      ctrl.alu_sel = ALU_ADD;
    end
    if (op[OP_INPUTD]) begin
      ctrl.result_mux  = 1'b1;
      ctrl.dmem_in_mux = 1'b1;
      ctrl.dmem_we     = 1'b1;
    end
    if (op[OP_INPUTDF]) begin
      ctrl.p0_sel      = x;
      ctrl.alu_src     = 1'b1;
      ctrl.alu_sel     = ALU_ADD;
      ctrl.dmem_in_mux = 1'b1;
      ctrl.dmem_we     = 1'b1;
    end
    if (op[OP_MOVE]) begin
      ctrl.p0_sel  = y;
      ctrl.wr_sel  = x;
      ctrl.reg_we  = 1'b1;
      ctrl.alu_src = 1'b1;
      ctrl.alu_sel = ALU_ADD;
    end
    if (op[OP_LOADI]) begin
      ctrl.wr_sel     = x;
      ctrl.reg_we     = 1'b1;
      ctrl.result_mux = 1'b1;
    end
    if (op[OP_ADD] || op[OP_SUB]) begin
      ctrl.p0_sel   = x;
      ctrl.p1_sel   = y;
      ctrl.wr_sel   = x;
      ctrl.reg_we   = 1'b1;
      ctrl.alu_sel  = op[OP_SUB] ? ALU_SUB : ALU_ADD;
      ctrl.flags_we = 1'b1;
    end
    if (op[OP_ADDI] || op[OP_SUBI]) begin
      ctrl.p0_sel   = x;
      ctrl.wr_sel   = x;
      ctrl.reg_we   = 1'b1;
      ctrl.alu_src  = 1'b1;
      ctrl.alu_sel  = op[OP_SUBI] ? ALU_SUB : ALU_ADD;
      ctrl.flags_we = 1'b1;
    end
    if (op[OP_LOAD]) begin
      ctrl.wr_sel     = x;
      ctrl.reg_we     = 1'b1;
      ctrl.result_mux = 1'b1;
      ctrl.reg_wb_mux = 1'b1;
    end
    if (op[OP_LOADF]) begin
      ctrl.p0_sel     = y;
      ctrl.wr_sel     = x;
      ctrl.reg_we     = 1'b1;
      ctrl.alu_src    = 1'b1;
      ctrl.alu_sel    = ALU_ADD;
      ctrl.reg_wb_mux = 1'b1;
    end
    if (op[OP_STORE]) begin
      ctrl.p1_sel     = x;
      ctrl.result_mux = 1'b1;
      ctrl.dmem_we    = 1'b1;
    end
    if (op[OP_STOREF]) begin
      ctrl.p0_sel  = y;
      ctrl.p1_sel  = x;
      ctrl.alu_src = 1'b1;
      ctrl.alu_sel = ALU_ADD;
      ctrl.dmem_we = 1'b1;
    end
    if (op[OP_SHIFTL] || op[OP_SHIFTR]) begin
      ctrl.p0_sel   = x;
      ctrl.wr_sel   = x;
      ctrl.reg_we   = 1'b1;
      ctrl.alu_sel  = op[OP_SHIFTR] ? ALU_SHR : ALU_SHL;
      ctrl.flags_we = 1'b1;
    end
    if (op[OP_CMP]) begin
      ctrl.p0_sel   = x;
      ctrl.p1_sel   = y;
      ctrl.alu_sel  = ALU_SUB;
      ctrl.flags_we = 1'b1;
    end

    // PC mux: unconditional jump and the flag branches.
    ctrl.pc_mux = op[OP_JUMP]
                | (op[OP_BRE]  &  flags.z)
                | (op[OP_BRNE] & ~flags.z)
                | (op[OP_BRG]  & ~flags.z & ge)
                | (op[OP_BRGE] &  ge)
                | (op[OP_BRC]  &  flags.c)
                | (op[OP_BRNC] & ~flags.c)
                | (op[OP_BRO]  &  flags.o)
                | (op[OP_BRNO] & ~flags.o)
                | (op[OP_BRN]  &  flags.n)
                | (op[OP_BRNN] & ~flags.n);
  end

endmodule
