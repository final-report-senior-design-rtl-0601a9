// i281e_cpu: the single-cycle i281e datapath and control.
//
// Every instruction completes in one enabled clock (ce).  Per cycle:
//   1. The PC addresses code memory; the instruction bus carries its word,
//      or the debug module's mocked word while bus_released is high.
//   2. The opcode decoder and control table produce c1..c18 from the word
//      and the flag register.
//   3. The register file drives read ports 0 and 1.  The c11 mux picks
//      port 1 or the immediate as ALU input B; port 0 is ALU input A.
//   4. The c15 mux picks the ALU result or the immediate; that bus is the
//      data-memory address, the code-memory write address and input 0 of
//      the c18 mux.  The c16 mux picks port 1 or the low switch byte as the
//      data-memory write data.  The c18 mux picks the c15 bus or the
//      data-memory read data as the register write data.
//   5. The PC offset comes from a jumper-selected ("physical") mux: the
//      instruction low byte (default) or the register write-data bus.
//   6. On the clock edge with ce high the PC, registers, flags, memories,
//      video card and bank registers update together.
// Video card and data memory share the write port, so a store to
// addresses 0-7 also updates a display.
//
// ext carries the three i281e memory controls (code-RAM bank load,
// write-back select, data-memory bank load) whose instruction encodings are
// not part of this decoder; they are driven from outside.
//
// pc_next, wb_high and flags_next are outputs of the PC, write-back and
// ALU blocks that their own testbenches observe; the core needs none of
// them, so they stay unconnected inside it.  Memory writes are blocked
// during reset; RAM contents are not cleared.
module i281e_cpu
  import i281e_pkg::*;
#(
  parameter int unsigned CMEM_RAM_WORDS     = 32768,
  parameter int unsigned DMEM_DEPTH         = 32768,
  parameter string       ROM_INIT           = "",
  parameter bit          NOR_VARIANT        = 1'b0,
  parameter bit          PC_OFFSET_FROM_REG = 1'b0
) (
  input  logic      clk,
  input  logic      rst,
  input  logic      ce,
  input  instr_t    switches,
  input  logic      game_mode,
  input  logic      bus_released,
  input  instr_t    mock_instr,
  input  ext_ctrl_t ext,
  output byte_t     pc,
  output instr_t    instr,
  output ctrl_t     ctrl,
  output flags_t    flags,
  output byte_t     regs [4],
  output byte_t     alu_result,
  output byte_t     dmem_addr,
  output byte_t     cmem_bank,
  output byte_t     dmem_bank,
  output byte_t     seg [8]
);

  instr_t  cmem_instr, cmem_wdata;
  op_vec_t op;
  byte_t   imm, p0, p1, alu_b, dmem_in, dmem_rdata, reg_in, pc_offset;
  byte_t   pc_next, wb_high;
  flags_t  flags_next;

  assign instr = bus_released ? mock_instr : cmem_instr;
  assign imm   = instr[7:0];

  i281e_opcode_decoder u_dec (.instr(instr), .op(op));

  i281e_control_table u_ctl (
    .op(op), .x(instr[11:10]), .y(instr[9:8]), .flags(flags), .ctrl(ctrl)
  );

  i281e_regfile u_reg (
    .clk, .rst, .ce,
    .we(ctrl.reg_we), .wr_sel(ctrl.wr_sel), .wdata(reg_in),
    .p0_sel(ctrl.p0_sel), .p1_sel(ctrl.p1_sel), .p0(p0), .p1(p1), .regs(regs)
  );

  i281e_mux2 u_c11 (.sel(ctrl.alu_src), .in0(p1), .in1(imm), .y(alu_b));

  i281e_alu #(.NOR_VARIANT(NOR_VARIANT)) u_alu (
    .clk, .rst, .ce, .a(p0), .b(alu_b), .alu_sel(ctrl.alu_sel),
    .flags_we(ctrl.flags_we), .result(alu_result), .flags_next(flags_next),
    .flags(flags)
  );

  i281e_mux2 u_c15 (.sel(ctrl.result_mux), .in0(alu_result), .in1(imm), .y(dmem_addr));
  i281e_mux2 u_c16 (.sel(ctrl.dmem_in_mux), .in0(p1), .in1(switches[7:0]), .y(dmem_in));
  i281e_mux2 u_c18 (.sel(ctrl.reg_wb_mux), .in0(dmem_addr), .in1(dmem_rdata), .y(reg_in));

  // Jumper-selected PC offset source.
  assign pc_offset = PC_OFFSET_FROM_REG ? reg_in : imm;

  i281e_pc u_pc (
    .clk, .rst, .ce, .pc_we(ctrl.pc_we), .pc_mux(ctrl.pc_mux),
    .offset(pc_offset), .pc(pc), .pc_next(pc_next)
  );

  i281e_writeback u_wb (
    .clk, .rst, .ce, .wb_n(ext.wb_n), .switches(switches), .port1(p1),
    .wdata(cmem_wdata), .high_byte(wb_high)
  );

  i281e_code_memory #(.RAM_WORDS(CMEM_RAM_WORDS), .ROM_INIT(ROM_INIT)) u_cmem (
    .clk, .rst, .ce, .pc(pc), .instr(cmem_instr),
    .we(ctrl.cmem_we), .waddr(dmem_addr), .wdata(cmem_wdata),
    .bus_released(bus_released), .bank_we_n(ext.cmem_bank_n), .bank(cmem_bank)
  );

  i281e_data_memory #(.DEPTH(DMEM_DEPTH)) u_dmem (
    .clk, .rst, .ce, .addr(dmem_addr), .wdata(dmem_in), .we(ctrl.dmem_we),
    .bank_we(ext.dmem_bank_we), .rdata(dmem_rdata), .bank(dmem_bank)
  );

  i281e_video_card u_vid (
    .clk, .rst, .ce, .addr(dmem_addr), .wdata(dmem_in), .we(ctrl.dmem_we),
    .game_mode(game_mode), .seg(seg)
  );

endmodule
