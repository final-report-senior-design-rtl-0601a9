// i281e_top: the complete i281e machine behind its front panel.
//
// The oscillator clock (4 MHz on the board) clocks every flip-flop.  The
// clock module turns the run/halt switch, the rotary frequency selector,
// the single-step switch and the debug module's step request into a
// one-cycle CPU enable.  The debug module implements Examine and Deposit by
// placing a JUMP, INPUTC or INPUTD on the instruction bus while the switch
// is held and stepping once on release.  The CPU core holds the datapath,
// control, code memory, data memory and video card.
//
// Ports are the front-panel switches and the values the panel and boards
// show on LEDs and displays.  The reset switch passes a two-flop
// synchroniser and resets everything synchronously.  ext carries the three
// i281e memory controls whose encodings are not decoded here (see
// i281e_cpu).  The UART, compact-flash interface and expansion bus are not
// part of this RTL.
module i281e_top
  import i281e_pkg::*;
#(
  parameter int unsigned CMEM_RAM_WORDS     = 32768,
  parameter int unsigned DMEM_DEPTH         = 32768,
  parameter string       ROM_INIT           = "",
  parameter bit          NOR_VARIANT        = 1'b0,
  parameter bit          PC_OFFSET_FROM_REG = 1'b0
) (
  input  logic       clk,
  input  logic       reset_sw,
  input  instr_t     switches,
  input  logic       run_sw,
  input  logic       game_mode_sw,
  input  logic       step_sw,
  input  logic       examine_sw,
  input  logic       deposit_sw,
  input  logic       code_data_sw,
  input  logic [3:0] freq_sel,
  input  ext_ctrl_t  ext,
  output logic       cpu_ce,
  output byte_t      pc,
  output instr_t     instr,
  output ctrl_t      ctrl,
  output flags_t     flags,
  output byte_t      regs [4],
  output byte_t      alu_result,
  output byte_t      dmem_addr,
  output byte_t      cmem_bank,
  output byte_t      dmem_bank,
  output byte_t      seg [8]
);

  logic [1:0] rst_sync;
  logic       rst;
  logic       bus_released, debug_step;
  instr_t     mock_instr;

  always_ff @(posedge clk) rst_sync <= {rst_sync[0], reset_sw};
  assign rst = rst_sync[1];

  i281e_clock_module u_clk (
    .clk, .rst, .run(run_sw), .single_step(step_sw), .debug_step(debug_step),
    .freq_sel(freq_sel), .cpu_ce(cpu_ce)
  );

  i281e_debug_module u_dbg (
    .clk, .rst, .examine(examine_sw), .deposit(deposit_sw),
    .code_data(code_data_sw), .switches_low(switches[7:0]), .pc(pc),
    .bus_released(bus_released), .mock_instr(mock_instr), .step(debug_step)
  );

  i281e_cpu #(
    .CMEM_RAM_WORDS(CMEM_RAM_WORDS), .DMEM_DEPTH(DMEM_DEPTH), .ROM_INIT(ROM_INIT),
    .NOR_VARIANT(NOR_VARIANT), .PC_OFFSET_FROM_REG(PC_OFFSET_FROM_REG)
  ) u_cpu (
    .clk, .rst, .ce(cpu_ce), .switches(switches), .game_mode(game_mode_sw),
    .bus_released(bus_released), .mock_instr(mock_instr), .ext(ext),
    .pc(pc), .instr(instr), .ctrl(ctrl), .flags(flags), .regs(regs),
    .alu_result(alu_result), .dmem_addr(dmem_addr), .cmem_bank(cmem_bank),
    .dmem_bank(dmem_bank), .seg(seg)
  );

endmodule
