// i281e_debug_module: front-panel Examine and Deposit by instruction mocking.
//
// While the Examine or Deposit switch is held, the module takes over the
// instruction bus (bus_released high, code memory output ignored) and
// presents a ready-made instruction; when the switch is released it asks
// the clock module for one CPU clock (step), and that single cycle executes
// the mocked instruction, after which the bus returns to code memory.
//   Examine              JUMP with offset = switches[7:0]:
//                        PC <- PC + 1 + switches[7:0]
//   Deposit, code (cd=0) INPUTC to address PC: CMEM[PC] <- switches[15:0]
//   Deposit, data (cd=1) INPUTD to address PC: DMEM[PC] <- switches[7:0]
// Both deposits advance the PC by one, ready for the next word.  Examine
// wins if both switches are held.  Using the PC as the mocked instruction's
// address field is this design's way of writing "the location pointed to by
// the program counter".
//
// Switch inputs pass through two-flop synchronisers; the switches are
// assumed debounced.  The step request comes one cycle after the release is
// seen and lasts one oscillator cycle; bus_released stays high through it.
module i281e_debug_module
  import i281e_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  logic   examine,
  input  logic   deposit,
  input  logic   code_data,
  input  byte_t  switches_low,
  input  byte_t  pc,
  output logic   bus_released,
  output instr_t mock_instr,
  output logic   step
);

  logic [1:0] ex_sync, dep_sync, cd_sync;
  logic       ex_q, dep_q;
  logic       ex_s, dep_s;

  always_ff @(posedge clk) begin
    if (rst) begin
      ex_sync  <= '0;
      dep_sync <= '0;
      cd_sync  <= '0;
      ex_q     <= 1'b0;
      dep_q    <= 1'b0;
    end else begin
      ex_sync  <= {ex_sync[0], examine};
      dep_sync <= {dep_sync[0], deposit};
      cd_sync  <= {cd_sync[0], code_data};
      ex_q     <= ex_sync[1];
      dep_q    <= dep_sync[1];
    end
  end

  assign ex_s = ex_sync[1];
  assign dep_s = dep_sync[1];

  assign bus_released = ex_s | ex_q | dep_s | dep_q;
  assign step         = (ex_q & ~ex_s) | (dep_q & ~dep_s);

  always_comb begin
    if (ex_s | ex_q)
      mock_instr = mk_instr(OPC_JUMP, 2'b00, 2'b00, switches_low);
    else if (cd_sync[1])
      mock_instr = mk_instr(OPC_INPUT, 2'b00, 2'b10, pc);   // INPUTD
    else
      mock_instr = mk_instr(OPC_INPUT, 2'b00, 2'b00, pc);   // INPUTC
  end

endmodule
