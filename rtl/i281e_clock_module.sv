// i281e_clock_module: processor clock from the oscillator, run/halt and single step.
//
// The board divides a 4 MHz oscillator by a power of two chosen with a
// 12-position rotary switch:
//   pos 12: /2 (2 MHz)     11: /4 (1 MHz)      10: /16 (250 kHz)
//   pos  9: /64 (62.5 kHz)  8: /128 (31.25 kHz) 7: /512 (7.81 kHz)
//   pos  6: /2^11 (1.95 kHz) 5: /2^14 (244 Hz)  4: /2^16 (61.04 Hz)
//   pos  3: /2^19 (7.63 Hz)  2: /2^21 (1.91 Hz) 1: /2^22 (954 mHz)
// The divisors are worked back from the frequency table.  Here the whole
// processor runs on the oscillator clock and this module produces a
// one-oscillator-cycle clock enable (cpu_ce) at the selected rate instead of
// a divided clock; a freq_sel outside 1..12 acts as position 1.
//
// With run high the enable follows the divider.  With run low (halt) only a
// rising edge of the single-step switch or a step request from the debug
// module gives a single enable.  Switches pass two-flop synchronisers and
// are assumed debounced.  Reset clears the divider.
module i281e_clock_module (
  input  logic       clk,        // oscillator
  input  logic       rst,
  input  logic       run,
  input  logic       single_step,
  input  logic       debug_step,
  input  logic [3:0] freq_sel,
  output logic       cpu_ce
);

  logic [21:0] div_cnt;
  logic [21:0] mask;
  logic        tick;
  logic [1:0]  run_sync, step_sync;
  logic        step_q;

  always_comb begin
    unique case (freq_sel)
      4'd12:   mask = 22'(2**1  - 1);
      4'd11:   mask = 22'(2**2  - 1);
      4'd10:   mask = 22'(2**4  - 1);
      4'd9:    mask = 22'(2**6  - 1);
      4'd8:    mask = 22'(2**7  - 1);
      4'd7:    mask = 22'(2**9  - 1);
      4'd6:    mask = 22'(2**11 - 1);
      4'd5:    mask = 22'(2**14 - 1);
      4'd4:    mask = 22'(2**16 - 1);
      4'd3:    mask = 22'(2**19 - 1);
      4'd2:    mask = 22'(2**21 - 1);
      default: mask = 22'(2**22 - 1);
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      div_cnt   <= '0;
      run_sync  <= '0;
      step_sync <= '0;
      step_q    <= 1'b0;
    end else begin
      div_cnt   <= div_cnt + 22'd1;
      run_sync  <= {run_sync[0], run};
      step_sync <= {step_sync[0], single_step};
      step_q    <= step_sync[1];
    end
  end

  assign tick   = ((div_cnt & mask) == mask);
  assign cpu_ce = run_sync[1] ? tick : ((step_sync[1] & ~step_q) | debug_step);

endmodule
