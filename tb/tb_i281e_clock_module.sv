// tb_i281e_clock_module: checks the CPU clock-enable rates, halt and single step.
//
// For rotary positions 12, 11, 10, 9, 7, 5, 3 and 1 the spacing between
// enable pulses must equal the divisor worked out
// from the frequency table (4 MHz / f) within the table's rounding.
// In halt, no enable may appear except exactly one
// per rising edge of the single-step switch and one per debug step request.
module tb_i281e_clock_module;
  logic clk = 1'b0;
  always #125 clk = ~clk;   // 4 MHz

  logic       rst, run, single_step, debug_step, cpu_ce;
  logic [3:0] freq_sel;
  int checks = 0, failures = 0;

  i281e_clock_module dut (.clk, .rst, .run, .single_step, .debug_step, .freq_sel, .cpu_ce);

  // frequency table: position -> Hz (x1000 to stay integral)
  longint unsigned mhz_x1000 [13] = '{0, 954, 1907, 7629, 61035, 244141, 1953125, 7812500,
                                       31250000, 62500000, 250000000, 1000000000, 2000000000};

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // measure the spacing (in oscillator cycles) between two enable pulses
  task automatic spacing(output longint unsigned gap);
    longint unsigned n;
    n = 0;
    do @(posedge clk); while (!cpu_ce);
    do begin @(posedge clk); n++; end while (!cpu_ce);
    gap = n;
  endtask

  initial begin
    repeat (40000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned gap, want;
    int pulses;
    rst = 1'b1; run = 1'b0; single_step = 1'b0; debug_step = 1'b0; freq_sel = 4'd12;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    // halt: nothing without a step
    pulses = 0;
    repeat (200) begin @(posedge clk); #1; if (cpu_ce) pulses++; end
    check(pulses === 0, "enable while halted");
    // single step: one pulse per press
    for (int s = 0; s < 5; s++) begin
      pulses = 0;
      single_step = 1'b1;
      repeat (20) begin @(posedge clk); #1; if (cpu_ce) pulses++; end
      single_step = 1'b0;
      repeat (20) begin @(posedge clk); #1; if (cpu_ce) pulses++; end
      check(pulses === 1, $sformatf("single step gave %0d pulses", pulses));
    end
    // debug step request
    @(negedge clk); debug_step = 1'b1; #1;
    check(cpu_ce === 1'b1, "debug step ignored in halt");
    @(negedge clk); debug_step = 1'b0;
    // run at each rate
    run = 1'b1;
    for (int p = 12; p >= 1; p--) begin
      freq_sel = 4'(p);
      repeat (4) @(posedge clk);
      spacing(gap);   // first gap may straddle the change
      spacing(gap);
      want = 4000000000 / mhz_x1000[p];  // 4 MHz / f, f in mHz-scaled units
      // table values are rounded; accept 1 % error, divisor must be a power of 2
      check((gap * 100 >= want * 99) && (gap * 100 <= want * 101) && ((gap & (gap - 1)) === 0),
            $sformatf("position %0d: spacing %0d, table says %0d", p, gap, want));
      if (p <= 9 && p > 1) p--;  // below position 9 every other position: 7, 5, 3, 1
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
