// tb_i281e_debug_module: checks Examine and Deposit instruction mocking.
//
// For each switch the testbench holds it for a while, checks that the bus
// is released and the mocked word is the expected JUMP / INPUTC / INPUTD
// (assembled here field by field), then releases it and checks that exactly
// one step request appears, with the bus still released in that cycle, and
// that the bus returns to code memory afterwards.
module tb_i281e_debug_module;
  import i281e_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic   rst, examine, deposit, code_data, bus_released, step;
  byte_t  switches_low, pc;
  instr_t mock_instr;
  int checks = 0, failures = 0;

  i281e_debug_module dut (.clk, .rst, .examine, .deposit, .code_data, .switches_low, .pc,
                          .bus_released, .mock_instr, .step);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // kind: 0 examine, 1 deposit code, 2 deposit data
  task automatic press(int kind);
    instr_t want;
    int steps, released_steps;
    switches_low = byte_t'($urandom);
    pc = byte_t'($urandom);
    code_data = (kind === 2);
    case (kind)
      0: want = {4'b1110, 4'b0000, switches_low};   // JUMP
      1: want = {4'b0001, 4'b0000, pc};             // INPUTC
      default: want = {4'b0001, 4'b0010, pc};       // INPUTD
    endcase
    repeat (3) @(posedge clk);
    if (kind === 0) examine = 1'b1; else deposit = 1'b1;
    repeat (6) @(posedge clk);
    #1;
    check(bus_released, "bus not released while switch held");
    check(mock_instr === want, $sformatf("mocked %h expected %h", mock_instr, want));
    check(!step, "step while held");
    examine = 1'b0; deposit = 1'b0;
    steps = 0; released_steps = 0;
    repeat (8) begin
      @(posedge clk); #1;
      if (step) begin
        steps++;
        if (bus_released && mock_instr === want) released_steps++;
      end
    end
    check(steps === 1, $sformatf("%0d step requests on release", steps));
    check(released_steps === 1, "step cycle without the mocked instruction");
    check(!bus_released, "bus not returned");
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; examine = 1'b0; deposit = 1'b0; code_data = 1'b0; switches_low = '0; pc = '0;
    repeat (2) @(posedge clk); #1;
    rst = 1'b0;
    repeat (3) @(posedge clk); #1;
    check(!bus_released && !step, "idle state");
    for (int i = 0; i < 60; i++) press(i % 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
