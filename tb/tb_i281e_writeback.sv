// tb_i281e_writeback: self-checking test of the code-RAM write-back module.
//
// With wb_n high the output must equal the switches.  With wb_n low the
// module must present {high byte latched at the last enabled wb_n-low edge,
// port 1}; the testbench runs the two-step copy of a 16-bit word (high byte
// first, then low byte) many times with random data.
module tb_i281e_writeback;
  import i281e_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic   rst, ce, wb_n;
  instr_t switches, wdata;
  byte_t  port1, high_byte, latched;
  int checks = 0, failures = 0;

  i281e_writeback dut (.clk, .rst, .ce, .wb_n, .switches, .port1, .wdata, .high_byte);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; ce = 1'b1; wb_n = 1'b1; switches = '0; port1 = '0;
    @(posedge clk); #1;
    rst = 1'b0;
    latched = '0;
    for (int unsigned i = 0; i < 2000; i++) begin
      instr_t word;
      word = instr_t'($urandom);
      switches = instr_t'($urandom);
      ce = ($urandom % 5) !== 0;
      wb_n = ($urandom % 3) === 0;
      port1 = byte_t'($urandom);
      #1;
      if (wb_n) check(wdata === switches, "normal mode must pass the switches");
      else      check(wdata === {latched, port1}, $sformatf("wb mode %h expected %h", wdata, {latched, port1}));
      @(posedge clk);
      if (ce && !wb_n) latched = port1;
      #1;
      check(high_byte === latched, "high byte register");
      // two-step copy of a word
      ce = 1'b1; wb_n = 1'b0; port1 = word[15:8];
      @(posedge clk); #1;
      port1 = word[7:0]; #1;
      check(wdata === word, $sformatf("assembled %h expected %h", wdata, word));
      latched = word[15:8];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
