// tb_i281e_code_memory: self-checking test of boot ROM, banked code RAM and bank register.
//
// The ROM is loaded from tb/i281e_rom_pattern.hex, whose word i is
// (i * 0x0101) XOR 0x5A3C; the testbench recomputes that formula.  The test
// writes distinct words into several RAM banks while the PC is in the ROM,
// reads them back through the 0x80-0xFF window after switching banks,
// checks that writes below 0x80 never reach the RAM or ROM, and that a
// write is dropped while an instruction is fetched from the RAM unless the
// debug module has released the bus.
module tb_i281e_code_memory;
  import i281e_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic   rst, ce, we, bus_released, bank_we_n;
  byte_t  pc, waddr, bank;
  instr_t instr, wdata;
  instr_t model [int];
  int checks = 0, failures = 0;

  i281e_code_memory #(.ROM_INIT("tb/i281e_rom_pattern.hex")) dut (
    .clk, .rst, .ce, .pc, .instr, .we, .waddr, .wdata, .bus_released, .bank_we_n, .bank);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic instr_t rom_word(int i);
    return instr_t'((i * 16'h0101) ^ 16'h5A3C);
  endfunction

  task automatic set_bank(byte_t b);
    waddr = b; bank_we_n = 1'b0; we = 1'b0;
    @(posedge clk); #1;
    bank_we_n = 1'b1;
    check(bank === b, $sformatf("bank %h expected %h", bank, b));
  endtask

  task automatic write_word(byte_t a, instr_t d);
    waddr = a; wdata = d; we = 1'b1;
    @(posedge clk); #1;
    we = 1'b0;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; ce = 1'b1; we = 1'b0; bus_released = 1'b0; bank_we_n = 1'b1;
    pc = '0; waddr = '0; wdata = '0;
    @(posedge clk); #1;
    rst = 1'b0;
    check(bank === 8'h00, "bank not cleared by reset");
    // ROM contents
    for (int i = 0; i < 128; i++) begin
      pc = byte_t'(i); #1;
      check(instr === rom_word(i), $sformatf("ROM[%0d] = %h expected %h", i, instr, rom_word(i)));
    end
    // fill four banks from the ROM side (pc = 0x10)
    pc = 8'h10;
    for (int b = 0; b < 4; b++) begin
      set_bank(byte_t'(b * 37));
      for (int k = 0; k < 16; k++) begin
        instr_t d;
        byte_t  a;
        d = instr_t'($urandom);
        a = byte_t'(8'h80 + $urandom % 128);
        write_word(a, d);
        model[(b * 37) * 128 + int'(a[6:0])] = d;
      end
      // writes below 0x80 must be ignored
      write_word(8'h05, 16'hDEAD);
    end
    // read everything back
    foreach (model[key]) begin
      set_bank(byte_t'(key / 128));
      pc = byte_t'(8'h80 + key % 128); #1;
      check(instr === model[key], $sformatf("RAM[%0d] = %h expected %h", key, instr, model[key]));
      pc = 8'h10;
    end
    pc = 8'h05; #1;
    check(instr === rom_word(5), "ROM changed by a write below 0x80");
    // single-port rule: fetch from RAM blocks the write ...
    set_bank(8'd0);
    pc = 8'h90;
    write_word(8'hA0, 16'h1234);
    write_word(8'hA1, 16'h1234);
    pc = 8'hA0; #1;
    check(instr !== 16'h1234, "write accepted while fetching from RAM");
    // ... unless the debug module owns the bus
    pc = 8'h90; bus_released = 1'b1;
    write_word(8'hA1, 16'hBEEF);
    bus_released = 1'b0;
    pc = 8'hA1; #1;
    check(instr === 16'hBEEF, "write refused while bus released");
    // no update without ce
    pc = 8'h10; ce = 1'b0;
    write_word(8'hA1, 16'h0F0F);
    ce = 1'b1;
    pc = 8'hA1; #1;
    check(instr === 16'hBEEF, "write without ce");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
