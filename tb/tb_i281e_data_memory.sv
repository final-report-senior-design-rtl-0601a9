// tb_i281e_data_memory: self-checking test of the banked data RAM.
//
// A sparse associative model tracks every written physical byte.  Random
// reads and writes are issued across both halves of the 8-bit address space
// while the bank register is changed now and then; reads are checked
// against the model where it holds a value.  The low half must ignore the
// bank, and nothing may change without ce.
module tb_i281e_data_memory;
  import i281e_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic  rst, ce, we, bank_we;
  byte_t addr, wdata, rdata, bank, cur_bank;
  byte_t model [int];
  int checks = 0, failures = 0;

  i281e_data_memory dut (.clk, .rst, .ce, .addr, .wdata, .we, .bank_we, .rdata, .bank);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic int phys(byte_t a, byte_t b);
    return a[7] ? int'(b) * 128 + int'(a[6:0]) : int'(a[6:0]);
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; ce = 1'b1; we = 1'b0; bank_we = 1'b0; addr = '0; wdata = '0;
    @(posedge clk); #1;
    rst = 1'b0;
    check(bank === 8'h00, "bank not cleared by reset");
    cur_bank = '0;
    for (int unsigned i = 0; i < 6000; i++) begin
      int p;
      ce = ($urandom % 8) !== 0;
      we = ($urandom % 2) === 0;
      bank_we = ($urandom % 40) === 0;
      addr = byte_t'($urandom);
      wdata = byte_t'($urandom);
      if (!we && !bank_we && ($urandom % 2 === 0)) begin
        // read back a byte that is known, through the current bank
        foreach (model[k]) begin
          if (k < 128) begin addr = byte_t'(k); break; end
          if (k / 128 === int'(cur_bank)) begin addr = byte_t'(8'h80 + k % 128); break; end
        end
      end
      #1;
      p = phys(addr, cur_bank);
      if (model.exists(p))
        check(rdata === model[p], $sformatf("read %h (phys %0d) = %h expected %h", addr, p, rdata, model[p]));
      @(posedge clk);
      if (ce && we) model[p] = wdata;
      if (ce && bank_we) cur_bank = wdata;
      #1;
      check(bank === cur_bank, "bank register");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
