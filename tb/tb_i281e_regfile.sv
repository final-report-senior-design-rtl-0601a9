// tb_i281e_regfile: self-checking test of the four-register file.
//
// Keeps a shadow copy of the four registers, applies random writes (with
// random write enable and clock enable) and random read selects, and checks
// both read ports and the register outputs after every cycle.
module tb_i281e_regfile;
  import i281e_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic       rst, ce, we;
  logic [1:0] wr_sel, p0_sel, p1_sel;
  byte_t      wdata, p0, p1;
  byte_t      regs [4];
  byte_t      shadow [4];
  int checks = 0, failures = 0;

  i281e_regfile dut (.clk, .rst, .ce, .we, .wr_sel, .wdata, .p0_sel, .p1_sel,
                     .p0, .p1, .regs);

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
    rst = 1'b1; ce = 1'b0; we = 1'b0; wr_sel = '0; wdata = '0; p0_sel = '0; p1_sel = '0;
    @(posedge clk); #1;
    rst = 1'b0;
    for (int r = 0; r < 4; r++) shadow[r] = '0;
    for (int unsigned i = 0; i < 3000; i++) begin
      ce     = ($urandom % 4) !== 0;
      we     = ($urandom % 3) !== 0;
      wr_sel = 2'($urandom);
      wdata  = byte_t'($urandom);
      p0_sel = 2'($urandom);
      p1_sel = 2'($urandom);
      #1;
      check(p0 === shadow[p0_sel], $sformatf("port 0 reg %0d = %h expected %h", p0_sel, p0, shadow[p0_sel]));
      check(p1 === shadow[p1_sel], $sformatf("port 1 reg %0d = %h expected %h", p1_sel, p1, shadow[p1_sel]));
      @(posedge clk);
      if (ce && we) shadow[wr_sel] = wdata;
      #1;
      for (int r = 0; r < 4; r++)
        check(regs[r] === shadow[r], $sformatf("reg %0d = %h expected %h", r, regs[r], shadow[r]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
