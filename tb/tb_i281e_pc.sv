// tb_i281e_pc: self-checking test of the program counter.
//
// Checks reset to 0, increment with c2 = 0, PC + 1 + offset with c2 = 1
// (including negative offsets that wrap backwards and wrap past 0xFF), and
// that the PC holds when c3 or ce is low.  The expected value is kept in a
// separate integer model.
module tb_i281e_pc;
  import i281e_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic  rst, ce, pc_we, pc_mux;
  byte_t offset, pc, pc_next;
  int    model;
  int checks = 0, failures = 0;

  i281e_pc dut (.clk, .rst, .ce, .pc_we, .pc_mux, .offset, .pc, .pc_next);

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
    rst = 1'b1; ce = 1'b1; pc_we = 1'b1; pc_mux = 1'b0; offset = '0;
    @(posedge clk); #1;
    check(pc === 8'd0, "reset value");
    rst = 1'b0;
    model = 0;
    // plain counting through the wrap
    for (int unsigned i = 0; i < 300; i++) begin
      @(posedge clk); #1;
      model = (model + 1) % 256;
      check(pc === byte_t'(model), $sformatf("count: pc %h expected %h", pc, model));
    end
    // a branch back to itself: offset -1
    pc_mux = 1'b1; offset = 8'hFF;
    #1 check(pc_next === pc, "offset -1 must give the same PC");
    @(posedge clk); #1;
    check(pc === byte_t'(model), "branch to self");
    // random mix
    for (int unsigned i = 0; i < 3000; i++) begin
      ce = ($urandom % 4) !== 0;
      pc_we = ($urandom % 4) !== 0;
      pc_mux = $urandom % 2;
      offset = byte_t'($urandom);
      #1;
      @(posedge clk);
      if (ce && pc_we) model = (model + 1 + (pc_mux ? int'(offset) : 0)) % 256;
      #1;
      check(pc === byte_t'(model), $sformatf("pc %h expected %h", pc, model));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
