// tb_i281e_mux2: self-checking test of the 8-bit 2-to-1 MUX module.
//
// Applies random inputs with both select values and checks that every
// output bit follows the selected input.
module tb_i281e_mux2;
  logic       clk = 1'b0;
  always #5 clk = ~clk;

  logic       sel;
  logic [7:0] in0, in1, y;
  int checks = 0, failures = 0;

  i281e_mux2 dut (.sel, .in0, .in1, .y);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int unsigned i = 0; i < 1000; i++) begin
      sel = i[0];
      in0 = 8'($urandom);
      in1 = 8'($urandom);
      @(posedge clk); #1;
      checks++;
      if (y !== (i[0] ? in1 : in0)) begin
        failures++;
        $display("FAIL: sel=%0d in0=%h in1=%h y=%h", sel, in0, in1, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
