// tb_i281e_video_card: self-checking test of the memory-mapped display card.
//
// Random data-memory writes over the whole address range, in both modes.
// Expected display contents are kept in a model: a write to address 0-7 in
// game mode stores the raw byte, in normal mode the hex glyph of the low
// nibble, described here by the list of lit segment letters per digit.
// Writes elsewhere, reads, and writes with ce low must leave the displays.
module tb_i281e_video_card;
  import i281e_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic  rst, ce, we, game_mode;
  byte_t addr, wdata;
  byte_t seg [8];
  byte_t model [8];
  int hits = 0;
  int checks = 0, failures = 0;

  i281e_video_card dut (.clk, .rst, .ce, .addr, .wdata, .we, .game_mode, .seg);

  string lit [16] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg", "acdfg", "acdefg", "abc",
                      "abcdefg", "abcdfg", "abcefg", "cdefg", "adef", "bcdeg", "adefg", "aefg"};

  function automatic byte_t glyph(logic [3:0] v);
    byte_t g = '0;
    for (int i = 0; i < lit[v].len(); i++) g[lit[v][i] - "a"] = 1'b1;
    return g;
  endfunction

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
    rst = 1'b1; ce = 1'b1; we = 1'b0; game_mode = 1'b0; addr = '0; wdata = '0;
    @(posedge clk); #1;
    rst = 1'b0;
    for (int d = 0; d < 8; d++) model[d] = '0;
    for (int unsigned i = 0; i < 4000; i++) begin
      ce = ($urandom % 6) !== 0;
      we = ($urandom % 4) !== 0;
      game_mode = $urandom % 2;
      addr = ($urandom % 2) ? byte_t'($urandom % 8) : byte_t'($urandom);
      wdata = byte_t'($urandom);
      @(posedge clk);
      if (ce && we && addr < 8) begin
        model[addr] = game_mode ? wdata : glyph(wdata[3:0]);
        hits++;
      end
      #1;
      for (int d = 0; d < 8; d++)
        check(seg[d] === model[d], $sformatf("display %0d = %b expected %b", d, seg[d], model[d]));
    end
    check(hits > 100, "too few display writes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
