// tb_i281e_alu: self-checking test of the ALU and its flag register.
//
// Drives random operand pairs through all four operations and compares the
// result and the four flags against a reference computed with plain integer
// arithmetic (signed range test for overflow, bit 8 of the sum for carry).
// Also checks that the flag register only loads with flags_we and ce high,
// and the two additions of the ALU unit-test program (9 + 10 and 0x7F + 1).
module tb_i281e_alu;
  import i281e_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic     rst, ce, flags_we;
  byte_t    a, b, result;
  alu_sel_e sel;
  flags_t   flags_next, flags;
  int checks = 0, failures = 0;

  i281e_alu dut (.clk, .rst, .ce, .a, .b, .alu_sel(sel), .flags_we,
                 .result, .flags_next, .flags);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic void ref_model(alu_sel_e s, byte_t x, byte_t y,
                                    output byte_t r, output flags_t f);
    int sx, sy, full, sres;
    sx = int'($signed(x));
    sy = int'($signed(y));
    f = '0;
    case (s)
      ALU_SHL: begin r = byte_t'(int'(x) * 2); f.c = x[7]; end
      ALU_SHR: begin r = byte_t'(int'(x) / 2); f.c = x[0]; end
      ALU_ADD: begin
        full = int'(x) + int'(y);
        r = byte_t'(full); f.c = (full > 255);
        sres = sx + sy; f.o = (sres > 127) || (sres < -128);
      end
      default: begin
        full = int'(x) + (255 - int'(y)) + 1;
        r = byte_t'(full); f.c = (full > 255);
        sres = sx - sy; f.o = (sres > 127) || (sres < -128);
      end
    endcase
    f.z = (r === 0);
    f.n = r[7];
  endfunction

  task automatic apply(alu_sel_e s, byte_t x, byte_t y);
    byte_t  r;
    flags_t f;
    flags_t held;
    ref_model(s, x, y, r, f);
    sel = s; a = x; b = y; flags_we = 1'b1; ce = 1'b1;
    #1;
    check(result === r, $sformatf("sel=%0d a=%h b=%h result %h expected %h", s, x, y, result, r));
    check(flags_next === f, $sformatf("sel=%0d a=%h b=%h flags %b expected %b", s, x, y, flags_next, f));
    @(posedge clk); #1;
    check(flags === f, $sformatf("flag register %b expected %b", flags, f));
    // hold: no write without flags_we, and none without ce
    held = flags;
    a = ~x; flags_we = 1'b0;
    @(posedge clk); #1;
    check(flags === held, "flag register changed without flags_we");
    flags_we = 1'b1; ce = 1'b0;
    @(posedge clk); #1;
    check(flags === held, "flag register changed without ce");
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; ce = 1'b0; flags_we = 1'b0; a = '0; b = '0; sel = ALU_ADD;
    @(posedge clk); #1;
    check(flags === '0, "flags not cleared by reset");
    rst = 1'b0;
    // Figure-style directed cases
    apply(ALU_ADD, 8'd9, 8'd10);      // 19: no flags
    apply(ALU_SUB, 8'd19, 8'd19);     // zero
    apply(ALU_ADD, 8'h7F, 8'h01);     // overflow, negative
    apply(ALU_SUB, 8'h80, 8'h80);
    apply(ALU_SUB, 8'h00, 8'h01);     // borrow
    apply(ALU_ADD, 8'hFF, 8'h01);     // carry and zero
    apply(ALU_SHL, 8'h81, 8'h00);
    apply(ALU_SHR, 8'h01, 8'h00);
    for (int unsigned i = 0; i < 2000; i++)
      apply(alu_sel_e'(i % 4), byte_t'($urandom), byte_t'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
