// tb_i281e_control_table: checks every operation row of the control table.
//
// The expected control lines are written as one 18-character row per
// operation, one character per line c1..c18, in the layout of the
// processor's control-line table: '.' = 0, '1' = 1, 'X' / 'Y' = the two
// bits of the X / Y register field across a select pair, 'B' = the branch
// condition.  Each row is applied with random register fields and all 16
// flag values.
module tb_i281e_control_table;
  import i281e_pkg::*;

  logic       clk = 1'b0;
  always #5 clk = ~clk;

  op_vec_t    op;
  logic [1:0] x, y;
  flags_t     flags;
  ctrl_t      ctrl;
  int checks = 0, failures = 0;

  i281e_control_table dut (.op, .x, .y, .flags, .ctrl);

  string rows [NUM_OPS];
  initial begin
    //                      c: 123456789012345678
    rows[OP_NOOP]    = "..1...............";
    rows[OP_INPUTC]  = "1.1...........1...";
    rows[OP_INPUTCF] = "1.1XX.....11......";
    rows[OP_INPUTD]  = "..1...........111.";
    rows[OP_INPUTDF] = "..1XX.....11...11.";
    rows[OP_MOVE]    = "..1YY..XX111......";
    rows[OP_LOADI]   = "..1....XX1....1...";
    rows[OP_ADD]     = "..1XXYYXX1.1.1....";
    rows[OP_ADDI]    = "..1XX..XX111.1....";
    rows[OP_SUB]     = "..1XXYYXX1.111....";
    rows[OP_SUBI]    = "..1XX..XX11111....";
    rows[OP_LOAD]    = "..1....XX1....1..1";
    rows[OP_LOADF]   = "..1YY..XX111.....1";
    rows[OP_STORE]   = "..1..XX.......1.1.";
    rows[OP_STOREF]  = "..1YYXX...11....1.";
    rows[OP_SHIFTL]  = "..1XX..XX1...1....";
    rows[OP_SHIFTR]  = "..1XX..XX1..11....";
    rows[OP_CMP]     = "..1XXYY....111....";
    rows[OP_JUMP]    = ".11...............";
    for (int i = int'(OP_BRE); i < NUM_OPS; i++) rows[i] = ".B1...............";
  end

  function automatic logic cond(op_e o, flags_t f);
    case (o)
      OP_BRE:  return f.z;
      OP_BRNE: return !f.z;
      OP_BRG:  return !f.z && (f.n === f.o);
      OP_BRGE: return f.n === f.o;
      OP_BRC:  return f.c;
      OP_BRNC: return !f.c;
      OP_BRO:  return f.o;
      OP_BRNO: return !f.o;
      OP_BRN:  return f.n;
      OP_BRNN: return !f.n;
      default: return 1'b0;
    endcase
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1;
    for (int o = 0; o < NUM_OPS; o++) begin
      for (int f = 0; f < 16; f++) begin
        for (int r = 0; r < 4; r++) begin
          logic [17:0] got, want;
          op = op_vec_t'(1) << o;
          x = 2'($urandom);
          y = 2'($urandom);
          flags = flags_t'(f);
          #1;
          got = {ctrl.cmem_we, ctrl.pc_mux, ctrl.pc_we, ctrl.p0_sel, ctrl.p1_sel, ctrl.wr_sel,
                 ctrl.reg_we, ctrl.alu_src, ctrl.alu_sel, ctrl.flags_we, ctrl.result_mux,
                 ctrl.dmem_in_mux, ctrl.dmem_we, ctrl.reg_wb_mux};
          for (int c = 0; c < 18; c++) begin
            byte  ch;
            logic v, hi;
            ch = rows[o][c];
            // the first of a select pair carries the high bit
            hi = (c + 1 < 18) && (rows[o][c + 1] === ch) && (c === 0 || rows[o][c - 1] !== ch);
            case (ch)
              "1":     v = 1'b1;
              "X":     v = hi ? x[1] : x[0];
              "Y":     v = hi ? y[1] : y[0];
              "B":     v = cond(op_e'(o), flags_t'(f));
              default: v = 1'b0;
            endcase
            want[17 - c] = v;
          end
          checks++;
          if (got !== want) begin
            failures++;
            if (failures < 10)
              $display("FAIL: %s x=%0d y=%0d flags=%b: c1..c18 %b expected %b",
                       op_e'(o), x, y, f[3:0], got, want);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
