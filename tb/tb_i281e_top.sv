// tb_i281e_top: end-to-end testbench of the whole i281e machine at its default sizes.
//
// The testbench plays the operator at the front panel and checks what the
// machine shows.  The boot ROM is burned (hierarchically, before reset) with
// a small loader; everything else goes through the switches.
//
// Phase A, front panel only:
//   halt, reset, Examine to 0x80, Deposit a bubble-sort program word by
//   word into code RAM, Examine to 0x10, Deposit eight data bytes, Examine
//   back to 0x80, single-step three instructions, then run at 2 MHz
//   (position 12).  The program sorts the bytes as signed numbers in place
//   and copies them to the eight displays (normal hex mode).  The testbench
//   checks the sorted memory, the displays and the enable rate.
// Phase B, boot loader:
//   halt, Deposit a second program as byte pairs into data memory at 0x20,
//   reset, single-step the first loader instructions, then run at 1 MHz
//   (position 11).  The loader selects code bank 1, copies the program into
//   code RAM with the write-back module (high byte latched, then the word
//   written by INPUTCF) and jumps to 0x80.  The program is the ALU unit test
//   (trap loops on any wrong flag), a data-bank test, a game-mode display
//   write and an INPUTC from code RAM that must be refused.
// The three memory controls without an instruction encoding (ext) are driven
// by the testbench from the PC at the loader's and program's marked
// addresses, standing in for the control EEPROM.
//
// Monitors count each mechanism; every count must be non-zero at the end.
module tb_i281e_top;
  import i281e_pkg::*;
  import i281e_asm_pkg::*;

  logic       clk = 1'b0;
  logic       reset_sw = 1'b1;
  instr_t     switches = '0;
  logic       run_sw = 1'b0;
  logic       game_mode_sw = 1'b0;
  logic       step_sw = 1'b0;
  logic       examine_sw = 1'b0;
  logic       deposit_sw = 1'b0;
  logic       code_data_sw = 1'b0;
  logic [3:0] freq_sel = 4'd12;
  ext_ctrl_t  ext;

  logic   cpu_ce;
  byte_t  pc, alu_result, dmem_addr, cmem_bank, dmem_bank;
  instr_t instr;
  ctrl_t  ctrl;
  flags_t flags;
  byte_t  regs [4];
  byte_t  seg [8];

  int checks = 0;
  int failures = 0;

  i281e_top dut (
    .clk, .reset_sw, .switches, .run_sw, .game_mode_sw, .step_sw, .examine_sw,
    .deposit_sw, .code_data_sw, .freq_sel, .ext, .cpu_ce, .pc, .instr, .ctrl,
    .flags, .regs, .alu_result, .dmem_addr, .cmem_bank, .dmem_bank, .seg
  );

  always #125ns clk = ~clk;   // 4 MHz oscillator

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL t=%0t %s", $time, what);
    end
  endtask

  // ------------------------------------------------------------ programs
  instr_t bios [$];
  instr_t sortp [$];
  instr_t prog2 [$];
  localparam int PROG2_AT = 8'h20;     // byte pairs of program 2 in data memory

  // program 2 addresses where the testbench raises the data-bank load
  int dbank_marks [$];

  function automatic void build_programs();
    // Boot loader (ROM).  ext: address 0 loads the code bank, 4 and 6 use write-back.
    bios = '{
      LOADI(RA, 8'd1),                 // 0  code bank <- 1 (bank load on this word)
      LOADI(RD, 8'd0),                 // 1  byte index
      LOADI(RC, 8'h80),                // 2  destination
      LOADF(RA, RD, 8'(PROG2_AT)),     // 3  high byte
      CMP(RA, RA),                     // 4  port 1 = A: latched as high byte
      LOADF(RA, RD, 8'(PROG2_AT + 1)), // 5  low byte
      INPUTCF(RC, 8'd0),               // 6  CMEM[C] <- {high, A}
      ADDI(RC, 8'd1),                  // 7
      ADDI(RD, 8'd2),                  // 8
      LOADI(RB, 8'd0),                 // 9  patched below with the byte count
      CMP(RD, RB),                     // 10
      BRNZ(rel(11, 3)),                // 11
      JUMP(rel(12, 8'h80))             // 12
    };
    // Bubble sort of the signed bytes at 0x10..0x17, then copy to displays.
    sortp = '{
      LOADI(RC, 8'd7),                 // 0  passes
      LOADI(RD, 8'd0),                 // 1  i
      LOADF(RA, RD, 8'd16),            // 2
      LOADF(RB, RD, 8'd17),            // 3
      CMP(RA, RB),                     // 4
      BRG(rel(5, 7)),                  // 5  a[i] > a[i+1]: swap
      JUMP(rel(6, 9)),                 // 6
      STOREF(RD, 8'd16, RB),           // 7
      STOREF(RD, 8'd17, RA),           // 8
      ADDI(RD, 8'd1),                  // 9
      CMP(RD, RC),                     // 10
      BRNZ(rel(11, 2)),                // 11
      SUBI(RC, 8'd1),                  // 12
      BRNZ(rel(13, 1)),                // 13
      LOADI(RD, 8'd0),                 // 14
      LOADF(RA, RD, 8'd16),            // 15
      STOREF(RD, 8'd0, RA),            // 16 display D <- A
      ADDI(RD, 8'd1),                  // 17
      LOADI(RB, 8'd8),                 // 18
      CMP(RD, RB),                     // 19
      BRNZ(rel(20, 15)),               // 20
      JUMP(rel(21, 21))                // 21 done
    };
    // ALU unit test, bank test, game-mode display, refused code write.
    prog2 = '{
      LOADI(RA, 8'd9),                 // 0
      LOADI(RB, 8'd10),                // 1
      ADD(RA, RB),                     // 2  19: no flag set
      BRZ(rel(3, 3)),                  // 3  traps
      BRC(rel(4, 4)),                  // 4
      BRO(rel(5, 5)),                  // 5
      BRN(rel(6, 6)),                  // 6
      SUBI(RA, 8'd19),                 // 7  0
      BRNZ(rel(8, 8)),                 // 8
      LOADI(RA, 8'h7F),                // 9
      LOADI(RB, 8'd1),                 // 10
      ADD(RA, RB),                     // 11 0x80: overflow and negative
      BRZ(rel(12, 12)),                // 12
      BRC(rel(13, 13)),                // 13
      BRNO(rel(14, 14)),               // 14
      BRNN(rel(15, 15)),               // 15
      SUBI(RA, 8'h80),                 // 16 0: zero, no borrow
      BRNZ(rel(17, 17)),               // 17
      LOADI(RA, 8'd2),                 // 18
      STORE(8'd8, RA),                 // 19 data bank <- 2
      LOADI(RB, 8'hA5),                // 20
      STORE(8'h85, RB),                // 21
      LOADI(RA, 8'd3),                 // 22
      STORE(8'd8, RA),                 // 23 data bank <- 3
      LOADI(RB, 8'h5A),                // 24
      STORE(8'h85, RB),                // 25
      LOADI(RA, 8'd2),                 // 26
      STORE(8'd8, RA),                 // 27 data bank <- 2
      LOAD(RC, 8'h85),                 // 28 C <- A5
      LOADI(RA, 8'd3),                 // 29
      STORE(8'd8, RA),                 // 30 data bank <- 3
      LOAD(RD, 8'h85),                 // 31 D <- 5A
      LOADI(RA, 8'h49),                // 32
      STORE(8'd7, RA),                 // 33 display 7, game mode
      INPUTC(8'h90),                   // 34 refused: fetched from code RAM
      JUMP(rel(35, 35))                // 35 done
    };
    bios[9] = LOADI(RB, byte_t'(2 * prog2.size()));
    dbank_marks = '{19, 23, 27, 30};
  endfunction

  // ext from the PC while the loader and program 2 run (phase B only)
  logic ext_en = 1'b0;
  always_comb begin
    ext = '{cmem_bank_n: 1'b1, wb_n: 1'b1, dmem_bank_we: 1'b0};
    if (ext_en) begin
      if (!pc[7]) begin
        ext.cmem_bank_n = !(pc === 8'd0);
        ext.wb_n        = !(pc === 8'd4 || pc === 8'd6);
      end else if (cmem_bank === 8'd1) begin
        foreach (dbank_marks[i])
          if (pc === byte_t'(8'h80 + dbank_marks[i])) ext.dmem_bank_we = 1'b1;
      end
    end
  end

  // ------------------------------------------------------------ monitors
  int n_taken, n_not_taken, n_flags, n_dmem_wr, n_vid_hex, n_vid_game, n_cmem_wr;
  int n_cmem_blocked, n_wb_wr, n_cbank, n_dbank, n_overflow, n_carry, n_ram_fetch;
  int n_examine, n_dep_code, n_dep_data, n_single_step, n_run_ce;

  always @(posedge clk) begin
    if (cpu_ce && !dut.rst) begin
      if (instr[15:12] === OPC_BRANCH && instr[11:8] <= 4'd9) begin
        if (ctrl.pc_mux) n_taken++;
        else n_not_taken++;
      end
      if (ctrl.flags_we) n_flags++;
      if (ctrl.flags_we && dut.u_cpu.flags_next.o) n_overflow++;
      if (ctrl.flags_we && dut.u_cpu.flags_next.c) n_carry++;
      if (ctrl.dmem_we) begin
        n_dmem_wr++;
        if (dmem_addr < 8) begin
          if (game_mode_sw) n_vid_game++;
          else n_vid_hex++;
        end
      end
      if (ctrl.cmem_we) begin
        if (pc[7] && !dut.u_dbg.bus_released) n_cmem_blocked++;
        else n_cmem_wr++;
        if (!ext.wb_n) n_wb_wr++;
      end
      if (!ext.cmem_bank_n) n_cbank++;
      if (ext.dmem_bank_we) n_dbank++;
      if (pc[7] && !dut.u_dbg.bus_released) n_ram_fetch++;
    end
  end

  // ------------------------------------------------------------ panel
  task automatic ticks(int n);
    repeat (n) @(posedge clk);
    #1ns;
  endtask

  task automatic do_reset();
    reset_sw = 1'b1;
    ticks(6);
    reset_sw = 1'b0;
    ticks(4);
    check(pc === 8'd0 && cmem_bank === 8'd0 && dmem_bank === 8'd0, "reset clears PC and banks");
  endtask

  task automatic examine(byte_t target);
    byte_t from = pc;
    switches = {8'h00, byte_t'(target - from - 8'd1)};
    examine_sw = 1'b1;
    ticks(5);
    check(pc === from, "PC held while Examine is down");
    examine_sw = 1'b0;
    ticks(6);
    check(pc === target, $sformatf("Examine to %02h gave %02h", target, pc));
    n_examine++;
  endtask

  task automatic deposit(instr_t value, bit data);
    byte_t from = pc;
    switches = value;
    code_data_sw = data;
    ticks(3);
    deposit_sw = 1'b1;
    ticks(5);
    deposit_sw = 1'b0;
    ticks(6);
    check(pc === from + 8'd1, "Deposit advances the PC");
    if (data) n_dep_data++;
    else n_dep_code++;
  endtask

  task automatic single_step();
    byte_t from = pc;
    instr_t w = instr;
    step_sw = 1'b1;
    ticks(5);
    step_sw = 1'b0;
    ticks(5);
    // every stepped instruction here falls through
    check(pc === from + 8'd1, $sformatf("single step of %04h from %02h gave %02h", w, from, pc));
    n_single_step++;
  endtask

  // run until the PC parks on 'stop' (a self jump); returns the cycle count
  task automatic run_until(byte_t stop, int limit, int exp_period);
    int cycles = 0;
    int ce_count = 0;
    run_sw = 1'b1;
    while (cycles < limit && !(pc === stop && instr === JUMP(8'hFF))) begin
      @(posedge clk);
      #1ns;
      cycles++;
      if (cpu_ce) ce_count++;
      if (cycles === 400) begin
        // rate over the first 400 oscillator cycles (synchroniser start-up allowed)
        check(ce_count >= 400 / exp_period - 2 && ce_count <= 400 / exp_period,
              $sformatf("run rate: %0d enables in 400 cycles, period %0d", ce_count, exp_period));
      end
    end
    n_run_ce += ce_count;
    run_sw = 1'b0;
    ticks(4);
    check(pc === stop, $sformatf("program parked at %02h, PC %02h", stop, pc));
  endtask

  // ------------------------------------------------------------ stimulus
  initial begin
    byte_t data [8];
    byte_t sorted [8];
    byte_t t;
    int    base;

    build_programs();
    #1ns;
    for (int i = 0; i < 128; i++)
      dut.u_cpu.u_cmem.rom[i] = (i < bios.size()) ? bios[i] : NOOP();

    // ---------------- phase A
    do_reset();
    examine(8'h80);
    foreach (sortp[i]) deposit(sortp[i], 1'b0);
    examine(8'h10);
    for (int i = 0; i < 8; i++) begin
      data[i] = byte_t'($urandom);
      deposit({8'h00, data[i]}, 1'b1);
    end
    examine(8'h80);
    for (int i = 0; i < 3; i++) single_step();
    check(regs[2] === 8'd7 && regs[3] === 8'd0, "stepped LOADI C and LOADF A");
    freq_sel = 4'd12;
    run_until(8'h80 + 8'd21, 20000, 2);

    sorted = data;
    for (int i = 0; i < 7; i++)
      for (int j = 0; j < 7 - i; j++)
        if ($signed(sorted[j]) > $signed(sorted[j + 1])) begin
          t = sorted[j];
          sorted[j] = sorted[j + 1];
          sorted[j + 1] = t;
        end
    for (int i = 0; i < 8; i++) begin
      check(dut.u_cpu.u_dmem.mem[16 + i] === sorted[i],
            $sformatf("sorted[%0d] = %02h, expected %02h", i, dut.u_cpu.u_dmem.mem[16 + i], sorted[i]));
      check(seg[i] === hex_glyph(sorted[i][3:0]), $sformatf("display %0d pattern %02h", i, seg[i]));
    end

    // ---------------- phase B
    game_mode_sw = 1'b1;
    examine(byte_t'(PROG2_AT));
    foreach (prog2[i]) begin
      deposit({8'h00, prog2[i][15:8]}, 1'b1);
      deposit({8'h00, prog2[i][7:0]}, 1'b1);
    end
    do_reset();
    ext_en = 1'b1;
    single_step();
    check(cmem_bank === 8'd1, "loader selected code bank 1");
    single_step();
    freq_sel = 4'd11;
    run_until(8'h80 + 8'd35, 60000, 4);
    ext_en = 1'b0;

    check(regs[0] === 8'h49 && regs[1] === 8'h5A, "program 2: A and B");
    check(regs[2] === 8'hA5, $sformatf("data bank 2 read %02h", regs[2]));
    check(regs[3] === 8'h5A, $sformatf("data bank 3 read %02h", regs[3]));
    check(flags === '{c: 1'b1, o: 1'b0, n: 1'b0, z: 1'b1}, "flags of 0x80 - 0x80");
    check(dmem_bank === 8'd3 && cmem_bank === 8'd1, "bank registers");
    check(seg[7] === 8'h49, "game-mode display takes the raw byte");
    base = 128;
    foreach (prog2[i])
      check(dut.u_cpu.u_cmem.ram[base + i] === prog2[i], $sformatf("copied word %0d", i));
    check(dut.u_cpu.u_dmem.mem[2 * 128 + 5] === 8'hA5 && dut.u_cpu.u_dmem.mem[3 * 128 + 5] === 8'h5A,
          "banked data bytes");

    // ---------------- mechanism counts
    $display("mechanisms: taken=%0d not_taken=%0d flags=%0d overflow=%0d carry=%0d dmem_wr=%0d vid_hex=%0d vid_game=%0d",
             n_taken, n_not_taken, n_flags, n_overflow, n_carry, n_dmem_wr, n_vid_hex, n_vid_game);
    $display("mechanisms: cmem_wr=%0d cmem_refused=%0d writeback=%0d cbank=%0d dbank=%0d ram_fetch=%0d",
             n_cmem_wr, n_cmem_blocked, n_wb_wr, n_cbank, n_dbank, n_ram_fetch);
    $display("mechanisms: examine=%0d deposit_code=%0d deposit_data=%0d single_step=%0d run_enables=%0d",
             n_examine, n_dep_code, n_dep_data, n_single_step, n_run_ce);
    check(n_taken > 0,        "branch taken never happened");
    check(n_not_taken > 0,    "branch not taken never happened");
    check(n_flags > 0,        "flag write never happened");
    check(n_overflow > 0,     "overflow never happened");
    check(n_carry > 0,        "carry never happened");
    check(n_dmem_wr > 0,      "data write never happened");
    check(n_vid_hex > 0,      "hex-mode display write never happened");
    check(n_vid_game > 0,     "game-mode display write never happened");
    check(n_cmem_wr > 0,      "code RAM write never happened");
    check(n_cmem_blocked > 0, "refused code RAM write never happened");
    check(n_wb_wr > 0,        "write-back word never happened");
    check(n_cbank > 0,        "code bank load never happened");
    check(n_dbank > 0,        "data bank load never happened");
    check(n_ram_fetch > 0,    "fetch from code RAM never happened");
    check(n_examine > 0,      "Examine never happened");
    check(n_dep_code > 0,     "code Deposit never happened");
    check(n_dep_data > 0,     "data Deposit never happened");
    check(n_single_step > 0,  "single step never happened");
    check(n_run_ce > 0,       "run mode never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
