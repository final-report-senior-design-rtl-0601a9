// tb_i281e_cpu: self-checking testbench for the i281e CPU core.
//
// The core is compared cycle by cycle against an instruction-level model
// of the machine written in this testbench (integer arithmetic, not the
// datapath structure).  The model holds the PC, registers, flags, both bank
// registers, the write-back high byte, the displays, the boot ROM, the code
// RAM and the data RAM.  Each cycle the testbench picks random values for
// the clock enable, switches, game-mode switch and (sometimes) a mocked
// instruction on the released bus, and drives the three external memory
// controls only on instructions where their effect is defined:
//   code-RAM bank load on LOADI (bank <- imm), data-memory bank load on
//   STORE (bank <- R[X]), write-back on STORE, CMP, INPUTC and INPUTCF.
// After every clock edge PC, registers, flags, banks and displays must match;
// before every edge the instruction bus must match the model's fetch.
//
// Phase 1 runs a short directed program (from the boot ROM) and also checks
// hand-computed results, so the model itself is held to known answers.
// Phase 2 fills the ROM (through a hierarchical reference) and then the
// code RAM and data RAM with random words, using mocked INPUTC/INPUTD
// instructions on the released bus the way the front panel deposits; it
// then runs random code with occasional resets.  At the end both RAMs are
// compared in full.
// Core parameters are left at their defaults.
module tb_i281e_cpu;
  import i281e_pkg::*;
  import i281e_asm_pkg::*;

  localparam int unsigned CW = 32768;
  localparam int unsigned DW = 32768;
  localparam int unsigned RANDOM_CYCLES = 300000;

  logic      clk = 1'b0;
  logic      rst = 1'b1;
  logic      ce = 1'b0;
  instr_t    switches = '0;
  logic      game_mode = 1'b0;
  logic      bus_released = 1'b0;
  instr_t    mock_instr = '0;
  localparam ext_ctrl_t EXT_IDLE = '{cmem_bank_n: 1'b1, wb_n: 1'b1, dmem_bank_we: 1'b0};
  ext_ctrl_t ext = EXT_IDLE;

  byte_t  pc, alu_result, dmem_addr, cmem_bank, dmem_bank;
  instr_t instr;
  ctrl_t  ctrl;
  flags_t flags;
  byte_t  regs [4];
  byte_t  seg [8];

  int checks = 0;
  int failures = 0;

  i281e_cpu dut (
    .clk, .rst, .ce, .switches, .game_mode, .bus_released, .mock_instr, .ext,
    .pc, .instr, .ctrl, .flags, .regs, .alu_result, .dmem_addr, .cmem_bank,
    .dmem_bank, .seg
  );

  always #5 clk = ~clk;

  // ---------------------------------------------------------------- model
  instr_t m_rom [128];
  instr_t m_ram [CW];
  byte_t  m_dmem [DW];
  byte_t  m_r [4];
  flags_t m_f;
  byte_t  m_pc, m_cbank, m_dbank, m_hi;
  byte_t  m_seg [8];

  // coverage of the model's events
  int n_op [16];
  int n_taken, n_not_taken, n_ram_write, n_ram_blocked, n_video_game, n_video_hex;
  int n_cbank, n_dbank, n_wb_write, n_mock, n_ram_fetch;
  instr_t last_w;     // last word executed, for failure messages
  byte_t  last_pc;

  function automatic void m_reset();
    m_r = '{default: '0};
    m_f = '0;
    m_pc = '0;
    m_cbank = '0;
    m_dbank = '0;
    m_hi = '0;
    m_seg = '{default: '0};
  endfunction

  function automatic instr_t m_fetch();
    return m_pc[7] ? m_ram[{m_cbank, m_pc[6:0]}] : m_rom[m_pc[6:0]];
  endfunction

  function automatic int dphys(byte_t a);
    return a[7] ? int'({m_dbank, a[6:0]}) : int'(a[6:0]);
  endfunction

  function automatic void arith(byte_t a, byte_t b, bit sub, output byte_t r, output flags_t f);
    int unsigned ua = a;
    int unsigned ub = b;
    int s;
    if (!sub) begin
      r = byte_t'(ua + ub);
      f.c = (ua + ub) > 255;
      s = int'($signed(a)) + int'($signed(b));
    end else begin
      r = byte_t'(ua - ub);
      f.c = ua >= ub;
      s = int'($signed(a)) - int'($signed(b));
    end
    f.o = (s > 127) || (s < -128);
    f.n = r[7];
    f.z = (r === 0);
  endfunction

  // write-port value of register read port 1 for this instruction
  function automatic byte_t port1_of(instr_t w);
    case (w[15:12])
      OPC_ADD, OPC_SUB, OPC_CMP: return m_r[w[9:8]];
      OPC_STORE, OPC_STOREF:     return m_r[w[11:10]];
      default:                   return m_r[0];
    endcase
  endfunction

  // execute one instruction word w on the model
  task automatic m_step(instr_t w, instr_t sw, bit game, bit released, ext_ctrl_t e);
    logic [3:0] opc = w[15:12];
    logic [1:0] x = w[11:10];
    logic [1:0] y = w[9:8];
    byte_t imm = w[7:0];
    byte_t nr [4];
    flags_t nf;
    byte_t npc, a, res, p1;
    bit take;
    last_w = w;
    last_pc = m_pc;
    nr = m_r;
    nf = m_f;
    npc = m_pc + 8'd1;
    p1 = port1_of(w);
    n_op[opc]++;
    if (released) n_mock++;
    if (m_pc[7] && !released) n_ram_fetch++;
    case (opc)
      OPC_INPUT: begin
        a = y[0] ? byte_t'(m_r[x] + imm) : imm;
        if (!y[1]) begin
          if (a[7] && (!m_pc[7] || released)) begin
            m_ram[{m_cbank, a[6:0]}] = e.wb_n ? sw : {m_hi, m_r[0]};
            n_ram_write++;
            if (!e.wb_n) n_wb_write++;
          end else if (a[7]) n_ram_blocked++;
        end else d_write(a, sw[7:0], game);
      end
      OPC_MOVE:  nr[x] = m_r[y] + imm;
      OPC_LOADI: nr[x] = imm;
      OPC_ADD:   begin arith(m_r[x], m_r[y], 1'b0, res, nf); nr[x] = res; end
      OPC_ADDI:  begin arith(m_r[x], imm, 1'b0, res, nf); nr[x] = res; end
      OPC_SUB:   begin arith(m_r[x], m_r[y], 1'b1, res, nf); nr[x] = res; end
      OPC_SUBI:  begin arith(m_r[x], imm, 1'b1, res, nf); nr[x] = res; end
      OPC_LOAD:  nr[x] = m_dmem[dphys(imm)];
      OPC_LOADF: nr[x] = m_dmem[dphys(m_r[y] + imm)];
      OPC_STORE: d_write(imm, m_r[x], game);
      OPC_STOREF: d_write(m_r[y] + imm, m_r[x], game);
      OPC_SHIFT: begin
        if (!y[0]) begin res = {m_r[x][6:0], 1'b0}; nf.c = m_r[x][7]; end
        else       begin res = {1'b0, m_r[x][7:1]}; nf.c = m_r[x][0]; end
        nf.o = 1'b0;
        nf.n = res[7];
        nf.z = (res === 0);
        nr[x] = res;
      end
      OPC_CMP:   arith(m_r[x], m_r[y], 1'b1, res, nf);
      OPC_JUMP:  npc = m_pc + 8'd1 + imm;
      OPC_BRANCH: begin
        case (w[11:8])
          4'd0: take = m_f.z;
          4'd1: take = !m_f.z;
          4'd2: take = !m_f.z && (m_f.n === m_f.o);
          4'd3: take = (m_f.n === m_f.o);
          4'd4: take = m_f.c;
          4'd5: take = !m_f.c;
          4'd6: take = m_f.o;
          4'd7: take = !m_f.o;
          4'd8: take = m_f.n;
          4'd9: take = !m_f.n;
          default: take = 1'b0;
        endcase
        if (w[11:8] <= 4'd9) begin
          if (take) n_taken++;
          else n_not_taken++;
        end
        if (take) npc = m_pc + 8'd1 + imm;
      end
      default: ;
    endcase
    // external memory controls, applied with the old register values
    if (!e.cmem_bank_n) begin m_cbank = imm; n_cbank++; end
    if (e.dmem_bank_we) begin m_dbank = p1; n_dbank++; end
    if (!e.wb_n) m_hi = p1;
    m_r = nr;
    m_f = nf;
    m_pc = npc;
  endtask

  task automatic d_write(byte_t a, byte_t d, bit game);
    m_dmem[dphys(a)] = d;
    if (a < 8) begin
      m_seg[a[2:0]] = game ? d : hex_glyph(d[3:0]);
      if (game) n_video_game++;
      else n_video_hex++;
    end
  endtask

  // ------------------------------------------------------------ checking
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 20)
        $display("FAIL t=%0t %s (after %04h at %02h)", $time, what, last_w, last_pc);
    end
  endtask

  task automatic compare_state(string tag);
    check(pc === m_pc, $sformatf("%s pc %02h exp %02h", tag, pc, m_pc));
    for (int i = 0; i < 4; i++)
      check(regs[i] === m_r[i], $sformatf("%s R%0d %02h exp %02h", tag, i, regs[i], m_r[i]));
    check(flags === m_f, $sformatf("%s flags %04b exp %04b", tag, flags, m_f));
    check(cmem_bank === m_cbank, $sformatf("%s cmem bank %02h exp %02h", tag, cmem_bank, m_cbank));
    check(dmem_bank === m_dbank, $sformatf("%s dmem bank %02h exp %02h", tag, dmem_bank, m_dbank));
    for (int i = 0; i < 8; i++)
      check(seg[i] === m_seg[i], $sformatf("%s seg%0d %02h exp %02h", tag, i, seg[i], m_seg[i]));
  endtask

  // one clock: choose inputs at the falling edge, step the model at the rising one
  task automatic cycle(bit allow_random_inputs);
    instr_t w;
    logic [3:0] opc;
    @(negedge clk);
    if (allow_random_inputs) begin
      ce = ($urandom_range(0, 3) !== 0);
      switches = instr_t'($urandom);
      game_mode = $urandom_range(0, 1);
      bus_released = ($urandom_range(0, 19) === 0);
      mock_instr = instr_t'($urandom);
    end else begin
      ce = 1'b1;
      bus_released = 1'b0;
    end
    w = bus_released ? mock_instr : m_fetch();
    opc = w[15:12];
    ext.cmem_bank_n  = !(allow_random_inputs && opc === OPC_LOADI && $urandom_range(0, 3) === 0);
    ext.dmem_bank_we = allow_random_inputs && opc === OPC_STORE && $urandom_range(0, 3) === 0;
    ext.wb_n = !(allow_random_inputs && $urandom_range(0, 1) === 0 &&
                 (opc === OPC_STORE || opc === OPC_CMP ||
                  (opc === OPC_INPUT && w[9] === 1'b0)));
    #1;
    check(instr === w, $sformatf("instr bus %04h exp %04h", instr, w));
    @(posedge clk);
    if (ce) m_step(w, switches, game_mode, bus_released, ext);
    #1;
    compare_state("cycle");
  endtask

  task automatic do_reset();
    @(negedge clk);
    rst = 1'b1;
    ce = ($urandom_range(0, 1) === 1);
    ext = EXT_IDLE;
    @(posedge clk);
    m_reset();
    #1;
    compare_state("reset");
    @(negedge clk);
    rst = 1'b0;
    ce = 1'b0;
  endtask

  // execute one word on the released instruction bus (front-panel style)
  task automatic mocked(instr_t w, instr_t sw, ext_ctrl_t e);
    @(negedge clk);
    ce = 1'b1;
    bus_released = 1'b1;
    mock_instr = w;
    switches = sw;
    ext = e;
    @(posedge clk);
    m_step(w, switches, game_mode, bus_released, ext);
    #1;
    compare_state("preload");
    @(negedge clk);
    ce = 1'b0;
    bus_released = 1'b0;
    ext = EXT_IDLE;
  endtask

  task automatic load_rom(instr_t prog [$]);
    for (int i = 0; i < 128; i++) begin
      m_rom[i] = (i < prog.size()) ? prog[i] : NOOP();
      dut.u_cmem.rom[i] = m_rom[i];
    end
  endtask

  // ------------------------------------------------------------ stimulus
  initial begin
    instr_t prog [$];
    instr_t rw;
    byte_t  rb;
    int     idx;
    int     hold;
    m_reset();
    for (int i = 0; i < 16; i++) n_op[i] = 0;
    #1;

    // Phase 1: directed program with hand-computed results.
    prog = '{
      LOADI(RA, 8'd9), LOADI(RB, 8'd10), ADD(RA, RB),            // A = 19
      LOADI(RC, 8'h7F), ADDI(RC, 8'd1),                          // C = 80, O and N
      BRO(8'd1), LOADI(RD, 8'hEE),                               // skipped
      STORE(8'd3, RA),                                           // display 3 <- 19
      LOADI(RB, 8'h90), STORE(8'h90, RB),                        // DMEM[0x90] <- 0x90
      LOADI(RD, 8'h10), LOADF(RD, RD, 8'h80),                    // D <- DMEM[0x90]
      LOADI(RB, 8'd5), CMP(RB, RA), BRG(8'd1), MOVE(RB, RA),     // 5 > 19 false: B = 19
      SHIFTR(RB),                                                // B = 9, C flag 1
      BRNC(rel(17, 17)), JUMP(rel(18, 20)), LOADI(RA, 8'h55),    // jump over
      JUMP(rel(20, 20))                                          // stay
    };
    load_rom(prog);
    do_reset();
    for (int i = 0; i < 40; i++) cycle(1'b0);
    check(regs[0] === 8'd19, "directed: A = 9 + 10");
    check(regs[1] === 8'd9,  "directed: B = 19 >> 1");
    check(regs[2] === 8'h80, "directed: C = 0x7F + 1");
    check(regs[3] === 8'h90, "directed: D loaded through banked address");
    check(flags.c === 1'b1 && flags.z === 1'b0, "directed: shift-out carry");
    check(pc === 8'd20, "directed: parked on the self jump");
    check(seg[3] === hex_glyph(4'h3), "directed: display 3 shows 3");

    // Phase 2: random code in ROM and RAM, random data.
    for (int i = 0; i < 128; i++) begin
      rw = instr_t'($urandom);
      m_rom[i] = rw;
      dut.u_cmem.rom[i] = rw;
    end
    // Code RAM: per bank, a mocked LOADI loads the bank register, then
    // mocked INPUTC words fill the 128-word window from the switches.
    for (int b = 0; b < int'(CW / 128); b++) begin
      mocked(LOADI(RD, byte_t'(b)), '0, '{cmem_bank_n: 1'b0, wb_n: 1'b1, dmem_bank_we: 1'b0});
      for (int i = 0; i < 128; i++)
        mocked(INPUTC(byte_t'(8'h80 + i)), instr_t'($urandom), EXT_IDLE);
    end
    // Data RAM: the fixed low half, then every bank through a STORE that
    // also loads the data bank register.
    for (int i = 0; i < 128; i++)
      mocked(INPUTD(byte_t'(i)), instr_t'($urandom), EXT_IDLE);
    for (int b = 0; b < int'(DW / 128); b++) begin
      mocked(LOADI(RD, byte_t'(b)), '0, EXT_IDLE);
      mocked(STORE(8'd8, RD), '0, '{cmem_bank_n: 1'b1, wb_n: 1'b1, dmem_bank_we: 1'b1});
      for (int i = 0; i < 128; i++)
        mocked(INPUTD(byte_t'(8'h80 + i)), instr_t'($urandom), EXT_IDLE);
    end
    do_reset();
    for (int unsigned n = 0; n < RANDOM_CYCLES; n++) begin
      if ($urandom_range(0, 4999) === 0) do_reset();
      cycle(1'b1);
    end

    // Full memory comparison.
    hold = failures;
    for (int i = 0; i < int'(CW); i++)
      if (dut.u_cmem.ram[i] !== m_ram[i]) begin
        failures++;
        idx = i;
      end
    for (int i = 0; i < int'(DW); i++)
      if (dut.u_dmem.mem[i] !== m_dmem[i]) begin
        failures++;
        idx = i;
      end
    checks += 2;
    if (failures !== hold) $display("FAIL memory contents differ, last index %0d", idx);

    // The random run must have exercised every mechanism.
    for (int i = 0; i < 16; i++) check(n_op[i] > 0, $sformatf("opcode %0h never ran", i));
    check(n_taken > 0,       "no branch taken");
    check(n_not_taken > 0,   "no branch not taken");
    check(n_ram_write > 0,   "no code RAM write");
    check(n_ram_blocked > 0, "no blocked code RAM write");
    check(n_wb_write > 0,    "no write-back word");
    check(n_video_game > 0,  "no game-mode display write");
    check(n_video_hex > 0,   "no hex display write");
    check(n_cbank > 0,       "no code bank load");
    check(n_dbank > 0,       "no data bank load");
    check(n_mock > 0,        "no mocked instruction");
    check(n_ram_fetch > 0,   "no fetch from code RAM");
    $display("coverage: taken=%0d not_taken=%0d ram_wr=%0d blocked=%0d wb=%0d vid=%0d/%0d cbank=%0d dbank=%0d mock=%0d ramfetch=%0d",
             n_taken, n_not_taken, n_ram_write, n_ram_blocked, n_wb_write, n_video_hex,
             n_video_game, n_cbank, n_dbank, n_mock, n_ram_fetch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #50ms;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
