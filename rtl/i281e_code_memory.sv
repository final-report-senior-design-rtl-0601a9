// i281e_code_memory: boot ROM, banked code RAM and the code-RAM bank register.
//
// The 8-bit program address selects between two memories.  Addresses
// 0x00-0x7F read the 128-word boot ROM (the BIOS); addresses 0x80-0xFF read
// a 128-word window of the code RAM.  The window is chosen by an 8-bit bank
// register, so the RAM address is {bank, addr[6:0]} and 256 banks of 128
// words give the 32K-word RAM.  Reads are combinational (single-cycle CPU).
//
// Writes (INPUTC/INPUTCF, control line c1) go to the RAM at the address on
// the write-address bus, which is the c15 mux output; only addresses with
// bit 7 set (0x80 and up) reach the RAM, the ROM is never written.  The RAM
// chip is single-ported, so a write is honoured only while the instruction
// is not being fetched from the RAM: while the PC is in the ROM, or while
// the debug module has taken over the instruction bus (bus_released).  The
// bank register loads the write-address bus on a clock edge when
// bank_we_n is low.
//
// The ROM contents come from the hex file named by ROM_INIT (one 16-bit
// word per line); with an empty name the ROM holds NOOPs.  Reset clears the
// bank register and blocks RAM writes (this design's choice).
module i281e_code_memory
  import i281e_pkg::*;
#(
  parameter int unsigned ROM_WORDS = 128,
  parameter int unsigned RAM_WORDS = 32768,
  parameter string       ROM_INIT  = ""
) (
  input  logic   clk,
  input  logic   rst,
  input  logic   ce,
  input  byte_t  pc,
  output instr_t instr,
  input  logic   we,           // c1
  input  byte_t  waddr,        // write-address bus (c15 mux output)
  input  instr_t wdata,        // from the write-back module
  input  logic   bus_released, // debug module drives the instruction bus
  input  logic   bank_we_n,    // load the bank register from waddr
  output byte_t  bank
);

  localparam int unsigned RAM_AW  = $clog2(RAM_WORDS);
  localparam int unsigned BANK_W  = RAM_AW - 7;

  instr_t rom [ROM_WORDS];
  instr_t ram [RAM_WORDS];

  logic [RAM_AW-1:0] ram_raddr, ram_waddr;
  logic              ram_write;

  initial begin
    for (int i = 0; i < int'(ROM_WORDS); i++) rom[i] = '0;
    if (ROM_INIT != "") $readmemh(ROM_INIT, rom);
  end

  always_ff @(posedge clk) begin
    if (rst)                   bank <= '0;
    else if (ce && !bank_we_n) bank <= waddr;
  end

  assign ram_raddr = {bank[BANK_W-1:0], pc[6:0]};
  assign ram_waddr = {bank[BANK_W-1:0], waddr[6:0]};

  assign instr = pc[7] ? ram[ram_raddr] : rom[pc[6:0]];

  assign ram_write = we && waddr[7] && (!pc[7] || bus_released);

  always_ff @(posedge clk) begin
    if (ce && ram_write && !rst) ram[ram_waddr] <= wdata;
  end

endmodule
