// i281e_data_memory: byte-wide data RAM with a bank register.
//
// The CPU presents an 8-bit data address (the c15 mux output).  Addresses
// 0x00-0x7F always reach the first 128 bytes of the RAM; addresses
// 0x80-0xFF reach a 128-byte window chosen by the 8-bit bank register, so
// the physical address is {bank, addr[6:0]}, bank 0 being the fixed low
// half.  With DEPTH = 32768 this gives the processor's 32 KB data memory.
// The windowing scheme is this design's choice: the bank register is named
// but its addressing is not specified.
//
// Reads are combinational and feed the c18 write-back mux.  A write (c17)
// stores wdata on the clock edge with ce high and rst low.  The bank register loads
// wdata on a clock edge with ce and bank_we high; reset clears it.
module i281e_data_memory
  import i281e_pkg::*;
#(
  parameter int unsigned DEPTH = 32768
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  ce,
  input  byte_t addr,
  input  byte_t wdata,
  input  logic  we,        // c17
  input  logic  bank_we,
  output byte_t rdata,
  output byte_t bank
);

  localparam int unsigned AW     = $clog2(DEPTH);
  localparam int unsigned BANK_W = AW - 7;

  byte_t mem [DEPTH];
  logic [AW-1:0] paddr;

  always_ff @(posedge clk) begin
    if (rst)                  bank <= '0;
    else if (ce && bank_we)   bank <= wdata;
  end

  assign paddr = addr[7] ? {bank[BANK_W-1:0], addr[6:0]} : AW'(addr[6:0]);
  assign rdata = mem[paddr];

  always_ff @(posedge clk) begin
    if (ce && we && !rst) mem[paddr] <= wdata;
  end

endmodule
