// i281e_regfile: the four 8-bit general registers A, B, C and D.
//
// One write port and two read ports.  The write data reaches all four
// registers; a 2-to-4 decoder enabled by the register write line (c10)
// turns the write select (c8,c9) into one register's load enable, and the
// register loads on the clock edge with ce high.  Each read port is an
// 8-bit 4:1 multiplexer on its 2-bit select (c4,c5 for port 0, c6,c7 for
// port 1), so both ports may show the same or different registers.  Reads
// are combinational.  Register contents are also brought out for the
// register-storage LEDs.
//
// Reset clears all four registers; that is this design's choice for a
// defined simulation start, the register chips themselves have no clear.
module i281e_regfile
  import i281e_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       ce,
  input  logic       we,
  input  logic [1:0] wr_sel,
  input  byte_t      wdata,
  input  logic [1:0] p0_sel,
  input  logic [1:0] p1_sel,
  output byte_t      p0,
  output byte_t      p1,
  output byte_t      regs [4]
);

  logic [3:0] load_en;

  // 2-to-4 decoder with enable
  always_comb begin
    load_en = '0;
    if (we) load_en[wr_sel] = 1'b1;
  end

  for (genvar r = 0; r < 4; r++) begin : g_reg
    always_ff @(posedge clk) begin
      if (rst)                      regs[r] <= '0;
      else if (ce && load_en[r])    regs[r] <= wdata;
    end
  end

  assign p0 = regs[p0_sel];
  assign p1 = regs[p1_sel];

endmodule
