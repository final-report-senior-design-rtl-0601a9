// i281e_writeback: chooses the 16-bit word written into code RAM.
//
// In normal operation (wb_n high) the word is the 16-bit switch register,
// which is what INPUTC stores.  With wb_n low (the write-back control line,
// active low) the module instead assembles a word from the register file:
// on every enabled clock edge with wb_n low it latches read port 1 as the
// high byte, and the word it presents is {latched high byte, port 1}.  A
// program therefore copies a 16-bit instruction from data memory into code
// RAM in two steps: one cycle with wb_n low and the high byte on port 1,
// then the code-memory write with wb_n low and the low byte on port 1.
// The high-byte register is cleared by reset (this design's choice).
module i281e_writeback
  import i281e_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  logic   ce,
  input  logic   wb_n,
  input  instr_t switches,
  input  byte_t  port1,
  output instr_t wdata,
  output byte_t  high_byte
);

  always_ff @(posedge clk) begin
    if (rst)              high_byte <= '0;
    else if (ce && !wb_n) high_byte <= port1;
  end

  assign wdata = wb_n ? switches : {high_byte, port1};

endmodule
