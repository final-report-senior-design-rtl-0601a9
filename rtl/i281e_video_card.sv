// i281e_video_card: memory-mapped driver for eight seven-segment displays.
//
// The card watches the data-memory write port.  A write to addresses 0-7
// (upper five address bits all zero, the NOR that enables the decoder) is
// converted to a segment pattern and loaded into that display's 8-bit
// register, in the same cycle as the data-memory write; the display
// registers only change on such writes.  The conversion, a lookup table on
// the board, depends on the game-mode switch at the time of the write:
//   normal mode  the low 4 bits are shown as a hexadecimal digit, the
//                decimal point is off;
//   game mode    each of the 8 bits drives one segment directly, the
//                decimal point included (the extra bit game mode enables).
// Segment bit order (bit 0 = a ... bit 6 = g, bit 7 = dp, 1 = lit) and the
// glyph shapes are this design's choice.  Display 0 shows address 0.
// Reset blanks all displays.
module i281e_video_card
  import i281e_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  ce,
  input  byte_t addr,
  input  byte_t wdata,
  input  logic  we,
  input  logic  game_mode,
  output byte_t seg [8]
);

  logic  hit;
  byte_t glyph;

  function automatic logic [6:0] hex_font(logic [3:0] v);
    //                 gfedcba
    unique case (v)
      4'h0: return 7'b0111111;
      4'h1: return 7'b0000110;
      4'h2: return 7'b1011011;
      4'h3: return 7'b1001111;
      4'h4: return 7'b1100110;
      4'h5: return 7'b1101101;
      4'h6: return 7'b1111101;
      4'h7: return 7'b0000111;
      4'h8: return 7'b1111111;
      4'h9: return 7'b1101111;
      4'hA: return 7'b1110111;
      4'hB: return 7'b1111100;
      4'hC: return 7'b0111001;
      4'hD: return 7'b1011110;
      4'hE: return 7'b1111001;
      4'hF: return 7'b1110001;
    endcase
  endfunction

  assign hit   = we && (addr[7:3] == 5'b0);
  assign glyph = game_mode ? wdata : {1'b0, hex_font(wdata[3:0])};

  for (genvar d = 0; d < 8; d++) begin : g_disp
    always_ff @(posedge clk) begin
      if (rst)                                     seg[d] <= '0;
      else if (ce && hit && addr[2:0] == 3'(d))    seg[d] <= glyph;
    end
  end

endmodule
