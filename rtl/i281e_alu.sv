// i281e_alu: the arithmetic logic unit with its flag register.
//
// Four operations are selected by alu_sel = {ALU_SELECT1 (c12), ALU_SELECT0 (c13)}:
//   00 shift A left by one   01 shift A right by one
//   10 A + B                 11 A - B (also used by CMP)
// The datapath is the one of the processor description: an 8-bit shifter
// whose direction is ALU_SELECT0, an 8-bit adder/subtractor whose mode is
// ALU_SELECT0 (subtract = A + ~B + 1), and a 2:1 result mux steered by
// ALU_SELECT1.  Carry is the bit shifted out for shifts and the adder carry
// out (c8) for add/subtract; overflow is c7 XOR c8 for add/subtract and
// 0 for shifts; negative is result bit 7; zero is the NOR of the result.
//
// The flags are held in a 4-bit register written on a clock edge with ce
// high and flags_we (c14) high.  Layout: bit 0 Z, bit 1 N, bit 2 O, bit 3 C.
// The result and the next flag values are combinational (single cycle).
//
// NOR_VARIANT selects the alternative "ALU NOR" board, on which select 00
// gives NOR(A, B) instead of shift left.  For that operation this design
// clears carry and overflow; the flag behaviour of NOR is not specified.
// Shift right is logical (a 0 enters bit 7): this design's choice.
// Reset clears the flags (this design's choice, so that simulation starts
// from known state).
module i281e_alu
  import i281e_pkg::*;
#(
  parameter bit NOR_VARIANT = 1'b0
) (
  input  logic     clk,
  input  logic     rst,
  input  logic     ce,
  input  byte_t    a,
  input  byte_t    b,
  input  alu_sel_e alu_sel,
  input  logic     flags_we,
  output byte_t    result,
  output flags_t   flags_next,
  output flags_t   flags
);

  logic  sel1, sel0;
  byte_t shift_res;
  logic  shift_out;
  byte_t b_eff;
  logic  c7, c8;
  logic [6:0] low_sum;
  logic       top_sum;

  assign sel1 = alu_sel[1];
  assign sel0 = alu_sel[0];

  // 8-bit shifter (or NOR on the variant board)
  always_comb begin
    if (!sel0) begin
      if (NOR_VARIANT) begin
        shift_res = ~(a | b);
        shift_out = 1'b0;
      end else begin
        shift_res = {a[6:0], 1'b0};
        shift_out = a[7];
      end
    end else begin
      shift_res = {1'b0, a[7:1]};
      shift_out = a[0];
    end
  end

  // 8-bit adder/subtractor built as a 7-bit low part and the top bit, so that
  // the carry into bit 7 (c7) is visible for the overflow flag.
  assign b_eff = sel0 ? ~b : b;
  assign {c7, low_sum} = {1'b0, a[6:0]} + {1'b0, b_eff[6:0]} + 8'(sel0);
  assign {c8, top_sum} = {1'b0, a[7]} + {1'b0, b_eff[7]} + 2'(c7);

  assign result = sel1 ? {top_sum, low_sum} : shift_res;

  always_comb begin
    flags_next.z = ~|result;
    flags_next.n = result[7];
    flags_next.c = sel1 ? c8 : shift_out;
    flags_next.o = sel1 ? (c7 ^ c8) : 1'b0;
  end

  always_ff @(posedge clk) begin
    if (rst)                  flags <= '0;
    else if (ce && flags_we)  flags <= flags_next;
  end

endmodule
