// i281e_pc: the program counter.
//
// Two adders and a mux feed an 8-bit PC register.  The first adder forms
// PC + 1; the second adds the 8-bit branch offset to that sum.  The PC mux
// (c2) chooses PC + 1 (c2 = 0) or PC + 1 + offset (c2 = 1), and the register
// loads the choice on a clock edge when ce and the PC write line (c3) are
// high.  Arithmetic wraps modulo 2^PC_W, so a negative two's-complement
// offset jumps backwards.  Reset clears the PC.
//
// The 8-bit width is the i281e's widening of the original 6-bit counter;
// the offset comes from the instruction's low byte or, by jumper, from the
// register input bus (chosen outside this block).
module i281e_pc
  import i281e_pkg::*;
#(
  parameter int unsigned WIDTH = PC_W
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             ce,
  input  logic             pc_we,
  input  logic             pc_mux,
  input  logic [WIDTH-1:0] offset,
  output logic [WIDTH-1:0] pc,
  output logic [WIDTH-1:0] pc_next
);

  logic [WIDTH-1:0] pc_inc, pc_branch;

  assign pc_inc    = pc + WIDTH'(1);
  assign pc_branch = pc_inc + offset;
  assign pc_next   = pc_mux ? pc_branch : pc_inc;

  always_ff @(posedge clk) begin
    if (rst)                pc <= '0;
    else if (ce && pc_we)   pc <= pc_next;
  end

endmodule
