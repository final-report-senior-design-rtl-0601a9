// i281e_mux2: the 8-bit 2-to-1 MUX module.
//
// The processor uses one board design for its four bus multiplexers
// (c11 ALU source, c15 ALU result, c16 data-memory input, c18 register
// write-back): y = sel ? in1 : in0, purely combinational.
module i281e_mux2 #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             sel,
  input  logic [WIDTH-1:0] in0,
  input  logic [WIDTH-1:0] in1,
  output logic [WIDTH-1:0] y
);

  assign y = sel ? in1 : in0;

endmodule
