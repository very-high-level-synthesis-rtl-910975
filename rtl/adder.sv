// adder: parameterized binary adder, the functional element used for every
// "+" node of a generated datapath.
//
// Purely combinational: y = a + b, one bit wider than the operands so that
// no carry is lost. Operands are unsigned; the widths are this design's
// choice, the source leaves them open.
module adder #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W:0]   y
);

  assign y = {1'b0, a} + {1'b0, b};

endmodule
