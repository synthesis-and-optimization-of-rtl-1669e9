// Register with load enable for the gated operand slice (A[2:0], B[2:0]).
//
// WIDTH bits, default 6 (three bits of A and three of B). On a rising clock
// edge q takes d when en is 1 and keeps its value when en is 0. Holding the
// register is what saves power in the pre-computation comparator: when the
// MSBs already decide the result, the lower operand bits seen by the
// comparator do not toggle. q is valid one clock after d. Width and enable
// follow the pre-computation comparator; edge and lack of reset are this
// design's choices.
module lsb_reg #(
  parameter int unsigned WIDTH = 6
) (
  input  logic             clk,
  input  logic             en,   // load enable, 1 = load d
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  always_ff @(posedge clk)
    if (en) q <= d;

endmodule
