// Register for the pre-computed operand slice (the MSBs A3 and B3).
//
// A plain WIDTH-bit register, default 2 bits (A3 and B3), loaded on every
// rising clock edge with no enable: the MSBs must always be current because
// they decide the comparison whenever they differ. q is valid one clock
// after d. The register and its 2-bit width follow the pre-computation
// comparator; the rising edge and the absence of a reset are this design's
// choices (the comparator has only a clock besides its data ports).
module msb_reg #(
  parameter int unsigned WIDTH = 2
) (
  input  logic             clk,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  always_ff @(posedge clk) q <= d;

endmodule
