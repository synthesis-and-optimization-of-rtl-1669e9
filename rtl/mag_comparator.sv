// Cascadable magnitude comparator (74x85 style), WIDTH bits, default 4.
//
// Compares unsigned A and B. Each bit pair feeds an XNOR "equal" gate
// e_i = ~(a_i ^ b_i). A>B is the OR over bits i of a_i.b_i' ANDed with the
// equal signals of all more significant bits; A<B likewise with a_i'.b_i;
// A=B is the AND of all e_i. The cascade inputs (from a less significant
// stage) only decide when the operands are equal:
//   agtbout = (A>B) + (A=B).agtbin
//   altbout = (A<B) + (A=B).altbin
//   aeqbout = (A=B).aeqbin
// In normal use exactly one cascade input is high (a single stage ties
// aeqbin=1, agtbin=altbin=0), and then exactly one output is high.
// Purely combinational; no clock, no state. The gate structure (XNOR per
// bit, AND-OR for the magnitude outputs, AND for equality) and the cascade
// equations are taken from the reference design; the WIDTH parameter is a
// generalization of the 4-bit circuit.
module mag_comparator #(
  parameter int unsigned WIDTH = mag_cmp_pkg::CMP_WIDTH
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             agtbin,   // cascade: lower stage says A>B
  input  logic             altbin,   // cascade: lower stage says A<B
  input  logic             aeqbin,   // cascade: lower stage says A=B
  output logic             agtbout,
  output logic             altbout,
  output logic             aeqbout
);

  logic [WIDTH-1:0] e;          // per-bit equality (XNOR)
  logic             gt, lt, eq; // comparison of this stage alone

  always_comb begin
    logic above_eq;             // all more significant bits equal
    e        = ~(a ^ b);
    gt       = 1'b0;
    lt       = 1'b0;
    above_eq = 1'b1;
    for (int i = WIDTH - 1; i >= 0; i--) begin
      gt       = gt | (above_eq & a[i] & ~b[i]);
      lt       = lt | (above_eq & ~a[i] & b[i]);
      above_eq = above_eq & e[i];
    end
    eq      = &e;
    agtbout = gt | (eq & agtbin);
    altbout = lt | (eq & altbin);
    aeqbout = eq & aeqbin;
  end

endmodule
