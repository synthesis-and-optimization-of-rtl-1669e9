// Low-power 4-bit magnitude comparator: the two low-power realizations
// side by side.
//
//   * pc_*  - pre-computation comparator (precomp_comparator): operands are
//             registered on the rising edge of clk, the lower three bits of
//             each operand only when A3 = B3; results are valid one clock
//             after the operands, the cascade inputs act combinationally.
//   * bdd_* - BDD comparator (bdd_comparator): a purely combinational
//             network of 2x1 multiplexers, one per BDD node.
// Both compute the same cascadable comparison:
//   agtbout = (A>B) + (A=B).agtbin, altbout = (A<B) + (A=B).altbin,
//   aeqbout = (A=B).aeqbin.
// The two halves share no signal; each brings its own ports out so either
// can be used (or measured) alone. Pairing the two strategies in one top is
// this design's packaging; each half follows the reference design.
module comparator_top #(
  parameter int unsigned WIDTH = mag_cmp_pkg::CMP_WIDTH
) (
  // pre-computation comparator
  input  logic             clk,
  input  logic [WIDTH-1:0] pc_a,
  input  logic [WIDTH-1:0] pc_b,
  input  logic             pc_agtbin,
  input  logic             pc_altbin,
  input  logic             pc_aeqbin,
  output logic             pc_agtbout,
  output logic             pc_altbout,
  output logic             pc_aeqbout,
  // BDD (multiplexer network) comparator
  input  logic [WIDTH-1:0] bdd_a,
  input  logic [WIDTH-1:0] bdd_b,
  input  logic             bdd_agtbin,
  input  logic             bdd_altbin,
  input  logic             bdd_aeqbin,
  output logic             bdd_agtbout,
  output logic             bdd_altbout,
  output logic             bdd_aeqbout
);

  precomp_comparator #(.WIDTH(WIDTH)) u_precomp (
    .clk     (clk),
    .a       (pc_a),
    .b       (pc_b),
    .agtbin  (pc_agtbin),
    .altbin  (pc_altbin),
    .aeqbin  (pc_aeqbin),
    .agtbout (pc_agtbout),
    .altbout (pc_altbout),
    .aeqbout (pc_aeqbout)
  );

  bdd_comparator #(.WIDTH(WIDTH)) u_bdd (
    .a       (bdd_a),
    .b       (bdd_b),
    .agtbin  (bdd_agtbin),
    .altbin  (bdd_altbin),
    .aeqbin  (bdd_aeqbin),
    .agtbout (bdd_agtbout),
    .altbout (bdd_altbout),
    .aeqbout (bdd_aeqbout)
  );

endmodule
