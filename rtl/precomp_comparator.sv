// Pre-computation comparator: a magnitude comparator whose lower operand
// bits are frozen whenever the MSBs alone decide the result.
//
// Structure (second pre-computation architecture applied to the comparator):
//   * msb_reg   - 2-bit register for {A3, B3}, loaded every clock;
//   * lsb_reg   - 6-bit register for {A[2:0], B[2:0]} with load enable;
//   * precompute_enable - g1 = A3.B3', g2 = A3'.B3, load enable =
//                 NOR(g1, g2) = XNOR(A3, B3), computed from the live MSBs;
//   * mag_comparator - the cascadable comparator, fed from the registers.
// If A3 != B3 at a clock edge, the lower register keeps its old value; in
// the next cycle the registered MSBs differ, so the comparator's outputs
// depend only on them and the stale lower bits change nothing - but they
// do not toggle either, which is where switching power is saved.
//
// Timing: a and b are sampled on the rising edge of clk; the outputs are
// combinational from the registers and are valid one clock later. The
// cascade inputs are not registered: they act combinationally in the cycle
// they are applied, as in the reference block diagram. Ports are the eight
// operand bits, three cascade inputs, the clock and three outputs; there
// is no reset, so the outputs are meaningful from the first edge after
// valid operands are applied.
//
// What follows the reference design: the split into a 2-bit and a 6-bit
// register, the XNOR load enable and the unregistered cascade inputs. This
// design's choices: the rising edge, no reset, and the WIDTH parameter
// (always pre-computing on the single most significant bit).
module precomp_comparator #(
  parameter int unsigned WIDTH = mag_cmp_pkg::CMP_WIDTH
) (
  input  logic             clk,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             agtbin,
  input  logic             altbin,
  input  logic             aeqbin,
  output logic             agtbout,
  output logic             altbout,
  output logic             aeqbout
);

  localparam int unsigned LW = WIDTH - 1;   // width of each gated slice

  logic            g1, g2, load_en;
  logic [1:0]      msb_q;                   // {A3, B3} registered
  logic [2*LW-1:0] lsb_q;                   // {A[2:0], B[2:0]} registered

  precompute_enable u_enable (
    .a_msb   (a[WIDTH-1]),
    .b_msb   (b[WIDTH-1]),
    .g1      (g1),
    .g2      (g2),
    .load_en (load_en)
  );

  msb_reg #(.WIDTH(2)) u_msb_reg (
    .clk (clk),
    .d   ({a[WIDTH-1], b[WIDTH-1]}),
    .q   (msb_q)
  );

  lsb_reg #(.WIDTH(2 * LW)) u_lsb_reg (
    .clk (clk),
    .en  (load_en),
    .d   ({a[LW-1:0], b[LW-1:0]}),
    .q   (lsb_q)
  );

  mag_comparator #(.WIDTH(WIDTH)) u_cmp (
    .a       ({msb_q[1], lsb_q[2*LW-1:LW]}),
    .b       ({msb_q[0], lsb_q[LW-1:0]}),
    .agtbin  (agtbin),
    .altbin  (altbin),
    .aeqbin  (aeqbin),
    .agtbout (agtbout),
    .altbout (altbout),
    .aeqbout (aeqbout)
  );

  // Predictors never fire together, and a predicted cycle holds the
  // lower-bit register.
  a_pred_exclusive : assert property (@(posedge clk) !(g1 && g2));
  a_hold_lsb       : assert property (@(posedge clk) !load_en |=> $stable(lsb_q));
  // When the registered MSBs differ they alone decide the outputs.
  a_msb_decides    : assert property (@(posedge clk)
    (msb_q[1] != msb_q[0]) |-> (agtbout == msb_q[1] && altbout == msb_q[0] && !aeqbout));

endmodule
