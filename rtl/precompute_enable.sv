// Predictor logic and load enable of the pre-computation comparator.
//
// The predictors look only at the operand MSBs:
//   g1 = A3.B3'   (g1 = 1 implies A>B whatever the lower bits are)
//   g2 = A3'.B3   (g2 = 1 implies A<B, i.e. the A>B output is 0)
// The load enable of the lower-bit register is NOR(g1, g2), which is the
// single XNOR gate XNOR(A3, B3): the lower bits are loaded only when the
// MSBs are equal and the lower bits are actually needed. g1 and g2 are
// never 1 together. Purely combinational; it sees the unregistered MSBs so
// that its enable acts at the same clock edge that loads them.
module precompute_enable (
  input  logic a_msb,     // A3
  input  logic b_msb,     // B3
  output logic g1,        // predicts A>B
  output logic g2,        // predicts A<B
  output logic load_en    // load enable of the lower-bit register
);

  always_comb begin
    g1      = a_msb & ~b_msb;
    g2      = ~a_msb & b_msb;
    load_en = ~(g1 | g2);
  end

endmodule
