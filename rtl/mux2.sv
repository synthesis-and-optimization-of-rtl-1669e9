// 2x1 multiplexer: the single cell from which the BDD comparator is built.
//
// y follows a while the select s is 0 and b while s is 1, i.e.
// y = s'.a + s.b. In a binary decision diagram one node is one such
// multiplexer: s is the node's variable, a its 0-child and b its 1-child.
// Purely combinational, no state. Port names follow the usual drawing of
// the cell (inputs a and b on data legs 0 and 1, select s, output y).
module mux2 (
  input  logic a,   // data input selected when s = 0
  input  logic b,   // data input selected when s = 1
  input  logic s,   // select
  output logic y
);

  always_comb y = s ? b : a;

endmodule
