// Magnitude comparator realized as a network of 2x1 multiplexers, one per
// node of a reduced ordered binary decision diagram (BDD).
//
// Each output function (agtbout, altbout, aeqbout) is a chain of Shannon
// expansions f = x'.f|x=0 + x.f|x=1, and each expansion node is one mux2
// whose select is the node variable. The variable order is interleaved,
// most significant bit first: a3, b3, a2, b2, ..., a0, b0, and last the
// output's cascade input. For each output, with f_i the node realizing the
// less significant bits (f_0 = a node on the cascade input with children 0
// and 1), bit i adds three nodes:
//   lo_i   = mux(s=b_i, 0-child=f_i, 1-child=LO)   reached when a_i = 0
//   hi_i   = mux(s=b_i, 0-child=HI,  1-child=f_i)  reached when a_i = 1
//   f_i+1  = mux(s=a_i, 0-child=lo_i, 1-child=hi_i)
// where (LO, HI) = (0, 1) for A>B, (1, 0) for A<B and (0, 0) for A=B: the
// pair (a_i, b_i) = (0,1) or (1,0) settles the output, equal bits pass the
// decision down. Each output needs 3 nodes per bit plus one cascade node,
// 3*(3*WIDTH+1) = 39 multiplexers for WIDTH = 4. The three outputs do not
// share nodes because their sub-functions all differ.
//
// The function is the cascadable comparator's (see mag_comparator); the
// one-mux-per-BDD-node realization follows the reference design. The
// variable order, and hence the node count, is this design's: the reference
// design's BDD tool put all cascade inputs and A bits ahead of the B bits
// and reports 46 nodes; the interleaved order is the one a BDD reordering
// pass reaches for comparators and needs fewer nodes.
// Purely combinational; the depth is 2*WIDTH+1 multiplexers.
module bdd_comparator #(
  parameter int unsigned WIDTH = mag_cmp_pkg::CMP_WIDTH
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             agtbin,
  input  logic             altbin,
  input  logic             aeqbin,
  output logic             agtbout,
  output logic             altbout,
  output logic             aeqbout
);

  // Output index: 0 = A>B, 1 = A<B, 2 = A=B.
  localparam int unsigned NOUT = 3;
  // Terminal reached when (a_i, b_i) = (0, 1): only A<B is true.
  localparam logic [NOUT-1:0] LO_TERM = 3'b010;
  // Terminal reached when (a_i, b_i) = (1, 0): only A>B is true.
  localparam logic [NOUT-1:0] HI_TERM = 3'b001;

  logic [NOUT-1:0] casc_in;
  logic [NOUT-1:0] f  [WIDTH+1];   // f[i]: node realizing bits below i
  logic [NOUT-1:0] lo [WIDTH];
  logic [NOUT-1:0] hi [WIDTH];

  assign casc_in = {aeqbin, altbin, agtbin};

  for (genvar o = 0; o < NOUT; o++) begin : g_out
    // Terminal level: node on the cascade input with children 0 and 1.
    mux2 u_casc (.a(1'b0), .b(1'b1), .s(casc_in[o]), .y(f[0][o]));

    for (genvar i = 0; i < WIDTH; i++) begin : g_bit
      mux2 u_lo  (.a(f[i][o]),     .b(LO_TERM[o]), .s(b[i]), .y(lo[i][o]));
      mux2 u_hi  (.a(HI_TERM[o]),  .b(f[i][o]),    .s(b[i]), .y(hi[i][o]));
      mux2 u_top (.a(lo[i][o]),    .b(hi[i][o]),   .s(a[i]), .y(f[i+1][o]));
    end
  end

  assign agtbout = f[WIDTH][0];
  assign altbout = f[WIDTH][1];
  assign aeqbout = f[WIDTH][2];

endmodule
