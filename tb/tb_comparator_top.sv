// End-to-end testbench for comparator_top at its default size (4 bits).
//
// Runs all 2^11 input vectors (A, B and the three cascade inputs) through
// both halves, one vector per clock in a shuffled order:
//   * the BDD comparator is checked combinationally, 1 time unit after the
//     vector is applied;
//   * the pre-computation comparator is checked after the rising edge that
//     samples the vector (one-clock latency), and also just before that
//     edge, when it must still show the previous operands.
// Expected values come from integer comparison:
//   agtbout = A>B | A==B & agtbin, altbout = A<B | A==B & altbin,
//   aeqbout = A==B & aeqbin.
// Mechanisms counted, each of which must occur at least once: cycles in
// which the pre-computation froze the lower operand bits (A3 != B3) and
// cycles in which it loaded them, vectors decided by the cascade inputs
// (A == B), and each of the outputs A>B, A<B, A=B being high on each half.
module tb_comparator_top;
  localparam int W = 4;
  localparam int NV = 1 << (2 * W + 3);

  logic         clk = 1'b0;
  logic [W-1:0] pc_a, pc_b, bdd_a, bdd_b, pa, pb;
  logic         pc_gin, pc_lin, pc_ein, pc_gout, pc_lout, pc_eout;
  logic         bdd_gin, bdd_lin, bdd_ein, bdd_gout, bdd_lout, bdd_eout;
  int           checks = 0, failures = 0;
  int           n_hold = 0, n_load = 0, n_casc = 0;
  int           n_pc [3] = '{0, 0, 0};
  int           n_bdd[3] = '{0, 0, 0};
  int           order[NV];

  comparator_top dut (
    .clk        (clk),
    .pc_a       (pc_a),     .pc_b       (pc_b),
    .pc_agtbin  (pc_gin),   .pc_altbin  (pc_lin),   .pc_aeqbin  (pc_ein),
    .pc_agtbout (pc_gout),  .pc_altbout (pc_lout),  .pc_aeqbout (pc_eout),
    .bdd_a      (bdd_a),    .bdd_b      (bdd_b),
    .bdd_agtbin (bdd_gin),  .bdd_altbin (bdd_lin),  .bdd_aeqbin (bdd_ein),
    .bdd_agtbout(bdd_gout), .bdd_altbout(bdd_lout), .bdd_aeqbout(bdd_eout)
  );

  always #5 clk = ~clk;

  function automatic logic [2:0] expect_out(logic [W-1:0] x, logic [W-1:0] y,
                                            logic g, logic l, logic e);
    return {(x > y) || ((x == y) && g), (x < y) || ((x == y) && l), (x == y) && e};
  endfunction

  task automatic check(string what, logic [2:0] got, logic [2:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got %b exp %b", what, got, exp);
    end
  endtask

  initial begin : watchdog
    repeat (NV + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < NV; i++) order[i] = i;
    for (int i = NV - 1; i > 0; i--) begin
      int j, t;
      j = int'($urandom_range(i, 0));
      t = order[i]; order[i] = order[j]; order[j] = t;
    end
    pc_a = '0; pc_b = '0; {pc_gin, pc_lin, pc_ein} = 3'b001;
    bdd_a = '0; bdd_b = '0; {bdd_gin, bdd_lin, bdd_ein} = 3'b001;
    @(posedge clk);
    @(negedge clk);
    pa = pc_a; pb = pc_b;
    for (int n = 0; n < NV; n++) begin
      logic [2*W+2:0] v;
      v = (2 * W + 3)'(order[n]);
      {pc_gin, pc_lin, pc_ein, pc_a, pc_b} = v;
      {bdd_gin, bdd_lin, bdd_ein, bdd_a, bdd_b} = v;
      #1;
      // BDD half: combinational.
      check($sformatf("bdd a=%h b=%h", bdd_a, bdd_b), {bdd_gout, bdd_lout, bdd_eout},
            expect_out(bdd_a, bdd_b, bdd_gin, bdd_lin, bdd_ein));
      for (int k = 0; k < 3; k++) if ({bdd_gout, bdd_lout, bdd_eout}[2-k]) n_bdd[k]++;
      // Pre-computation half: new operands not yet sampled.
      check($sformatf("pc latency a=%h b=%h", pa, pb), {pc_gout, pc_lout, pc_eout},
            expect_out(pa, pb, pc_gin, pc_lin, pc_ein));
      if (pc_a[W-1] != pc_b[W-1]) n_hold++; else n_load++;
      if (pc_a == pc_b) n_casc++;
      @(posedge clk);
      #1;
      check($sformatf("pc a=%h b=%h", pc_a, pc_b), {pc_gout, pc_lout, pc_eout},
            expect_out(pc_a, pc_b, pc_gin, pc_lin, pc_ein));
      for (int k = 0; k < 3; k++) if ({pc_gout, pc_lout, pc_eout}[2-k]) n_pc[k]++;
      @(negedge clk);
      pa = pc_a; pb = pc_b;
    end
    $display("pre-computation: lower bits held %0d, loaded %0d", n_hold, n_load);
    $display("cascade-decided vectors (A == B): %0d", n_casc);
    $display("pc  outputs high: gt %0d lt %0d eq %0d", n_pc[0], n_pc[1], n_pc[2]);
    $display("bdd outputs high: gt %0d lt %0d eq %0d", n_bdd[0], n_bdd[1], n_bdd[2]);
    checks++;
    if (n_hold == 0 || n_load == 0 || n_casc == 0) failures++;
    for (int k = 0; k < 3; k++) begin
      checks++;
      if (n_pc[k] == 0 || n_bdd[k] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
