// Switching-activity testbench for the pre-computation comparator.
//
// Drives precomp_comparator with a stream of uniformly random 4-bit operand
// pairs, one per clock, and counts bit toggles on the lower operand bits
// (A[2:0], B[2:0]) at two places: at the primary inputs, which is what a
// plain registered comparator would see, and at the comparator core inside
// the pre-computation design, after the gated register. A reference model
// of the gated register (load only when A3 == B3) predicts the second count
// exactly. Checks: every result is correct one clock after its operands,
// the measured core toggles equal the model's, and they are fewer than the
// ungated toggles (with random data the MSBs differ about half the time, so
// the reduction should be roughly one half). The counts are printed.
module tb_precomp_activity;
  localparam int W = 4;
  localparam int NCYC = 2000;

  logic         clk = 1'b0;
  logic [W-1:0] a, b;
  logic         gout, lout, eout;
  logic [5:0]   prev_in, model, prev_model, prev_core, core;
  int           checks = 0, failures = 0;
  int           tog_in = 0, tog_model = 0, tog_core = 0, held = 0;

  precomp_comparator dut (
    .clk(clk), .a(a), .b(b), .agtbin(1'b0), .altbin(1'b0), .aeqbin(1'b1),
    .agtbout(gout), .altbout(lout), .aeqbout(eout)
  );

  assign core = {dut.u_cmp.a[W-2:0], dut.u_cmp.b[W-2:0]};

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (NCYC + 50) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = '0; b = '0;
    @(posedge clk);                 // A3 == B3: core loads zeros
    @(negedge clk);
    prev_in = '0; model = '0; prev_core = core;
    for (int n = 0; n < NCYC; n++) begin
      a = W'($urandom);
      b = W'($urandom);
      tog_in += $countones({a[W-2:0], b[W-2:0]} ^ prev_in);
      prev_in = {a[W-2:0], b[W-2:0]};
      prev_model = model;
      if (a[W-1] == b[W-1]) model = {a[W-2:0], b[W-2:0]};
      else held++;
      tog_model += $countones(model ^ prev_model);
      @(posedge clk);
      #1;
      tog_core += $countones(core ^ prev_core);
      prev_core = core;
      checks++;
      if ({gout, lout, eout} !== {a > b, a < b, a == b}) begin
        failures++;
        $display("FAIL a=%h b=%h got %b%b%b", a, b, gout, lout, eout);
      end
      @(negedge clk);
    end
    $display("cycles %0d, lower bits held in %0d", NCYC, held);
    $display("lower-bit toggles: ungated inputs %0d, comparator core %0d (model %0d)",
             tog_in, tog_core, tog_model);
    checks++;
    if (tog_core != tog_model) begin
      failures++;
      $display("FAIL core toggles differ from the gated-register model");
    end
    checks++;
    if (!(tog_core < tog_in) || held == 0) begin
      failures++;
      $display("FAIL no reduction in switching activity");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
