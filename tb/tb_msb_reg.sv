// Self-checking testbench for msb_reg: random data every clock; q must
// equal the value applied before the last rising edge (one-cycle latency)
// and must not change between edges.
module tb_msb_reg;
  logic       clk = 1'b0;
  logic [1:0] d, q, exp_q;
  int         checks = 0, failures = 0;

  msb_reg dut (.clk(clk), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = 2'b00;
    @(negedge clk);
    for (int n = 0; n < 200; n++) begin
      d = 2'($urandom);
      exp_q = d;
      @(posedge clk);
      #1;
      checks++;
      if (q !== exp_q) begin
        failures++;
        $display("FAIL cycle %0d q=%b exp=%b", n, q, exp_q);
      end
      @(negedge clk);
      d = ~d;               // change d between edges: q must hold
      #1;
      checks++;
      if (q !== exp_q) begin
        failures++;
        $display("FAIL hold cycle %0d q=%b exp=%b", n, q, exp_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
