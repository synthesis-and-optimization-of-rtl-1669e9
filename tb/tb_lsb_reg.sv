// Self-checking testbench for lsb_reg: random data and random load enable
// every clock. A reference copy loads d only when en was 1 at the rising
// edge; q must match it after every edge.
module tb_lsb_reg;
  logic       clk = 1'b0;
  logic       en;
  logic [5:0] d, q, model;
  int         checks = 0, failures = 0, holds = 0, loads = 0;

  lsb_reg dut (.clk(clk), .en(en), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 1'b1;
    d  = 6'h15;
    model = 6'h15;
    @(posedge clk);
    @(negedge clk);
    for (int n = 0; n < 300; n++) begin
      en = 1'($urandom);
      d  = 6'($urandom);
      if (en) begin model = d; loads++; end
      else holds++;
      @(posedge clk);
      #1;
      checks++;
      if (q !== model) begin
        failures++;
        $display("FAIL cycle %0d en=%b q=%h exp=%h", n, en, q, model);
      end
      @(negedge clk);
    end
    checks++;
    if (holds == 0 || loads == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
