// Self-checking testbench for mux2: applies all eight (a, b, s)
// combinations and checks y against s ? b : a worked out from the truth
// table y = s'.a + s.b.
module tb_mux2;
  logic a, b, s, y;
  int   checks = 0, failures = 0;

  mux2 dut (.a(a), .b(b), .s(s), .y(y));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {s, b, a} = 3'(v);
      #1;
      checks++;
      if (y !== ((~s & a) | (s & b))) begin
        failures++;
        $display("FAIL a=%b b=%b s=%b y=%b", a, b, s, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
