// Self-checking testbench for precompute_enable: all four MSB pairs.
// Expected: g1 = A3 & ~B3, g2 = ~A3 & B3, load_en = 1 exactly when A3 == B3;
// g1 and g2 are never both 1.
module tb_precompute_enable;
  logic a3, b3, g1, g2, en;
  int   checks = 0, failures = 0;

  precompute_enable dut (.a_msb(a3), .b_msb(b3), .g1(g1), .g2(g2), .load_en(en));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {a3, b3} = 2'(v);
      #1;
      checks++;
      if (g1 !== (a3 == 1'b1 && b3 == 1'b0) || g2 !== (a3 == 1'b0 && b3 == 1'b1)
          || en !== (a3 == b3) || (g1 && g2)) begin
        failures++;
        $display("FAIL a3=%b b3=%b g1=%b g2=%b en=%b", a3, b3, g1, g2, en);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
