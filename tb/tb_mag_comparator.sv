// Self-checking testbench for mag_comparator: every 4-bit operand pair with
// every setting of the three cascade inputs (2^11 vectors). The expected
// outputs come from integer comparison of the operands:
//   agtbout = (A>B) | (A==B & agtbin), altbout = (A<B) | (A==B & altbin),
//   aeqbout = (A==B) & aeqbin.
// Also checks that a one-hot cascade input gives exactly one output high.
module tb_mag_comparator;
  localparam int W = 4;
  logic [W-1:0] a, b;
  logic gin, lin, ein, gout, lout, eout;
  int   checks = 0, failures = 0;

  mag_comparator dut (
    .a(a), .b(b), .agtbin(gin), .altbin(lin), .aeqbin(ein),
    .agtbout(gout), .altbout(lout), .aeqbout(eout)
  );

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic eg, el, ee;
    for (int v = 0; v < (1 << (2 * W + 3)); v++) begin
      {gin, lin, ein, a, b} = (2 * W + 3)'(v);
      #1;
      eg = (a > b) || ((a == b) && gin);
      el = (a < b) || ((a == b) && lin);
      ee = (a == b) && ein;
      checks++;
      if ({gout, lout, eout} !== {eg, el, ee}) begin
        failures++;
        $display("FAIL a=%h b=%h casc=%b%b%b got %b%b%b exp %b%b%b",
                 a, b, gin, lin, ein, gout, lout, eout, eg, el, ee);
      end
      if ($onehot({gin, lin, ein})) begin
        checks++;
        if (!$onehot({gout, lout, eout})) begin
          failures++;
          $display("FAIL one-hot a=%h b=%h", a, b);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
