// Self-checking testbench for precomp_comparator.
//
// Every (A, B) pair of 4-bit operands is applied, one pair per clock, in a
// shuffled order, each with a random cascade-input setting (mostly one-hot,
// sometimes arbitrary). Operands and cascade inputs change at the falling
// edge. Checks:
//   * one clock after the operands were applied, the outputs equal the
//     integer comparison of those operands combined with the current
//     cascade inputs (agtbout = A>B | A==B & agtbin, and so on);
//   * latency: right after new operands are applied, before the next
//     rising edge, the outputs still reflect the previous operands;
//   * pre-computation: when A3 != B3 at an edge, the lower-bit register
//     keeps its value (its contents are read hierarchically).
// Counts how often the lower bits were held and loaded; both must happen.
module tb_precomp_comparator;
  localparam int W = 4;
  logic         clk = 1'b0;
  logic [W-1:0] a, b, pa, pb;
  logic         gin, lin, ein, gout, lout, eout;
  logic [5:0]   lsb_before;
  int           checks = 0, failures = 0, holds = 0, loads = 0;
  int           order [256];

  precomp_comparator dut (
    .clk(clk), .a(a), .b(b), .agtbin(gin), .altbin(lin), .aeqbin(ein),
    .agtbout(gout), .altbout(lout), .aeqbout(eout)
  );

  always #5 clk = ~clk;

  function automatic logic [2:0] expect_out(logic [W-1:0] x, logic [W-1:0] y,
                                            logic g, logic l, logic e);
    return {(x > y) || ((x == y) && g), (x < y) || ((x == y) && l), (x == y) && e};
  endfunction

  task automatic check(string what, logic [W-1:0] x, logic [W-1:0] y);
    checks++;
    if ({gout, lout, eout} !== expect_out(x, y, gin, lin, ein)) begin
      failures++;
      $display("FAIL %s a=%h b=%h casc=%b%b%b got %b%b%b exp %b", what, x, y,
               gin, lin, ein, gout, lout, eout, expect_out(x, y, gin, lin, ein));
    end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) order[i] = i;
    for (int i = 255; i > 0; i--) begin
      int j, t;
      j = int'($urandom_range(i, 0));
      t = order[i]; order[i] = order[j]; order[j] = t;
    end
    // First operands: load everything (A3 == B3).
    a = 4'h0; b = 4'h0; {gin, lin, ein} = 3'b001;
    @(posedge clk);
    @(negedge clk);
    pa = a; pb = b;
    for (int n = 0; n < 256; n++) begin
      a = order[n][7:4];
      b = order[n][3:0];
      if (($urandom & 3) != 0) {gin, lin, ein} = 3'b001 << $urandom_range(2, 0);
      else                     {gin, lin, ein} = 3'($urandom);
      #1;
      check("latency", pa, pb);          // new operands not yet sampled
      lsb_before = dut.u_lsb_reg.q;
      @(posedge clk);
      #1;
      if (a[W-1] != b[W-1]) begin
        holds++;
        checks++;
        if (dut.u_lsb_reg.q !== lsb_before) begin
          failures++;
          $display("FAIL lower bits loaded although A3 != B3 (a=%h b=%h)", a, b);
        end
      end else begin
        loads++;
      end
      check("result", a, b);
      @(negedge clk);
      check("result@negedge", a, b);
      pa = a; pb = b;
    end
    checks++;
    if (holds == 0 || loads == 0) begin
      failures++;
      $display("FAIL holds=%0d loads=%0d", holds, loads);
    end
    $display("precomp: %0d cycles held the lower bits, %0d loaded them", holds, loads);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
