// tb_clk_divide: self-checking test of the clock divider at its default
// (119, i.e. 119 MHz to 1 MHz) and at a small even and odd divisor.
// Checks: ce is one clock wide and comes exactly every DIV clocks, starting
// DIV-1 clocks after reset; clkout is high for DIV/2 clocks of each period.
module tb_clk_divide;

  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;

  always #4.2 clk = ~clk;   // 119 MHz

  logic ce_a, co_a, ce_b, co_b, ce_c, co_c;

  clk_divide             u_a (.clk, .rst_n, .ce(ce_a), .clkout(co_a));
  clk_divide #(.DIV(6))  u_b (.clk, .rst_n, .ce(ce_b), .clkout(co_b));
  clk_divide #(.DIV(7))  u_c (.clk, .rst_n, .ce(ce_c), .clkout(co_c));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Count clocks since reset and compare every enable and clkout sample with
  // the expected pattern: ce when (n mod DIV) == DIV-1, clkout when
  // (n mod DIV) < DIV/2, n = clocks since reset release.
  task automatic run(input int div, input int periods, ref logic ce, ref logic co);
    int n = 0, ces = 0, highs = 0;
    repeat (periods * div) begin
      @(negedge clk);
      check(ce == ((n % div) == div - 1), $sformatf("DIV=%0d ce at clock %0d", div, n));
      check(co == ((n % div) < div / 2), $sformatf("DIV=%0d clkout at clock %0d", div, n));
      ces += int'(ce);
      highs += int'(co);
      @(posedge clk);
      n++;
    end
    check(ces == periods, $sformatf("DIV=%0d: %0d enables in %0d periods", div, ces, periods));
    check(highs == periods * (div / 2), $sformatf("DIV=%0d: clkout high %0d clocks", div, highs));
  endtask

  initial begin
    fork
      run(119, 5, ce_a, co_a);
      run(6, 50, ce_b, co_b);
      run(7, 50, ce_c, co_c);
    join_none
    @(negedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    wait fork;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
