// tb_v3cp_clock_divider: checks the 320 -> 40 MHz divider.
// The strobe must come every 8 fast cycles, `clk40` must be high for 4 of
// them and rise right after a strobe, and an `align` pulse must put the
// next strobe exactly 8 cycles after it, at random points of the period.
module tb_v3cp_clock_divider;
  logic clk = 1'b0, rst_n = 1'b0, align = 1'b0;
  logic ce40, clk40;
  int checks = 0, failures = 0;
  int cyc = 0;

  v3cp_clock_divider dut (.clk, .rst_n, .align, .ce40, .clk40);

  always #1.5625ns clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at cycle %0d", what, cyc); end
  endtask

  initial begin
    #100us;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int last_ce, high;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    // free-running period and duty cycle
    @(posedge clk iff ce40);
    last_ce = cyc;
    high = 0;
    repeat (40) begin
      @(posedge clk);
      if (clk40) high++;
      if (ce40) begin
        check(cyc - last_ce == 8, "ce40 period");
        check(high == 4, "clk40 duty");
        last_ce = cyc;
        high = 0;
      end
    end
    // clk40 rises in the cycle after a strobe
    @(posedge clk iff ce40);
    @(posedge clk);
    #0.1ns check(clk40 == 1'b1, "clk40 rises after strobe");
    // re-alignment at every offset
    for (int off = 0; off < 8; off++) begin
      int n, a;
      n = 1 + off + int'($urandom_range(0, 7));
      repeat (n) @(posedge clk);
      align <= 1'b1;
      @(posedge clk);
      a = cyc;
      align <= 1'b0;
      @(posedge clk iff ce40);
      check(cyc - a == 8, $sformatf("strobe after align offset %0d (got %0d)", off, cyc - a));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
