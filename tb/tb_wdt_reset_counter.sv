// tb_wdt_reset_counter: self-checking test of the delayed reset output.
//
// Checks that the WDFAIL held high from power-up never produces RSTOUT,
// that the counter enables itself when WDFAIL first deasserts, that RSTOUT
// then rises exactly RST_DELAY cycles after each WDFAIL rising edge and
// stays high exactly RST_PULSE cycles, that a WDFAIL that deasserts before
// the delay ends cancels the reset, and that SYSRESET disables the counter
// again.
module tb_wdt_reset_counter;
  localparam int unsigned RST_DELAY = 9;
  localparam int unsigned RST_PULSE = 4;

  logic clk, rst_n, wdfail, rstout, enabled, busy;
  int   checks = 0, failures = 0;

  initial clk = 1'b0;
  always #5 clk = ~clk;

  wdt_reset_counter #(.RST_DELAY(RST_DELAY), .RST_PULSE(RST_PULSE)) dut (
    .clk(clk), .rst_n(rst_n), .wdfail(wdfail), .rstout(rstout),
    .enabled(enabled), .busy(busy)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // raise WDFAIL at a negedge and record when RSTOUT rises and for how long
  task automatic fail_and_measure(output int delay, output int width);
    wdfail = 1'b1;
    delay = 0;
    width = 0;
    while (!rstout && delay < 100) begin
      @(negedge clk);
      delay++;
    end
    while (rstout && width < 100) begin
      @(negedge clk);
      width++;
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int d, w, seen;
    rst_n = 1'b0; wdfail = 1'b1;
    repeat (2) @(negedge clk);
    #1 check(!rstout, "RSTOUT low in reset");
    rst_n = 1'b1;
    seen = 0;
    repeat (50) begin @(negedge clk); if (rstout) seen++; end
    check(seen == 0 && !enabled, "no reset at power-up");

    // first initialisation enables the counter
    wdfail = 1'b0;
    @(negedge clk);
    check(enabled, "enabled after first WDFAIL deassertion");
    for (int k = 0; k < 3; k++) begin
      repeat (5) @(negedge clk);
      fail_and_measure(d, w);
      check(d == RST_DELAY, $sformatf("RSTOUT delay %0d", d));
      check(w == RST_PULSE, $sformatf("RSTOUT width %0d", w));
      wdfail = 1'b0;
      @(negedge clk);
    end

    // WDFAIL gone again before the delay ends: no reset
    wdfail = 1'b1;
    repeat (RST_DELAY - 4) @(negedge clk);
    check(busy, "counting");
    wdfail = 1'b0;
    seen = 0;
    repeat (30) begin @(negedge clk); if (rstout) seen++; end
    check(seen == 0 && !busy, "cancelled count gives no reset");

    // SYSRESET disables the counter again
    rst_n = 1'b0;
    wdfail = 1'b1;
    @(negedge clk);
    rst_n = 1'b1;
    seen = 0;
    repeat (30) begin @(negedge clk); if (rstout) seen++; end
    check(seen == 0 && !enabled, "disabled again after SYSRESET");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
