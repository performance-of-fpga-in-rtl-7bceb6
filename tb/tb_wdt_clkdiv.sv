// tb_wdt_clkdiv: self-checking test of the window clock divider.
//
// Runs the divider with small ratios and compares, every cycle, the four
// outputs against a reference made of two independent cycle counters
// started at reset release: a tick is expected every DIV cycles, the first
// DIV cycles after reset, and each derived clock must be high for DIV/2
// cycles starting with the tick. Also checks that every tick coincides with
// a rising edge of its square wave.
module tb_wdt_clkdiv;
  localparam int unsigned SW_DIV = 5;
  localparam int unsigned FW_DIV = 12;

  logic clk = 1'b0, rst_n = 1'b0;
  logic swclk, sw_tick, fwclk, fw_tick;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  wdt_clkdiv #(.SW_DIV(SW_DIV), .FW_DIV(FW_DIV)) dut (
    .clk(clk), .rst_n(rst_n), .swclk(swclk), .sw_tick(sw_tick),
    .fwclk(fwclk), .fw_tick(fw_tick)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;            // cycles since reset release, at the sampling point
    int sw_ticks = 0, fw_ticks = 0;
    logic swclk_q, fwclk_q;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    swclk_q = 1'b0;
    fwclk_q = 1'b0;
    n = 0;
    for (int i = 0; i < 600; i++) begin
      @(negedge clk);
      n++;
      // reference: tick after every DIV-th rising clock edge since reset
      check(sw_tick == (n % SW_DIV == 0), "sw_tick period");
      check(fw_tick == (n % FW_DIV == 0), "fw_tick period");
      check(swclk == ((n % SW_DIV) < SW_DIV / 2 && n >= SW_DIV), "swclk duty");
      check(fwclk == ((n % FW_DIV) < FW_DIV / 2 && n >= FW_DIV), "fwclk duty");
      if (sw_tick) begin
        sw_ticks++;
        check(swclk && !swclk_q, "sw_tick on swclk rising edge");
      end
      if (fw_tick) begin
        fw_ticks++;
        check(fwclk && !fwclk_q, "fw_tick on fwclk rising edge");
      end
      swclk_q = swclk;
      fwclk_q = fwclk;
    end
    check(sw_ticks == 600 / SW_DIV, "number of SWCLK edges");
    check(fw_ticks == 600 / FW_DIV, "number of FWCLK edges");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
