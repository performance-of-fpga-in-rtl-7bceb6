// tb_wdt_service_window: self-checking test of the service window.
//
// A reference SWCLK strobe is generated in the testbench every SW_DIV
// cycles. INIT is pulsed low at random phases relative to SWCLK and for each
// SWLEN setting the test checks that the window opens exactly 3 SYSCLK
// cycles after INIT falls (two synchroniser flops and the edge detector),
// stays open exactly SW_LEN_TAB[swlen]*SW_DIV cycles, and that "missed"
// pulses for one cycle right after. It also checks that a service or a
// cancel closes the window in the next cycle without "missed", that an INIT
// edge inside an open window is ignored, and that init_level follows INIT.
module tb_wdt_service_window;
  import wdt_pkg::*;

  localparam int unsigned SW_DIV = 8;
  localparam len_tab_t    TAB    = {16'd5, 16'd3, 16'd2, 16'd1};

  logic     clk, rst_n, init, sw_tick, service, cancel;
  len_sel_t swlen;
  logic     open, missed, init_level;
  win_len_t main_count;
  int       checks = 0, failures = 0;
  int       phase_cnt;

  initial clk = 1'b0;
  always #5 clk = ~clk;

  // reference derived-clock strobe
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase_cnt <= 0;
      sw_tick   <= 1'b0;
    end else begin
      phase_cnt <= (phase_cnt + 1) % SW_DIV;
      sw_tick   <= (phase_cnt == SW_DIV - 1);
    end
  end

  wdt_service_window #(.SW_DIV(SW_DIV), .SW_LEN_TAB(TAB)) dut (
    .clk(clk), .rst_n(rst_n), .init(init), .sw_tick(sw_tick), .swlen(swlen),
    .service(service), .cancel(cancel), .open(open), .missed(missed),
    .init_level(init_level), .main_count(main_count)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Pulse INIT low for 2 cycles (driven at a negedge); return the number of
  // rising clock edges until open is seen high.
  task automatic pulse_init(output int latency);
    @(negedge clk);
    init = 1'b0;
    latency = 0;
    while (!open && latency < 10) begin
      @(negedge clk);
      latency++;
      if (latency == 2) init = 1'b1;
    end
    if (init == 1'b0) init = 1'b1;
  endtask

  // Count cycles while open; return the length and whether missed pulsed
  // exactly once right after.
  task automatic measure(output int len, output int miss_pulses);
    len = 0;
    miss_pulses = 0;
    while (open && len < 100000) begin
      @(negedge clk);
      len++;
      if (missed) miss_pulses++;
    end
    repeat (3) begin
      @(negedge clk);
      if (missed) miss_pulses++;
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lat, len, mp;
    rst_n = 1'b0; init = 1'b1; service = 1'b0; cancel = 1'b0; swlen = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (5) @(negedge clk);
    check(!open && init_level, "idle after reset");

    // exact length for every setting, at many phases of SWCLK
    for (int s = 0; s < 4; s++) begin
      for (int p = 0; p < 2 * SW_DIV; p++) begin
        swlen = len_sel_t'(s);
        repeat (1 + ($urandom % SW_DIV)) @(negedge clk);
        pulse_init(lat);
        check(lat == 3, $sformatf("open latency %0d", lat));
        measure(len, mp);
        check(len == int'(TAB[s]) * SW_DIV,
              $sformatf("window length %0d for swlen %0d", len, s));
        check(mp == 1, "missed pulses once after expiry");
      end
    end

    // a service closes the window at once, without missed
    swlen = 2'd3;
    pulse_init(lat);
    repeat (7) @(negedge clk);
    check(open, "open before service");
    service = 1'b1;
    @(negedge clk);
    service = 1'b0;
    check(!open, "service closes window");
    measure(len, mp);
    check(mp == 0, "no missed after service");

    // cancel closes it too
    pulse_init(lat);
    repeat (4) @(negedge clk);
    cancel = 1'b1;
    @(negedge clk);
    cancel = 1'b0;
    check(!open, "cancel closes window");
    measure(len, mp);
    check(mp == 0, "no missed after cancel");

    // a second INIT edge inside the window does not restart it
    swlen = 2'd2;
    pulse_init(lat);
    len = 0;
    repeat (5) begin @(negedge clk); len++; end
    init = 1'b0;
    @(negedge clk); len++;
    @(negedge clk); len++;
    init = 1'b1;
    check(init_level == 1'b0, "init_level follows INIT");
    while (open) begin @(negedge clk); len++; end
    check(len == int'(TAB[2]) * SW_DIV, $sformatf("INIT ignored while open (%0d)", len));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
