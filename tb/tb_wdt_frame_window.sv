// tb_wdt_frame_window: self-checking test of the frame window.
//
// A reference FWCLK strobe is generated every FW_DIV cycles. For every
// FWLEN setting and many start phases the test checks that "running" lasts
// exactly FW_LEN_TAB[fwlen]*FW_DIV cycles after a restart pulse and that
// "expired" pulses once right after. It also checks that a restart in the
// middle of a window times a full new window from the restart, and that a
// cancel stops the window without an expiry.
module tb_wdt_frame_window;
  import wdt_pkg::*;

  localparam int unsigned FW_DIV = 11;
  localparam len_tab_t    TAB    = {16'd6, 16'd4, 16'd2, 16'd1};

  logic     clk, rst_n, fw_tick, restart, cancel;
  len_sel_t fwlen;
  logic     running, expired;
  win_len_t main_count;
  int       checks = 0, failures = 0;
  int       phase_cnt;

  initial clk = 1'b0;
  always #5 clk = ~clk;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase_cnt <= 0;
      fw_tick   <= 1'b0;
    end else begin
      phase_cnt <= (phase_cnt + 1) % FW_DIV;
      fw_tick   <= (phase_cnt == FW_DIV - 1);
    end
  end

  wdt_frame_window #(.FW_DIV(FW_DIV), .FW_LEN_TAB(TAB)) dut (
    .clk(clk), .rst_n(rst_n), .fw_tick(fw_tick), .fwlen(fwlen),
    .restart(restart), .cancel(cancel), .running(running),
    .expired(expired), .main_count(main_count)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic do_restart();
    @(negedge clk);
    restart = 1'b1;
    @(negedge clk);
    restart = 1'b0;
  endtask

  // cycles of running from the current negedge; counts expiry pulses
  task automatic measure(output int len, output int exp_pulses);
    len = 0;
    exp_pulses = 0;
    while (running && len < 100000) begin
      @(negedge clk);
      len++;
      if (expired) exp_pulses++;
    end
    repeat (3) begin
      @(negedge clk);
      if (expired) exp_pulses++;
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
    int len, ep;
    rst_n = 1'b0; restart = 1'b0; cancel = 1'b0; fwlen = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (4) @(negedge clk);
    check(!running && !expired, "idle after reset");

    for (int s = 0; s < 4; s++) begin
      for (int p = 0; p < 2 * FW_DIV; p++) begin
        fwlen = len_sel_t'(s);
        repeat ($urandom % FW_DIV) @(negedge clk);
        do_restart();
        check(running, "running after restart");
        measure(len, ep);
        check(len == int'(TAB[s]) * FW_DIV,
              $sformatf("frame length %0d for fwlen %0d", len, s));
        check(ep == 1, "expired pulses once");
      end
    end

    // restart in the middle: a full window from the restart
    fwlen = 2'd2;
    do_restart();
    repeat (17) @(negedge clk);
    do_restart();
    measure(len, ep);
    check(len == int'(TAB[2]) * FW_DIV, $sformatf("restart mid-window (%0d)", len));
    check(ep == 1, "one expiry after a restarted window");

    // cancel
    do_restart();
    repeat (9) @(negedge clk);
    cancel = 1'b1;
    @(negedge clk);
    cancel = 1'b0;
    check(!running, "cancel stops the window");
    measure(len, ep);
    check(ep == 0, "no expiry after cancel");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
