// tb_wdt_top_full: the watchdog at its default sizes through one complete
// life cycle.
//
// The top is instantiated with every parameter at its default (50 MHz
// SYSCLK: SWCLK every 1000 cycles, FWCLK every 50000 cycles, 10 us unlock
// timing, 1 ms reset delay). The processor model selects the shortest
// windows (service window 10 SWCLK periods = 10000 cycles, frame window 15
// FWCLK periods = 750000 cycles), initialises the watchdog, runs three
// frames of 300000 cycles, then misses a service: the frame window must
// expire exactly 750000 + 3 cycles after the last service and RSTOUT must
// follow 50000 cycles later for 50 cycles. It then re-initialises, services
// outside the window (FLSTAT = service outside), re-initialises and leaves
// WDSRVC high into the next window (FLSTAT = falling edge inside), unlocks
// the lengths with the second pattern 500 cycles after the first, and
// checks the new service window length of 25 SWCLK periods.
module tb_wdt_top_full;
  import wdt_pkg::*;

  localparam int FRAME = 300000;  // INIT period, cycles

  logic  sysclk, sysreset_n;
  logic  enable, rd_wr, dbus_oe, init, wdfail, rstout;
  addr_t abus;
  data_t dbus_i, dbus_o;
  int    checks = 0, failures = 0;

  initial sysclk = 1'b0;
  always #10 sysclk = ~sysclk;   // 50 MHz with 1 ns units

  wdt_top dut (
    .sysclk(sysclk), .sysreset_n(sysreset_n), .enable(enable), .rd_wr(rd_wr),
    .abus(abus), .dbus_i(dbus_i), .dbus_o(dbus_o), .dbus_oe(dbus_oe),
    .init(init), .wdfail(wdfail), .rstout(rstout)
  );

  wdt_cpu_model cpu (
    .clk(sysclk), .enable(enable), .rd_wr(rd_wr), .abus(abus),
    .dbus_i(dbus_i), .dbus_o(dbus_o), .dbus_oe(dbus_oe), .init(init)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at cycle %0d", what, cpu.cycle);
    end
  endtask

  // WDFAIL / RSTOUT edge times
  longint fail_rise, rst_rise, rst_fall;
  logic   wdfail_q, rstout_q;
  initial begin
    wdfail_q = 1'b1; rstout_q = 1'b0;
    fail_rise = 0; rst_rise = 0; rst_fall = 0;
    forever begin
      @(negedge sysclk);
      if (wdfail && !wdfail_q) fail_rise = cpu.cycle;
      if (rstout && !rstout_q) rst_rise = cpu.cycle;
      if (!rstout && rstout_q) rst_fall = cpu.cycle;
      wdfail_q = wdfail;
      rstout_q = rstout;
    end
  end

  longint svc_cycle;

  task automatic initialise();
    bit ok;
    cpu.set_wdsrvc(1'b0);
    cpu.set_wdrst(1'b0);
    cpu.set_wdrst(1'b1);
    cpu.pulse_init();
    cpu.wait_window_open(100, ok);
    check(ok && wdfail, "window open, still failed");
    cpu.set_wdsrvc(1'b1);
    svc_cycle = cpu.last_write;
    @(negedge sysclk);
    check(!wdfail, "initialised");
    cpu.set_wdsrvc(1'b0);
  endtask

  task automatic good_frame();
    bit ok;
    repeat (FRAME - 100) @(negedge sysclk);
    cpu.pulse_init();
    cpu.wait_window_open(100, ok);
    repeat (5000) @(negedge sysclk);   // half-way into the window
    cpu.set_wdsrvc(1'b1);
    svc_cycle = cpu.last_write;
    cpu.set_wdsrvc(1'b0);
    check(!wdfail, "frame serviced");
  endtask

  initial begin
    repeat (8000000) @(posedge sysclk);
    failures++;
    $display("FAIL watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    data_t d;
    int wlen;
    bit ok;
    sysreset_n = 1'b0;
    repeat (3) @(negedge sysclk);
    sysreset_n = 1'b1;
    cpu.set_lengths(2'd0, 2'd0);

    // window length at the default sizes
    cpu.set_wdrst(1'b1);
    cpu.pulse_init();
    cpu.measure_window(wlen);
    check(wlen == 10000, $sformatf("service window %0d cycles", wlen));

    initialise();
    for (int f = 0; f < 3; f++) good_frame();

    // missed service: frame expiry and delayed reset
    repeat (FRAME - 100) @(negedge sysclk);
    cpu.pulse_init();
    while (!wdfail) @(negedge sysclk);
    check(fail_rise - svc_cycle == 750003,
          $sformatf("frame expiry after %0d cycles", fail_rise - svc_cycle));
    @(negedge sysclk);
    cpu.read(ADDR_CONFIG, d);
    check(fail_mode_e'(d[CFG_FLSTAT_LSB +: 2]) == FL_FRAME_EXP, "FLSTAT frame expiry");
    while (!rstout) @(negedge sysclk);
    while (rstout) @(negedge sysclk);
    check(rst_rise - fail_rise == 50000, $sformatf("RSTOUT delay %0d", rst_rise - fail_rise));
    check(rst_fall - rst_rise == 50, $sformatf("RSTOUT width %0d", rst_fall - rst_rise));

    // service outside the window
    initialise();
    repeat (20000) @(negedge sysclk);
    cpu.set_wdsrvc(1'b1);
    repeat (3) @(negedge sysclk);
    check(wdfail, "service outside the window fails");
    @(negedge sysclk);
    cpu.read(ADDR_CONFIG, d);
    check(fail_mode_e'(d[CFG_FLSTAT_LSB +: 2]) == FL_SRVC_OUTSIDE, "FLSTAT outside");

    // WDSRVC left high after a service falls inside the next window
    cpu.set_wdsrvc(1'b0);
    initialise();
    repeat (FRAME - 100) @(negedge sysclk);
    cpu.pulse_init();
    cpu.wait_window_open(100, ok);
    cpu.set_wdsrvc(1'b1);
    repeat (FRAME - 100) @(negedge sysclk);
    cpu.pulse_init();
    cpu.wait_window_open(100, ok);
    check(!wdfail, "running until WDSRVC falls");
    cpu.set_wdsrvc(1'b0);
    repeat (3) @(negedge sysclk);
    check(wdfail, "WDSRVC falling inside the window fails");
    @(negedge sysclk);
    cpu.read(ADDR_CONFIG, d);
    check(fail_mode_e'(d[CFG_FLSTAT_LSB +: 2]) == FL_FALL_INSIDE, "FLSTAT falling edge");

    // unlock with the second pattern 500 cycles (10 us) after the first
    cpu.write(ADDR_UNLOCK, UNLOCK_PAT1);
    repeat (498) @(negedge sysclk);
    cpu.write(ADDR_UNLOCK, UNLOCK_PAT2);
    cpu.set_lengths(2'd0, 2'd1);
    @(negedge sysclk);
    cpu.read(ADDR_CONFIG, d);
    check(d[3:2] == 2'd1, "SWLEN changed after unlock");
    cpu.set_wdsrvc(1'b0);
    cpu.set_wdrst(1'b0);
    cpu.set_wdrst(1'b1);
    cpu.pulse_init();
    cpu.measure_window(wlen);
    check(wlen == 25000, $sformatf("new service window %0d cycles", wlen));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
