// tb_wdt_top: end-to-end test of the windowed watchdog with short windows.
//
// A processor model (wdt_cpu_model) initialises and services the watchdog
// over its register bus and INIT pin, and then commits each fault the
// watchdog is built to catch. The test counts how often each mechanism
// happened and fails if one never did:
//   init_discard   an initialisation discarded (service outside the window
//                  before it opened, or window closed without a service)
//   frame_ok       a frame serviced correctly inside its service window
//   fail_frame     missed service window, then frame window expiry
//   fail_outside   service outside the service window
//   fail_double    two services in a row
//   fail_fall      WDSRVC still high, falling edge inside the next window
//   rst_pulse      RSTOUT pulse after a failure
//   lock_held      length write ignored while locked
//   unlock_ok      0xAAAA/0x5555 unlock followed by a length change
//   unlock_late    second pattern too late, lengths stay locked
//   sysreset       SYSRESET forcing WDFAIL high and RSTOUT low
// Timing checks: the service window is open exactly SWLEN*SW_DIV cycles;
// WDFAIL rises exactly FWLEN*FW_DIV + 3 cycles after the write of the last
// accepted service when the frame window runs out (3 cycles: register
// write, edge detection, expiry pulse); a service outside the window raises
// WDFAIL 2 cycles after its write; RSTOUT rises RST_DELAY cycles after
// WDFAIL and lasts RST_PULSE cycles; no RSTOUT follows the power-up WDFAIL.
module tb_wdt_top;
  import wdt_pkg::*;

  localparam int unsigned SW_DIV    = 8;
  localparam int unsigned FW_DIV    = 16;
  localparam len_tab_t    SW_TAB    = {16'd6, 16'd5, 16'd4, 16'd3};
  localparam len_tab_t    FW_TAB    = {16'd12, 16'd10, 16'd8, 16'd6};
  localparam int unsigned UNLOCK    = 20;
  localparam int unsigned RST_DELAY = 30;
  localparam int unsigned RST_PULSE = 4;
  localparam int          FRAME     = 100;   // INIT period, cycles

  logic  sysclk, sysreset_n;
  logic  enable, rd_wr, dbus_oe, init, wdfail, rstout;
  addr_t abus;
  data_t dbus_i, dbus_o;
  int    checks = 0, failures = 0;

  // mechanism counters
  int init_discard = 0, frame_ok = 0, fail_frame = 0, fail_outside = 0;
  int fail_double = 0, fail_fall = 0, rst_pulse = 0, lock_held = 0;
  int unlock_ok = 0, unlock_late = 0, sysreset = 0;

  initial sysclk = 1'b0;
  always #5 sysclk = ~sysclk;

  wdt_top #(
    .SW_DIV(SW_DIV), .FW_DIV(FW_DIV), .SW_LEN_TAB(SW_TAB), .FW_LEN_TAB(FW_TAB),
    .UNLOCK_CYCLES(UNLOCK), .RST_DELAY(RST_DELAY), .RST_PULSE(RST_PULSE)
  ) dut (
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

  // ---- output monitor: WDFAIL and RSTOUT edges --------------------------
  longint fail_rise, rst_rise;
  logic   wdfail_q, rstout_q;
  bit     expect_reset;   // a RSTOUT pulse is allowed
  longint svc_cycle;      // cycle of the write of the last accepted service

  initial begin
    wdfail_q = 1'b1; rstout_q = 1'b0; fail_rise = 0; rst_rise = 0;
    expect_reset = 1'b0;
    forever begin
      @(negedge sysclk);
      if (sysreset_n) begin
        if (wdfail && !wdfail_q) fail_rise = cpu.cycle;
        if (rstout && !rstout_q) begin
          rst_rise = cpu.cycle;
          check(expect_reset, "RSTOUT only after a failure in operation");
          check(rst_rise - fail_rise == longint'(RST_DELAY),
                $sformatf("RSTOUT delay %0d", rst_rise - fail_rise));
        end
        if (!rstout && rstout_q) begin
          rst_pulse++;
          check(cpu.cycle - rst_rise == longint'(RST_PULSE),
                $sformatf("RSTOUT width %0d", cpu.cycle - rst_rise));
        end
      end
      wdfail_q = wdfail;
      rstout_q = rstout;
    end
  end

  // ---- helpers -----------------------------------------------------------
  task automatic read_cfg(output data_t d);
    @(negedge sysclk);
    cpu.read(ADDR_CONFIG, d);
  endtask

  // WDRST low-high, INIT, service inside the window: watchdog running
  task automatic initialise();
    bit ok;
    cpu.set_wdsrvc(1'b0);
    cpu.set_wdrst(1'b0);
    cpu.set_wdrst(1'b1);
    cpu.pulse_init();
    cpu.wait_window_open(100, ok);
    check(ok, "service window opens during initialisation");
    check(wdfail, "WDFAIL high before the first service");
    cpu.set_wdsrvc(1'b1);
    svc_cycle = cpu.last_write;
    @(negedge sysclk);
    check(!wdfail, "WDFAIL low after initialisation");
    cpu.set_wdsrvc(1'b0);
  endtask

  // one frame: wait, INIT, service at a random point inside the window
  task automatic good_frame();
    bit ok;
    int wlen;
    repeat (FRAME - 40) @(negedge sysclk);
    cpu.pulse_init();
    cpu.wait_window_open(100, ok);
    wlen = int'(SW_TAB[cpu.swlen]) * SW_DIV;
    repeat ($urandom % (wlen - 4)) @(negedge sysclk);
    cpu.set_wdsrvc(1'b1);
    svc_cycle = cpu.last_write;
    cpu.set_wdsrvc(1'b0);
    check(!wdfail, "no failure after a correct service");
    if (!wdfail) frame_ok++;
  endtask

  // wait for a failure and its reset pulse; check the logged mode
  task automatic expect_failure(input fail_mode_e mode, input string what);
    data_t d;
    int n = 0;
    while (!wdfail && n < 100000) begin @(negedge sysclk); n++; end
    read_cfg(d);
    check(d[CFG_WDFAIL] == 1'b1, {what, ": WDFAIL in register"});
    check(fail_mode_e'(d[CFG_FLSTAT_LSB +: 2]) == mode,
          $sformatf("%s: FLSTAT %0d", what, d[CFG_FLSTAT_LSB +: 2]));
    n = 0;
    while (!rstout && n < 1000) begin @(negedge sysclk); n++; end
    while (rstout) @(negedge sysclk);
  endtask

  initial begin
    repeat (200000) @(posedge sysclk);
    failures++;
    $display("FAIL watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    data_t d;
    bit ok;
    int wlen, seen;
    longint t_srv;

    sysreset_n = 1'b0;
    repeat (3) @(negedge sysclk);
    check(wdfail && !rstout, "outputs during SYSRESET");
    sysreset_n = 1'b1;
    read_cfg(d);
    check(d[CFG_WDFAIL] && d[CFG_INIT], "power-up: failed, INIT idle high");

    // select the lengths (this first write locks them)
    cpu.set_lengths(2'd1, 2'd1);
    read_cfg(d);
    check(d[1:0] == 2'd1 && d[3:2] == 2'd1, "lengths selected");

    // --- discarded initialisations ---------------------------------------
    cpu.set_wdrst(1'b1);
    cpu.set_wdsrvc(1'b1);               // service with no window open
    check(wdfail, "service outside window keeps WDFAIL");
    cpu.set_wdsrvc(1'b0);
    cpu.pulse_init();
    cpu.measure_window(wlen);           // armed state was discarded
    check(wlen == int'(SW_TAB[1]) * SW_DIV, $sformatf("service window length %0d", wlen));
    check(wdfail, "still failed after an unserviced window");
    if (wdfail) init_discard++;
    cpu.set_wdrst(1'b0);
    cpu.set_wdrst(1'b1);
    cpu.pulse_init();
    cpu.measure_window(wlen);           // window closes without a service
    check(wdfail, "window closed without a service: still failed");
    if (wdfail) init_discard++;
    repeat (RST_DELAY + 10) @(negedge sysclk);

    // --- correct operation -----------------------------------------------
    initialise();
    expect_reset = 1'b1;
    for (int f = 0; f < 6; f++) good_frame();

    // --- missed service, frame window expiry -----------------------------
    t_srv = svc_cycle;
    repeat (FRAME - 40) @(negedge sysclk);
    cpu.pulse_init();
    cpu.measure_window(wlen);
    read_cfg(d);
    check(d[CFG_SWSTAT_LSB + 1] && !wdfail, "missed window flagged, not yet failed");
    while (!wdfail) @(negedge sysclk);
    check(fail_rise - t_srv == longint'(FW_TAB[1]) * FW_DIV + 3,
          $sformatf("frame expiry %0d cycles after the service", fail_rise - t_srv));
    expect_failure(FL_FRAME_EXP, "frame expiry");
    fail_frame++;

    // --- service outside the service window ------------------------------
    initialise();
    good_frame();
    repeat (20) @(negedge sysclk);
    cpu.set_wdsrvc(1'b1);
    t_srv = cpu.last_write;
    expect_failure(FL_SRVC_OUTSIDE, "service outside window");
    check(fail_rise - t_srv == 2,
          $sformatf("WDFAIL %0d cycles after an outside service", fail_rise - t_srv));
    fail_outside++;

    // --- two successive services -----------------------------------------
    initialise();
    repeat (FRAME - 40) @(negedge sysclk);
    cpu.pulse_init();
    cpu.wait_window_open(100, ok);
    cpu.set_wdsrvc(1'b1);
    cpu.set_wdsrvc(1'b0);
    check(!wdfail, "first service accepted");
    cpu.set_wdsrvc(1'b1);
    expect_failure(FL_SRVC_OUTSIDE, "double service");
    fail_double++;

    // --- WDSRVC falling edge inside the window ---------------------------
    initialise();
    repeat (FRAME - 40) @(negedge sysclk);
    cpu.pulse_init();
    cpu.wait_window_open(100, ok);
    cpu.set_wdsrvc(1'b1);               // service, but WDSRVC left high
    repeat (FRAME - 40) @(negedge sysclk);
    cpu.pulse_init();
    cpu.wait_window_open(100, ok);
    check(!wdfail, "running until the falling edge");
    cpu.set_wdsrvc(1'b0);
    expect_failure(FL_FALL_INSIDE, "falling edge inside window");
    fail_fall++;

    // --- window length lock ----------------------------------------------
    cpu.set_lengths(2'd0, 2'd0);
    read_cfg(d);
    check(d[1:0] == 2'd1 && d[3:2] == 2'd1, "lengths locked");
    if (d[1:0] == 2'd1) lock_held++;
    cpu.write(ADDR_UNLOCK, UNLOCK_PAT1);
    repeat (UNLOCK + 2) @(negedge sysclk);
    cpu.write(ADDR_UNLOCK, UNLOCK_PAT2);
    cpu.set_lengths(2'd0, 2'd0);
    read_cfg(d);
    check(d[1:0] == 2'd1 && d[3:2] == 2'd1, "late second pattern: still locked");
    if (d[1:0] == 2'd1) unlock_late++;
    cpu.write(ADDR_UNLOCK, UNLOCK_PAT1);
    cpu.write(ADDR_UNLOCK, UNLOCK_PAT2);
    cpu.set_lengths(2'd0, 2'd0);
    read_cfg(d);
    check(d[1:0] == 2'd0 && d[3:2] == 2'd0, "lengths changed after unlock");
    if (d[1:0] == 2'd0) unlock_ok++;

    // the new lengths are used
    cpu.set_wdrst(1'b0);
    cpu.set_wdrst(1'b1);
    cpu.pulse_init();
    cpu.measure_window(wlen);
    check(wlen == int'(SW_TAB[0]) * SW_DIV, $sformatf("new service window length %0d", wlen));
    init_discard++;
    initialise();
    t_srv = svc_cycle;
    while (!wdfail) @(negedge sysclk);
    check(fail_rise - t_srv == longint'(FW_TAB[0]) * FW_DIV + 3,
          $sformatf("new frame length: expiry after %0d", fail_rise - t_srv));
    expect_failure(FL_FRAME_EXP, "frame expiry, new length");
    fail_frame++;

    // --- SYSRESET in operation -------------------------------------------
    initialise();
    good_frame();
    sysreset_n = 1'b0;
    expect_reset = 1'b0;
    seen = 0;
    repeat (RST_DELAY + 10) begin
      @(negedge sysclk);
      if (!wdfail || rstout) seen++;
    end
    check(seen == 0, "SYSRESET low: WDFAIL high, RSTOUT low");
    if (seen == 0) sysreset++;
    sysreset_n = 1'b1;
    repeat (3 * RST_DELAY) @(negedge sysclk);
    check(wdfail && !rstout, "after SYSRESET: failed, no reset pulse");

    // --- every mechanism must have happened -------------------------------
    check(init_discard > 0, "init_discard happened");
    check(frame_ok > 0, "frame_ok happened");
    check(fail_frame > 0, "fail_frame happened");
    check(fail_outside > 0, "fail_outside happened");
    check(fail_double > 0, "fail_double happened");
    check(fail_fall > 0, "fail_fall happened");
    check(rst_pulse >= 5, $sformatf("rst_pulse happened (%0d)", rst_pulse));
    check(lock_held > 0, "lock_held happened");
    check(unlock_ok > 0, "unlock_ok happened");
    check(unlock_late > 0, "unlock_late happened");
    check(sysreset > 0, "sysreset happened");
    $display("mechanisms: init_discard=%0d frame_ok=%0d fail_frame=%0d fail_outside=%0d fail_double=%0d fail_fall=%0d rst_pulse=%0d lock_held=%0d unlock_ok=%0d unlock_late=%0d sysreset=%0d",
             init_discard, frame_ok, fail_frame, fail_outside, fail_double,
             fail_fall, rst_pulse, lock_held, unlock_ok, unlock_late, sysreset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
