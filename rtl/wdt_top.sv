// wdt_top: configurable windowed watchdog timer.
//
// An external watchdog for a processor-based real-time system, clocked by
// its own SYSCLK. The processor pulses INIT low at the start of each frame,
// which opens a short service window; the software must service the
// watchdog (rising edge of the WDSRVC register bit) inside that window. A
// correct service closes the window and starts the frame window, which must
// not run out before the next correct service. Servicing too early, too late
// or twice, or leaving WDSRVC high into the next window, is a failure: the
// WDFAIL output is asserted, the failure mode is logged in FLSTAT and, after
// RST_DELAY cycles in which the software can save debug data, RSTOUT resets
// the processor. Out of reset the watchdog is failed until the software
// toggles WDRST and then services it inside a window.
//
// Blocks: bus interface and configuration register (wdt_regs), pattern
// comparator that locks the window lengths (wdt_unlock), frequency divider
// for the derived window clocks SWCLK/FWCLK (wdt_clkdiv), service window
// (wdt_service_window), frame window (wdt_frame_window), fault detection
// state machine (wdt_fault_fsm) and reset down counter (wdt_reset_counter).
// The block structure follows the original specification. Own choices: a single SYSCLK
// domain with the derived clocks used as clock enables, the bus split into
// dbus_i/dbus_o/dbus_oe, an active-low asynchronous SYSRESET, the register
// map, and all numeric defaults (50 MHz SYSCLK, 20 us SWCLK, 1 ms FWCLK,
// length tables, reset delay and pulse).
//
// While sysreset_n is low WDFAIL is high and RSTOUT low.
module wdt_top
  import wdt_pkg::*;
#(
  parameter int unsigned SW_DIV        = 1000,    // SYSCLK cycles per SWCLK period
  parameter int unsigned FW_DIV        = 50000,   // SYSCLK cycles per FWCLK period
  parameter len_tab_t    SW_LEN_TAB    = SW_LEN_TAB_DEF,
  parameter len_tab_t    FW_LEN_TAB    = FW_LEN_TAB_DEF,
  parameter int unsigned UNLOCK_CYCLES = 500,     // 10 us at 50 MHz
  parameter int unsigned RST_DELAY     = 50000,   // WDFAIL to RSTOUT, cycles
  parameter int unsigned RST_PULSE     = 50       // RSTOUT width, cycles
) (
  input  logic  sysclk,
  input  logic  sysreset_n,
  input  logic  enable,
  input  logic  rd_wr,
  input  addr_t abus,
  input  data_t dbus_i,
  output data_t dbus_o,
  output logic  dbus_oe,
  input  logic  init,
  output logic  wdfail,
  output logic  rstout
);
  len_sel_t   fwlen, swlen;
  logic       wdrst, wdsrvc;
  logic       cfg_wr, unlock_wr, len_we;
  data_t      wdata;
  logic [1:0] unlock_state;
  logic       swclk, sw_tick, fwclk, fw_tick;
  logic       sw_open, sw_missed, init_level;
  logic       fw_running, fw_expired;
  logic       service, fw_restart, fail, missed;
  wdt_state_e state;
  fail_mode_e flstat;
  win_len_t   sw_count, fw_count;
  logic       rc_enabled, rc_busy;
  swstat_t    swstat;

  assign swstat = '{missed: missed, open: sw_open};

  wdt_regs u_regs (
    .clk         (sysclk),
    .rst_n       (sysreset_n),
    .enable      (enable),
    .rd_wr       (rd_wr),
    .abus        (abus),
    .dbus_i      (dbus_i),
    .dbus_o      (dbus_o),
    .dbus_oe     (dbus_oe),
    .fwlen       (fwlen),
    .swlen       (swlen),
    .wdrst       (wdrst),
    .wdsrvc      (wdsrvc),
    .cfg_wr      (cfg_wr),
    .unlock_wr   (unlock_wr),
    .wdata       (wdata),
    .len_we      (len_we),
    .unlock_state(unlock_state),
    .swstat      (swstat),
    .wdfail      (wdfail),
    .flstat      (flstat),
    .init_level  (init_level)
  );

  wdt_unlock #(.UNLOCK_CYCLES(UNLOCK_CYCLES)) u_unlock (
    .clk   (sysclk),
    .rst_n (sysreset_n),
    .wr    (unlock_wr),
    .wdata (wdata),
    .cfg_wr(cfg_wr),
    .len_we(len_we),
    .state (unlock_state)
  );

  wdt_clkdiv #(.SW_DIV(SW_DIV), .FW_DIV(FW_DIV)) u_clkdiv (
    .clk    (sysclk),
    .rst_n  (sysreset_n),
    .swclk  (swclk),
    .sw_tick(sw_tick),
    .fwclk  (fwclk),
    .fw_tick(fw_tick)
  );

  wdt_service_window #(.SW_DIV(SW_DIV), .SW_LEN_TAB(SW_LEN_TAB)) u_sw (
    .clk       (sysclk),
    .rst_n     (sysreset_n),
    .init      (init),
    .sw_tick   (sw_tick),
    .swlen     (swlen),
    .service   (service),
    .cancel     (fail),
    .open      (sw_open),
    .missed    (sw_missed),
    .init_level(init_level),
    .main_count(sw_count)
  );

  wdt_frame_window #(.FW_DIV(FW_DIV), .FW_LEN_TAB(FW_LEN_TAB)) u_fw (
    .clk       (sysclk),
    .rst_n     (sysreset_n),
    .fw_tick   (fw_tick),
    .fwlen     (fwlen),
    .restart   (fw_restart),
    .cancel     (fail),
    .running   (fw_running),
    .expired   (fw_expired),
    .main_count(fw_count)
  );

  wdt_fault_fsm u_fsm (
    .clk       (sysclk),
    .rst_n     (sysreset_n),
    .wdrst     (wdrst),
    .wdsrvc    (wdsrvc),
    .sw_open   (sw_open),
    .sw_missed (sw_missed),
    .fw_expired(fw_expired),
    .state     (state),
    .wdfail    (wdfail),
    .flstat    (flstat),
    .missed    (missed),
    .service   (service),
    .fw_restart(fw_restart),
    .fail      (fail)
  );

  wdt_reset_counter #(.RST_DELAY(RST_DELAY), .RST_PULSE(RST_PULSE)) u_rc (
    .clk    (sysclk),
    .rst_n  (sysreset_n),
    .wdfail (wdfail),
    .rstout (rstout),
    .enabled(rc_enabled),
    .busy   (rc_busy)
  );
endmodule
