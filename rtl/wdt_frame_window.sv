// wdt_frame_window: the frame window of the windowed watchdog.
//
// The frame window bounds the time between two correct services. It starts
// when the service window is terminated by a correct service, and every
// further correct service restarts it. If it runs to its end, the processor
// has not serviced the watchdog in time and "expired" pulses; the fault
// detection logic then asserts WDFAIL. Its length is one of four hard-coded
// values chosen by the 2-bit FWLEN field, in periods of the derived clock
// FWCLK, timed exactly by wdt_window_timer like the service window: the
// offset up counter measures the offset between the service and the next
// FWCLK rising edge, the main counter runs FWLEN-1 FWCLK periods and the
// offset down counter makes up the rest.
//
// Interface: "restart" (one-cycle pulse) starts or restarts the window;
// "cancel" stops it at once (on any watchdog failure). "running" is high for
// FW_LEN_TAB[fwlen]*FW_DIV cycles after a restart; "expired" is a one-cycle
// pulse right after. The frame length should exceed the processor's frame
// period so that the next service window opens before the frame expires.
module wdt_frame_window
  import wdt_pkg::*;
#(
  parameter int unsigned FW_DIV     = 50000,
  parameter len_tab_t    FW_LEN_TAB = FW_LEN_TAB_DEF
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     fw_tick,     // FWCLK rising-edge strobe
  input  len_sel_t fwlen,       // FWLEN field
  input  logic     restart,     // service window terminated by a service
  input  logic     cancel,       // watchdog failed
  output logic     running,
  output logic     expired,
  output win_len_t main_count
);
  wdt_window_timer #(.DIV(FW_DIV), .CNT_W(WIN_CNT_W)) u_timer (
    .clk       (clk),
    .rst_n     (rst_n),
    .tick      (fw_tick),
    .start     (restart),
    .stop      (cancel),
    .len       (FW_LEN_TAB[fwlen]),
    .running   (running),
    .expired   (expired),
    .main_count(main_count)
  );
endmodule
