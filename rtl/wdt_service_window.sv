// wdt_service_window: the service window of the windowed watchdog.
//
// The processor announces each frame by pulsing the INIT pin low. A falling
// edge on INIT (after a two-flop synchroniser) opens the service window,
// inside which the software must service the watchdog. The window length is
// one of four hard-coded values, chosen by the 2-bit SWLEN field, in periods
// of the derived clock SWCLK; it is timed exactly by wdt_window_timer
// (offset up counter, main counter, offset down counter).
//
// A correct service ("service", from the fault detection logic) closes the
// window immediately; so does "cancel", used when the watchdog fails. When
// the window runs to its end without a service, "missed" pulses for one
// cycle. A falling edge on INIT while the window is already open is ignored
// (this implementation's choice; the specification does not say).
//
// Timing: "open" rises 3 SYSCLK cycles after INIT falls (two synchroniser
// flops and the edge detector) and stays high for SW_LEN_TAB[swlen]*SW_DIV
// cycles unless closed earlier. "init_level" is the synchronised INIT pin.
// An INIT low pulse must last longer than one SYSCLK period to be seen.
module wdt_service_window
  import wdt_pkg::*;
#(
  parameter int unsigned SW_DIV     = 1000,
  parameter len_tab_t    SW_LEN_TAB = SW_LEN_TAB_DEF
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     init,        // INIT pin, asynchronous, active low pulse
  input  logic     sw_tick,     // SWCLK rising-edge strobe
  input  len_sel_t swlen,       // SWLEN field
  input  logic     service,     // correct service: close the window
  input  logic     cancel,       // watchdog failed: close the window
  output logic     open,        // window is open
  output logic     missed,      // window closed without a service (pulse)
  output logic     init_level,  // synchronised INIT
  output win_len_t main_count   // running main counter value
);
  logic init_s, init_q, init_fall;

  wdt_sync #(.RESET_VAL(1'b1)) u_sync (
    .clk(clk), .rst_n(rst_n), .d(init), .q(init_s)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) init_q <= 1'b1;
    else        init_q <= init_s;
  end

  assign init_fall  = init_q & ~init_s;
  assign init_level = init_s;

  wdt_window_timer #(.DIV(SW_DIV), .CNT_W(WIN_CNT_W)) u_timer (
    .clk       (clk),
    .rst_n     (rst_n),
    .tick      (sw_tick),
    .start     (init_fall & ~open),
    .stop      (service | cancel),
    .len       (SW_LEN_TAB[swlen]),
    .running   (open),
    .expired   (missed),
    .main_count(main_count)
  );
endmodule
