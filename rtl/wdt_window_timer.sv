// wdt_window_timer: precise window timer shared by the service and frame
// windows.
//
// A window of LEN periods of a slow derived clock is timed with three
// counters, so that the window length is exact even though the window can
// start at any SYSCLK cycle within a derived-clock period:
//   1. the offset up counter (SYSCLK) counts from the start until the next
//      rising edge of the derived clock and saves that offset T_off;
//   2. the main counter (derived clock, "tick" used as enable) then runs for
//      LEN-1 derived-clock periods;
//   3. the offset down counter (SYSCLK) finally runs for DIV - T_off cycles.
// The window therefore stays open for exactly LEN*DIV SYSCLK cycles.
// This three-counter scheme follows the original specification; the single-domain clock
// enable and the restart/stop behaviour are this implementation's own choices.
//
// Interface: "start" (one-cycle pulse) opens the window, or restarts it if
// it is already open, and samples "len"; "stop" closes it at once without an
// expiry (stop wins over start). "running" is high from the cycle after the
// start for LEN*DIV cycles; "expired" is a one-cycle pulse in the first cycle
// after a window ran to its end. "tick" must be the one-cycle strobe of the
// derived clock's rising edge from wdt_clkdiv with the same DIV. A length of
// 0 is treated as 1.
module wdt_window_timer #(
  parameter int unsigned DIV   = 1000,  // SYSCLK cycles per derived-clock period
  parameter int unsigned CNT_W = 16     // width of the main counter
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             tick,
  input  logic             start,
  input  logic             stop,
  input  logic [CNT_W-1:0] len,
  output logic             running,
  output logic             expired,
  output logic [CNT_W-1:0] main_count
);
  localparam int unsigned OFF_W = $clog2(DIV + 1);

  typedef enum logic [1:0] {
    PH_IDLE,
    PH_OFFSET_UP,
    PH_MAIN,
    PH_OFFSET_DOWN
  } phase_e;

  phase_e           phase;
  logic [OFF_W-1:0] off_cnt;    // offset up counter, then saved T_off
  logic [OFF_W-1:0] down_cnt;   // offset down counter
  logic [CNT_W-1:0] main_cnt;   // main counter (counts derived-clock edges)
  logic [CNT_W-1:0] len_q;      // window length sampled at the start
  logic [OFF_W-1:0] off_now;    // offset when the first tick arrives

  assign off_now    = off_cnt + 1'b1;
  assign running    = (phase != PH_IDLE);
  assign main_count = main_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase    <= PH_IDLE;
      off_cnt  <= '0;
      down_cnt <= '0;
      main_cnt <= '0;
      len_q    <= '0;
      expired  <= 1'b0;
    end else begin
      expired <= 1'b0;
      if (stop) begin
        phase <= PH_IDLE;
      end else if (start) begin
        phase    <= PH_OFFSET_UP;
        off_cnt  <= '0;
        main_cnt <= '0;
        len_q    <= (len == '0) ? CNT_W'(1) : len;
      end else begin
        unique case (phase)
          PH_IDLE: ;
          PH_OFFSET_UP: begin
            if (tick) begin
              off_cnt <= off_now;
              if (len_q == CNT_W'(1)) begin
                if (off_now == OFF_W'(DIV)) begin
                  phase   <= PH_IDLE;
                  expired <= 1'b1;
                end else begin
                  phase    <= PH_OFFSET_DOWN;
                  down_cnt <= OFF_W'(DIV) - off_now;
                end
              end else begin
                phase <= PH_MAIN;
              end
            end else begin
              off_cnt <= off_now;
            end
          end
          PH_MAIN: begin
            if (tick) begin
              if (main_cnt + 1'b1 == len_q - 1'b1) begin
                main_cnt <= main_cnt + 1'b1;
                if (off_cnt == OFF_W'(DIV)) begin
                  phase   <= PH_IDLE;
                  expired <= 1'b1;
                end else begin
                  phase    <= PH_OFFSET_DOWN;
                  down_cnt <= OFF_W'(DIV) - off_cnt;
                end
              end else begin
                main_cnt <= main_cnt + 1'b1;
              end
            end
          end
          PH_OFFSET_DOWN: begin
            if (down_cnt <= OFF_W'(1)) begin
              phase   <= PH_IDLE;
              expired <= 1'b1;
            end else begin
              down_cnt <= down_cnt - 1'b1;
            end
          end
          default: phase <= PH_IDLE;
        endcase
      end
    end
  end

  // The derived clock must have its rising edge within DIV cycles, so the
  // offset up counter never passes DIV.
  a_offset_bounded: assert property (@(posedge clk) disable iff (!rst_n)
    (phase == PH_OFFSET_UP) |-> (off_cnt < OFF_W'(DIV)));
endmodule
