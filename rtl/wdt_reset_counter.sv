// wdt_reset_counter: delayed reset output after a watchdog failure.
//
// When WDFAIL is asserted the software is given a fixed time to save debug
// information (for example the failure mode from FLSTAT) to non-volatile
// memory; then RSTOUT is asserted to reset the processor. A down counter
// clocked by SYSCLK is loaded on the rising edge of WDFAIL and RSTOUT goes
// high exactly RST_DELAY cycles after WDFAIL rose.
//
// The counter is disabled after power-up: the WDFAIL that is asserted out
// of reset never produces a reset. It enables itself the first time WDFAIL
// deasserts, i.e. when the watchdog has been initialised once. Both rules
// follow the original specification. Own choices: RSTOUT is a pulse RST_PULSE cycles wide
// (so that a processor held by it can restart and re-initialise the
// watchdog); a count in progress is cancelled if WDFAIL deasserts again
// before it ends; the default durations (1 ms delay and 1 us pulse at a
// 50 MHz SYSCLK) are assumed.
//
// Interface: wdfail in, rstout out (registered), enabled and busy for status.
module wdt_reset_counter #(
  parameter int unsigned RST_DELAY = 50000,  // SYSCLK cycles, >= 2
  parameter int unsigned RST_PULSE = 50      // SYSCLK cycles, >= 1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic wdfail,
  output logic rstout,
  output logic enabled,
  output logic busy
);
  localparam int unsigned CW = $clog2((RST_DELAY > RST_PULSE ? RST_DELAY : RST_PULSE) + 1);

  typedef enum logic [1:0] {RC_IDLE, RC_DELAY, RC_PULSE} rc_state_e;

  rc_state_e     st;
  logic [CW-1:0] cnt;
  logic          wdfail_q;

  initial begin
    assert (RST_DELAY >= 2 && RST_PULSE >= 1)
      else $error("wdt_reset_counter: RST_DELAY must be >= 2, RST_PULSE >= 1");
  end

  assign busy = (st != RC_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st       <= RC_IDLE;
      cnt      <= '0;
      rstout   <= 1'b0;
      enabled  <= 1'b0;
      wdfail_q <= 1'b1;
    end else begin
      wdfail_q <= wdfail;
      if (!wdfail) enabled <= 1'b1;
      unique case (st)
        RC_IDLE: begin
          if (wdfail && !wdfail_q && enabled) begin
            st  <= RC_DELAY;
            cnt <= CW'(RST_DELAY - 1);
          end
        end
        RC_DELAY: begin
          if (!wdfail) begin
            st <= RC_IDLE;
          end else if (cnt == CW'(1)) begin
            st     <= RC_PULSE;
            cnt    <= CW'(RST_PULSE);
            rstout <= 1'b1;
          end else begin
            cnt <= cnt - 1'b1;
          end
        end
        RC_PULSE: begin
          if (cnt == CW'(1)) begin
            st     <= RC_IDLE;
            rstout <= 1'b0;
          end else begin
            cnt <= cnt - 1'b1;
          end
        end
        default: st <= RC_IDLE;
      endcase
    end
  end
endmodule
