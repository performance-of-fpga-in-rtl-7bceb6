// wdt_fault_fsm: reset initialisation and fault detection state machine.
//
// Four states. After reset the watchdog is failed (STATE0, WDFAIL = 1). A
// rising edge of the WDRST register bit arms it (STATE1). When a service
// window opens it waits for the service (STATE2); a rising edge of the
// WDSRVC bit inside the window clears WDFAIL and starts the frame window
// (STATE3, operational). A service outside the window in STATE1, or the
// window closing, or a WDSRVC falling edge inside the window in STATE2,
// discards the initialisation (back to STATE0).
//
// In STATE3 three failure modes return the machine to STATE0, assert
// WDFAIL and are logged in FLSTAT:
//   - the frame window expires (FL_FRAME_EXP);
//   - WDSRVC rises outside the service window (FL_SRVC_OUTSIDE); this also
//     catches two services in a row, since the first closes the window;
//   - WDSRVC falls inside a service window (FL_FALL_INSIDE), i.e. the bit
//     was still high from the previous service when the window opened.
// A service window that closes without a service only sets the internal
// "missed" flag (SWSTAT); the frame window is then no longer restarted by
// services, so it runs out and the failure is flagged at its end.
//
// The states, transitions and failure modes follow the original specification. Own choices:
// in STATE1 an event in the very cycle the window opens is judged by the
// STATE2 rules; when a frame expiry coincides with a service, the expiry
// wins; FLSTAT keeps the last failure until the next one (sticky, cleared
// only by SYSRESET); initialisation failures (STATE1/STATE2 back to STATE0)
// are not logged, since WDFAIL never deasserted.
//
// Interface: wdrst/wdsrvc are register bits (SYSCLK domain); sw_open,
// sw_missed and fw_expired come from the windows. Outputs: "service" pulses
// for a correct service (closes the service window), "fw_restart" pulses to
// (re)start the frame window, "fail" pulses on a failure in STATE3 (aborts
// both windows). All outputs are registered except the pulses, which are
// decoded in the same cycle as the edge that causes them.
module wdt_fault_fsm
  import wdt_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       wdrst,
  input  logic       wdsrvc,
  input  logic       sw_open,
  input  logic       sw_missed,
  input  logic       fw_expired,
  output wdt_state_e state,
  output logic       wdfail,
  output fail_mode_e flstat,
  output logic       missed,
  output logic       service,
  output logic       fw_restart,
  output logic       fail
);
  logic       wdrst_q, wdsrvc_q;
  logic       rst_rise, srv_rise, srv_fall;
  wdt_state_e state_d;
  fail_mode_e fail_mode;
  logic       missed_d;

  assign rst_rise = wdrst & ~wdrst_q;
  assign srv_rise = wdsrvc & ~wdsrvc_q;
  assign srv_fall = ~wdsrvc & wdsrvc_q;

  always_comb begin
    state_d    = state;
    missed_d   = missed;
    service    = 1'b0;
    fw_restart = 1'b0;
    fail       = 1'b0;
    fail_mode  = FL_NONE;
    unique case (state)
      ST_FAILED: begin
        if (rst_rise) begin
          state_d  = ST_ARMED;
          missed_d = 1'b0;
        end
      end
      ST_ARMED, ST_WINDOW: begin
        if (srv_rise && sw_open) begin
          state_d    = ST_RUNNING;
          service    = 1'b1;
          fw_restart = 1'b1;
        end else if (srv_rise) begin
          state_d = ST_FAILED;
        end else if (srv_fall && sw_open) begin
          state_d = ST_FAILED;
        end else if (state == ST_WINDOW && sw_missed) begin
          state_d = ST_FAILED;
        end else if (sw_open) begin
          state_d = ST_WINDOW;
        end
      end
      ST_RUNNING: begin
        if (fw_expired) begin
          fail      = 1'b1;
          fail_mode = FL_FRAME_EXP;
        end else if (srv_rise && !sw_open) begin
          fail      = 1'b1;
          fail_mode = FL_SRVC_OUTSIDE;
        end else if (srv_fall && sw_open) begin
          fail      = 1'b1;
          fail_mode = FL_FALL_INSIDE;
        end else if (srv_rise) begin
          service    = 1'b1;
          fw_restart = ~missed;
        end else if (sw_missed) begin
          missed_d = 1'b1;
        end
        if (fail) state_d = ST_FAILED;
      end
      default: state_d = ST_FAILED;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= ST_FAILED;
      wdrst_q  <= 1'b0;
      wdsrvc_q <= 1'b0;
      flstat   <= FL_NONE;
      missed   <= 1'b0;
    end else begin
      state    <= state_d;
      wdrst_q  <= wdrst;
      wdsrvc_q <= wdsrvc;
      missed   <= missed_d;
      if (fail) flstat <= fail_mode;
    end
  end

  assign wdfail = (state != ST_RUNNING);

  // A correct service can only be taken while the service window is open.
  a_service_in_window: assert property (@(posedge clk) disable iff (!rst_n)
    service |-> sw_open);
  // Failures are only flagged from the operational state.
  a_fail_from_running: assert property (@(posedge clk) disable iff (!rst_n)
    fail |-> state == ST_RUNNING);
endmodule
