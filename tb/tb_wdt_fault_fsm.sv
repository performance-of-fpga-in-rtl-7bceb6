// tb_wdt_fault_fsm: self-checking test of the fault detection state machine.
//
// Drives the register bits (WDRST, WDSRVC) and the window status inputs
// directly and walks every transition of the four-state machine: arming by
// a WDRST rising edge, the three ways an initialisation is discarded, a
// successful initialisation, a correct service in operation, the three
// failure modes with their FLSTAT codes, and the missed-window flag that
// stops services from restarting the frame window. Expected states,
// pulses and codes are written out by hand for each step.
module tb_wdt_fault_fsm;
  import wdt_pkg::*;

  logic       clk, rst_n;
  logic       wdrst, wdsrvc, sw_open, sw_missed, fw_expired;
  wdt_state_e state;
  logic       wdfail, missed, service, fw_restart, fail;
  fail_mode_e flstat;
  int         checks = 0, failures = 0;

  initial clk = 1'b0;
  always #5 clk = ~clk;

  wdt_fault_fsm dut (
    .clk(clk), .rst_n(rst_n), .wdrst(wdrst), .wdsrvc(wdsrvc),
    .sw_open(sw_open), .sw_missed(sw_missed), .fw_expired(fw_expired),
    .state(state), .wdfail(wdfail), .flstat(flstat), .missed(missed),
    .service(service), .fw_restart(fw_restart), .fail(fail)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t (state %0d)", what, $time, state);
    end
  endtask

  task automatic step();
    @(negedge clk);
  endtask

  // set WDSRVC to v; check the pulses seen in that cycle, then advance
  task automatic set_srvc(input logic v, input bit exp_service,
                          input bit exp_restart, input bit exp_fail);
    wdsrvc = v;
    #1;
    check(service == exp_service, "service pulse");
    check(fw_restart == exp_restart, "fw_restart pulse");
    check(fail == exp_fail, "fail pulse");
    step();
  endtask

  // WDRST low-high, then open a window and service it: reach STATE3
  task automatic bring_up();
    wdrst = 1'b0; step();
    wdrst = 1'b1; step();
    check(state == ST_ARMED, "armed after WDRST rising edge");
    sw_open = 1'b1; step();
    check(state == ST_WINDOW, "STATE2 when window opens");
    set_srvc(1'b1, 1, 1, 0);
    check(state == ST_RUNNING && !wdfail, "running after service");
    sw_open = 1'b0; step();
    set_srvc(1'b0, 0, 0, 0);
    check(state == ST_RUNNING, "falling edge outside window is fine");
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; wdrst = 1'b0; wdsrvc = 1'b0;
    sw_open = 1'b0; sw_missed = 1'b0; fw_expired = 1'b0;
    repeat (3) step();
    rst_n = 1'b1;
    step();
    check(state == ST_FAILED && wdfail, "failed after reset");
    check(flstat == FL_NONE, "no failure logged after reset");

    // services without WDRST do nothing
    sw_open = 1'b1; step();
    set_srvc(1'b1, 0, 0, 0);
    check(state == ST_FAILED, "service ignored in STATE0");
    set_srvc(1'b0, 0, 0, 0);
    sw_open = 1'b0; step();

    // STATE1: service outside the window discards the initialisation
    wdrst = 1'b1; step();
    check(state == ST_ARMED, "STATE1");
    set_srvc(1'b1, 0, 0, 0);
    check(state == ST_FAILED && wdfail, "STATE1 service outside window -> STATE0");
    set_srvc(1'b0, 0, 0, 0);

    // STATE2: the window closes without a service
    wdrst = 1'b0; step(); wdrst = 1'b1; step();
    sw_open = 1'b1; step();
    check(state == ST_WINDOW, "STATE2");
    sw_open = 1'b0; sw_missed = 1'b1; step(); sw_missed = 1'b0;
    check(state == ST_FAILED, "STATE2 window closed -> STATE0");

    // STATE2: WDSRVC falling edge inside the window
    wdsrvc = 1'b1; step();
    wdrst = 1'b0; step(); wdrst = 1'b1; step();
    sw_open = 1'b1; step();
    check(state == ST_WINDOW, "STATE2 again");
    set_srvc(1'b0, 0, 0, 0);
    check(state == ST_FAILED, "STATE2 falling edge inside window -> STATE0");
    sw_open = 1'b0; step();
    check(flstat == FL_NONE, "initialisation failures are not logged");

    // successful initialisation, then a correct service in operation
    bring_up();
    sw_open = 1'b1; step();
    set_srvc(1'b1, 1, 1, 0);
    check(state == ST_RUNNING && !wdfail, "correct service keeps running");
    sw_open = 1'b0; step();
    set_srvc(1'b0, 0, 0, 0);

    // failure 1: frame window expiry
    fw_expired = 1'b1; #1;
    check(fail, "fail on frame expiry");
    step(); fw_expired = 1'b0;
    check(state == ST_FAILED && wdfail, "STATE0 after frame expiry");
    check(flstat == FL_FRAME_EXP, "FLSTAT frame expiry");

    // failure 2: service outside the window (second of two services)
    bring_up();
    sw_open = 1'b1; step();
    set_srvc(1'b1, 1, 1, 0);
    sw_open = 1'b0; step();          // first service closed the window
    set_srvc(1'b0, 0, 0, 0);
    set_srvc(1'b1, 0, 0, 1);         // second service: outside
    check(state == ST_FAILED && flstat == FL_SRVC_OUTSIDE, "FLSTAT service outside");
    set_srvc(1'b0, 0, 0, 0);

    // failure 3: WDSRVC still high when the next window opens, falls inside
    bring_up();
    sw_open = 1'b1; step();
    set_srvc(1'b1, 1, 1, 0);
    sw_open = 1'b0; repeat (3) step();
    sw_open = 1'b1; step();
    set_srvc(1'b0, 0, 0, 1);
    check(state == ST_FAILED && flstat == FL_FALL_INSIDE, "FLSTAT falling edge inside");
    sw_open = 1'b0; step();

    // missed window in operation: flag set, later service does not restart
    bring_up();
    sw_open = 1'b1; step();
    sw_open = 1'b0; sw_missed = 1'b1; step(); sw_missed = 1'b0;
    check(state == ST_RUNNING && missed, "missed flag set, still running");
    sw_open = 1'b1; step();
    set_srvc(1'b1, 1, 0, 0);
    check(state == ST_RUNNING, "service after a miss is accepted");
    sw_open = 1'b0; step();
    set_srvc(1'b0, 0, 0, 0);
    fw_expired = 1'b1; step(); fw_expired = 1'b0;
    check(state == ST_FAILED && flstat == FL_FRAME_EXP, "frame expiry after a miss");
    wdrst = 1'b0; step(); wdrst = 1'b1; step();
    check(!missed, "missed flag cleared on re-arm");

    // asynchronous reset returns to the failed state
    bring_up();
    rst_n = 1'b0; #1;
    check(wdfail && state == ST_FAILED, "SYSRESET low forces WDFAIL");
    step(); rst_n = 1'b1; step();

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
