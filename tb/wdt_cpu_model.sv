// wdt_cpu_model: behavioural model of the monitored processor, for the
// watchdog testbenches.
//
// Drives the watchdog's register bus and INIT pin the way the software of a
// frame-scheduled processor would. Bus cycles are one SYSCLK cycle long and
// are driven at the falling clock edge; reads sample the combinational read
// data 1 time unit later. The model keeps a copy of the configuration
// fields it last wrote (fwlen, swlen, wdrst, wdsrvc) so that each task
// changes one field and writes the whole register. "cycle" counts SYSCLK
// rising edges since time 0, and "last_write" holds the cycle of the last
// bus write, for timing checks in the testbench.
module wdt_cpu_model
  import wdt_pkg::*;
(
  input  logic  clk,
  output logic  enable,
  output logic  rd_wr,
  output addr_t abus,
  output data_t dbus_i,
  input  data_t dbus_o,
  input  logic  dbus_oe,
  output logic  init
);
  len_sel_t fwlen, swlen;
  logic     wdrst, wdsrvc;
  longint   cycle, last_write;

  initial begin
    enable = 1'b0; rd_wr = 1'b1; abus = '0; dbus_i = '0; init = 1'b1;
    fwlen = '0; swlen = '0; wdrst = 1'b0; wdsrvc = 1'b0;
    cycle = 0; last_write = 0;
  end

  always @(posedge clk) cycle <= cycle + 1;

  task automatic write(input addr_t a, input data_t d);
    @(negedge clk);
    enable = 1'b1; rd_wr = 1'b0; abus = a; dbus_i = d;
    last_write = cycle;
    @(negedge clk);
    enable = 1'b0; rd_wr = 1'b1; dbus_i = '0;
  endtask

  // read in the current cycle (call at a falling edge; takes one cycle)
  task automatic read(input addr_t a, output data_t d);
    enable = 1'b1; rd_wr = 1'b1; abus = a;
    #1;
    d = dbus_oe ? dbus_o : '0;
    @(negedge clk);
    enable = 1'b0;
  endtask

  function automatic data_t cfg_word();
    data_t w = '0;
    w[CFG_FWLEN_LSB +: LEN_SEL_W] = fwlen;
    w[CFG_SWLEN_LSB +: LEN_SEL_W] = swlen;
    w[CFG_WDRST]                  = wdrst;
    w[CFG_WDSRVC]                 = wdsrvc;
    return w;
  endfunction

  task automatic write_cfg();
    write(ADDR_CONFIG, cfg_word());
  endtask

  task automatic set_lengths(input len_sel_t f, input len_sel_t s);
    fwlen = f;
    swlen = s;
    write_cfg();
  endtask

  task automatic set_wdrst(input logic v);
    wdrst = v;
    write_cfg();
  endtask

  task automatic set_wdsrvc(input logic v);
    wdsrvc = v;
    write_cfg();
  endtask

  // the frame start signal: INIT low for two cycles
  task automatic pulse_init();
    @(negedge clk);
    init = 1'b0;
    repeat (2) @(negedge clk);
    init = 1'b1;
  endtask

  // poll the configuration register until the service window is open;
  // returns 0 if it did not open within max_cycles
  task automatic wait_window_open(input int max_cycles, output bit ok);
    data_t d;
    ok = 1'b0;
    @(negedge clk);
    for (int i = 0; i < max_cycles && !ok; i++) begin
      read(ADDR_CONFIG, d);
      ok = d[CFG_SWSTAT_LSB];
    end
  endtask

  // poll until the service window opens, then count the cycles it stays
  // open by reading SWSTAT every cycle (call before the window opens)
  task automatic measure_window(output int len);
    data_t d;
    len = 0;
    @(negedge clk);
    read(ADDR_CONFIG, d);
    for (int i = 0; i < 10000000 && !d[CFG_SWSTAT_LSB]; i++) read(ADDR_CONFIG, d);
    while (d[CFG_SWSTAT_LSB] && len < 10000000) begin
      len++;
      read(ADDR_CONFIG, d);
    end
  endtask
endmodule
