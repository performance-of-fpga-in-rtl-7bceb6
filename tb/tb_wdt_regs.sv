// tb_wdt_regs: self-checking test of the bus interface and configuration
// register.
//
// Writes and reads both registers over the bus. The expected read words
// are assembled here from the bit map of the register (FWLEN [1:0], SWLEN
// [3:2], WDRST [4], WDSRVC [5], SWSTAT [7:6], WDFAIL [8], FLSTAT [10:9],
// INIT [11]) using literal bit positions, with random status inputs. Also
// checks that the length fields ignore writes while len_we is low, that the
// write strobes decode the address, that reads of the unlock address return
// the unlock state and that the data bus is only driven during reads.
module tb_wdt_regs;
  import wdt_pkg::*;

  logic       clk, rst_n, enable, rd_wr;
  addr_t      abus;
  data_t      dbus_i, dbus_o, wdata;
  logic       dbus_oe;
  len_sel_t   fwlen, swlen;
  logic       wdrst, wdsrvc, cfg_wr, unlock_wr, len_we;
  logic [1:0] unlock_state;
  swstat_t    swstat;
  logic       wdfail, init_level;
  fail_mode_e flstat;
  int         checks = 0, failures = 0;

  initial clk = 1'b0;
  always #5 clk = ~clk;

  wdt_regs dut (
    .clk(clk), .rst_n(rst_n), .enable(enable), .rd_wr(rd_wr), .abus(abus),
    .dbus_i(dbus_i), .dbus_o(dbus_o), .dbus_oe(dbus_oe), .fwlen(fwlen),
    .swlen(swlen), .wdrst(wdrst), .wdsrvc(wdsrvc), .cfg_wr(cfg_wr),
    .unlock_wr(unlock_wr), .wdata(wdata), .len_we(len_we),
    .unlock_state(unlock_state), .swstat(swstat), .wdfail(wdfail),
    .flstat(flstat), .init_level(init_level)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic bus_write(input addr_t a, input data_t d,
                           input bit exp_cfg, input bit exp_unl);
    enable = 1'b1; rd_wr = 1'b0; abus = a; dbus_i = d;
    #1;
    check(cfg_wr == exp_cfg && unlock_wr == exp_unl && wdata == d, "write strobes");
    check(!dbus_oe, "bus not driven during a write");
    @(negedge clk);
    enable = 1'b0; dbus_i = '0;
  endtask

  task automatic bus_read(input addr_t a, output data_t d);
    enable = 1'b1; rd_wr = 1'b1; abus = a;
    #1;
    check(dbus_oe, "bus driven during a read");
    check(!cfg_wr && !unlock_wr, "no write strobe during a read");
    d = dbus_o;
    @(negedge clk);
    enable = 1'b0;
  endtask

  function automatic data_t expected(input logic [1:0] fl, sl, input logic r, s,
                                     input logic [1:0] sws, input logic f,
                                     input logic [1:0] fs, input logic i);
    data_t w = '0;
    w[1:0]  = fl;
    w[3:2]  = sl;
    w[4]    = r;
    w[5]    = s;
    w[7:6]  = sws;
    w[8]    = f;
    w[10:9] = fs;
    w[11]   = i;
    return w;
  endfunction

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    data_t d, exp;
    logic [1:0] fl, sl;
    logic r, s;
    rst_n = 1'b0; enable = 1'b0; rd_wr = 1'b1; abus = '0; dbus_i = '0;
    len_we = 1'b1; unlock_state = 2'd0; swstat = '0; wdfail = 1'b1;
    flstat = FL_NONE; init_level = 1'b1;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    #1 check(!dbus_oe && dbus_o == '0, "bus idle");
    bus_read(2'd0, d);
    check(d == expected(0, 0, 0, 0, 0, 1, 0, 1), "reset value");

    fl = 2'd0; sl = 2'd0;
    for (int k = 0; k < 40; k++) begin
      data_t wv = data_t'($urandom);
      len_we = ($urandom % 2) == 1;
      bus_write(2'd0, wv, 1, 0);
      if (len_we) begin
        fl = wv[1:0];
        sl = wv[3:2];
      end
      r = wv[4];
      s = wv[5];
      swstat = swstat_t'($urandom % 4);
      wdfail = ($urandom % 2) == 1;
      flstat = fail_mode_e'($urandom % 4);
      init_level = ($urandom % 2) == 1;
      bus_read(2'd0, d);
      exp = expected(fl, sl, r, s, swstat, wdfail, flstat, init_level);
      check(d == exp, $sformatf("config read %h expected %h", d, exp));
      check(fwlen == fl && swlen == sl && wdrst == r && wdsrvc == s, "field outputs");
    end

    // unlock register: strobe only, read returns the unlock state
    bus_write(2'd1, 16'hAAAA, 0, 1);
    unlock_state = 2'd2;
    bus_read(2'd1, d);
    check(d == 16'd2, "unlock state read back");
    // unused addresses
    bus_write(2'd3, 16'hFFFF, 0, 0);
    bus_read(2'd3, d);
    check(d == '0, "unused address reads zero");
    bus_read(2'd0, d);
    check(d[5:0] == {s, r, sl, fl}, "unused address write ignored");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
