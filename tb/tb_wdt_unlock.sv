// tb_wdt_unlock: self-checking test of the window length lock.
//
// Checks that the length fields are writable after power-up until the first
// configuration write; that 0xAAAA followed by 0x5555 within UNLOCK_CYCLES
// cycles makes them writable for exactly UNLOCK_CYCLES cycles; and that a
// late second pattern, a wrong second value, the patterns in the wrong
// order or the second pattern alone all leave them locked.
module tb_wdt_unlock;
  import wdt_pkg::*;

  localparam int unsigned UNLOCK_CYCLES = 12;

  logic       clk, rst_n, wr, cfg_wr, len_we;
  data_t      wdata;
  logic [1:0] state;
  int         checks = 0, failures = 0;

  initial clk = 1'b0;
  always #5 clk = ~clk;

  wdt_unlock #(.UNLOCK_CYCLES(UNLOCK_CYCLES)) dut (
    .clk(clk), .rst_n(rst_n), .wr(wr), .wdata(wdata), .cfg_wr(cfg_wr),
    .len_we(len_we), .state(state)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic write_unlock(input data_t d);
    wr = 1'b1; wdata = d;
    @(negedge clk);
    wr = 1'b0; wdata = '0;
  endtask

  // count cycles with len_we high over the next n cycles
  task automatic count_we(input int n, output int cnt);
    cnt = 0;
    repeat (n) begin
      if (len_we) cnt++;
      @(negedge clk);
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int c;
    rst_n = 1'b0; wr = 1'b0; cfg_wr = 1'b0; wdata = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    repeat (5) @(negedge clk);
    check(len_we, "writable after power-up");
    cfg_wr = 1'b1; #1;
    check(len_we, "first configuration write still takes the lengths");
    @(negedge clk);
    cfg_wr = 1'b0;
    check(!len_we, "locked after the first configuration write");

    // correct sequence, second pattern at the last allowed cycle
    write_unlock(UNLOCK_PAT1);
    repeat (UNLOCK_CYCLES - 1) @(negedge clk);
    write_unlock(UNLOCK_PAT2);
    count_we(3 * UNLOCK_CYCLES, c);
    check(c == UNLOCK_CYCLES, $sformatf("unlocked for %0d cycles", c));

    // second pattern one cycle too late
    write_unlock(UNLOCK_PAT1);
    repeat (UNLOCK_CYCLES) @(negedge clk);
    write_unlock(UNLOCK_PAT2);
    count_we(3 * UNLOCK_CYCLES, c);
    check(c == 0, "late second pattern rejected");

    // wrong second value
    write_unlock(UNLOCK_PAT1);
    write_unlock(16'h1234);
    write_unlock(UNLOCK_PAT2);
    count_we(3 * UNLOCK_CYCLES, c);
    check(c == 0, "wrong second value rejected");

    // wrong order, and the second pattern alone
    write_unlock(UNLOCK_PAT2);
    write_unlock(UNLOCK_PAT1);
    count_we(3 * UNLOCK_CYCLES, c);
    check(c == 0, "patterns in wrong order rejected");

    // back to back: unlocked at once
    write_unlock(UNLOCK_PAT1);
    write_unlock(UNLOCK_PAT2);
    check(len_we, "unlocked right after the second pattern");
    count_we(3 * UNLOCK_CYCLES, c);
    check(c == UNLOCK_CYCLES, "unlock window length, back to back");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
