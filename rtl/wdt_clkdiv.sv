// wdt_clkdiv: frequency divider producing the two slow window clocks.
//
// The service window and the frame window each run their main counter on a
// derived clock much slower than SYSCLK (SWCLK and FWCLK), which keeps the
// counters and comparators small. Two free-running modulo counters divide
// SYSCLK by SW_DIV and FW_DIV. Each derived clock is produced as a square
// wave (swclk, fwclk: high for the first half of each period, low from reset
// until the first rising edge) together with a
// one-SYSCLK-cycle strobe (sw_tick, fw_tick) that is high in the first
// SYSCLK cycle after each rising edge of the derived clock.
//
// The window counters use the strobes as clock enables in the SYSCLK domain,
// so the whole watchdog is a single clock domain; the square waves are
// brought out for observation only. The division ratios are this implementation's
// own (the specification names the derived clocks but gives no frequencies).
//
// Timing: the first rising edge of each derived clock is DIV cycles after
// reset is released; then one every DIV cycles.
module wdt_clkdiv #(
  parameter int unsigned SW_DIV = 1000,   // SYSCLK cycles per SWCLK period
  parameter int unsigned FW_DIV = 50000   // SYSCLK cycles per FWCLK period
) (
  input  logic clk,
  input  logic rst_n,
  output logic swclk,
  output logic sw_tick,
  output logic fwclk,
  output logic fw_tick
);
  localparam int unsigned SW_W = $clog2(SW_DIV);
  localparam int unsigned FW_W = $clog2(FW_DIV);

  logic [SW_W-1:0] sw_cnt;
  logic [FW_W-1:0] fw_cnt;

  initial begin
    assert (SW_DIV >= 2 && FW_DIV >= 2)
      else $error("wdt_clkdiv: division ratios must be at least 2");
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sw_cnt  <= '0;
      sw_tick <= 1'b0;
      swclk   <= 1'b0;
    end else if (sw_cnt == SW_W'(SW_DIV - 1)) begin
      sw_cnt  <= '0;
      sw_tick <= 1'b1;
      swclk   <= 1'b1;
    end else begin
      sw_cnt  <= sw_cnt + 1'b1;
      sw_tick <= 1'b0;
      swclk   <= swclk && ((sw_cnt + 1'b1) < SW_W'(SW_DIV / 2));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fw_cnt  <= '0;
      fw_tick <= 1'b0;
      fwclk   <= 1'b0;
    end else if (fw_cnt == FW_W'(FW_DIV - 1)) begin
      fw_cnt  <= '0;
      fw_tick <= 1'b1;
      fwclk   <= 1'b1;
    end else begin
      fw_cnt  <= fw_cnt + 1'b1;
      fw_tick <= 1'b0;
      fwclk   <= fwclk && ((fw_cnt + 1'b1) < FW_W'(FW_DIV / 2));
    end
  end
endmodule
