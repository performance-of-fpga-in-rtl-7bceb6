// wdt_sync: two-flop synchroniser for a single asynchronous input.
//
// The INIT pin of the watchdog may be driven from the processor's clock
// domain or by software at any time, so it passes through two flip-flops
// clocked by SYSCLK before any edge detection. Output "q" follows "d" with
// two cycles of latency. The reset value is a parameter so that an
// active-low input can reset to its idle (high) level and no false edge is
// seen after reset. The two-flop structure is this implementation's own choice; the
// specification only states that INIT may arrive asynchronously.
module wdt_sync #(
  parameter bit RESET_VAL = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  output logic q
);
  logic meta;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      meta <= RESET_VAL;
      q    <= RESET_VAL;
    end else begin
      meta <= d;
      q    <= meta;
    end
  end
endmodule
