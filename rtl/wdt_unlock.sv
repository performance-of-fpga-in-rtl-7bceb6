// wdt_unlock: pattern comparator and lock for the window length fields.
//
// The window lengths (SWLEN, FWLEN) may be chosen freely after power-on;
// the first write to the configuration register locks them. To change them
// later the software writes 0xAAAA and then, within UNLOCK_CYCLES SYSCLK
// cycles (10 us), 0x5555 to the 16-bit unlock register. The length fields
// are then writable for the next UNLOCK_CYCLES cycles (10 us) and lock again.
// Any other value written while the first pattern is pending, or a late
// second pattern, leaves the fields locked. This sequence follows the
// original specification; the 50 MHz SYSCLK behind the cycle count, and writing 0xAAAA at any
// time restarting the sequence, are this implementation's own choices.
//
// Interface: "wr" pulses for one cycle with the data "wdata" on each write
// to the unlock register; "cfg_wr" pulses on each write to the configuration
// register. "len_we" (combinational) enables the length fields for a
// configuration write in the same cycle. "state" reports the sequence state.
module wdt_unlock
  import wdt_pkg::*;
#(
  parameter int unsigned UNLOCK_CYCLES = 500   // 10 us at 50 MHz
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       wr,
  input  data_t      wdata,
  input  logic       cfg_wr,
  output logic       len_we,
  output logic [1:0] state
);
  localparam int unsigned TW = $clog2(UNLOCK_CYCLES + 1);

  typedef enum logic [1:0] {
    UL_POWERUP,   // lengths not yet selected: writable
    UL_LOCKED,    // locked
    UL_ARMED,     // first pattern seen, waiting for the second
    UL_OPEN       // unlocked for UNLOCK_CYCLES cycles
  } unlock_state_e;

  unlock_state_e st;
  logic [TW-1:0] timer;
  logic          pat1, pat2;

  assign pat1   = wr && (wdata == UNLOCK_PAT1);
  assign pat2   = wr && (wdata == UNLOCK_PAT2);
  assign len_we = (st == UL_POWERUP) || (st == UL_OPEN);
  assign state  = st;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st    <= UL_POWERUP;
      timer <= '0;
    end else begin
      unique case (st)
        UL_POWERUP: begin
          if (cfg_wr) st <= UL_LOCKED;
        end
        UL_LOCKED: begin
          if (pat1) begin
            st    <= UL_ARMED;
            timer <= TW'(UNLOCK_CYCLES);
          end
        end
        UL_ARMED: begin
          if (pat2) begin
            st    <= UL_OPEN;
            timer <= TW'(UNLOCK_CYCLES);
          end else if (pat1) begin
            timer <= TW'(UNLOCK_CYCLES);
          end else if (wr || timer == TW'(1)) begin
            st <= UL_LOCKED;
          end else begin
            timer <= timer - 1'b1;
          end
        end
        UL_OPEN: begin
          if (pat1) begin
            st    <= UL_ARMED;
            timer <= TW'(UNLOCK_CYCLES);
          end else if (timer == TW'(1)) begin
            st <= UL_LOCKED;
          end else begin
            timer <= timer - 1'b1;
          end
        end
        default: st <= UL_LOCKED;
      endcase
    end
  end
endmodule
