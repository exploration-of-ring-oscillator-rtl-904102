// sample_timer: times one sampling window of the sensor network.
//
// A measurement clears every sensor counter, runs the rings for a fixed
// number of system-clock cycles and then stops them, so that each count is
// the ring frequency times the window.  The window length is a run-time
// value in 100 MHz cycles: 4000, 8000 and 12000 give the 40, 80 and 120 us
// windows the platform is evaluated with.  This block does in hardware what
// the platform's timer and the processor's sequencing do together; the
// clear phase and the settle phase are this design's own choices.
//
// Sequence after a start pulse in IDLE:
//   CLEAR  : clr_n low for CLR_CYCLES cycles (counters cleared)
//   RUN    : sensor_en high for exactly sample_cycles cycles (none if 0)
//   SETTLE : SETTLE_CYCLES cycles with the rings stopped, so that the
//            counts are stable before they are read in the clock domain
//   done   : one-cycle pulse, then back to IDLE
// busy is high from the cycle after start until the done pulse.  All
// outputs are registered.  A start while busy is ignored.
module sample_timer
  import tsn_pkg::*;
#(
  parameter int unsigned CLR_CYCLES    = 2,
  parameter int unsigned SETTLE_CYCLES = 4
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    start,
  input  window_t sample_cycles,
  output logic    sensor_en,
  output logic    clr_n,
  output logic    busy,
  output logic    done
);
  timeunit 1ns;
  timeprecision 1fs;

  typedef enum logic [1:0] {IDLE, CLEAR, RUN, SETTLE} state_t;

  state_t  state, state_n;
  window_t left, left_n;     // cycles left in the current phase, minus one
  logic    done_n;

  always_comb begin
    state_n = state;
    left_n  = left;
    done_n  = 1'b0;
    unique case (state)
      IDLE: if (start) begin
        state_n = CLEAR;
        left_n  = window_t'(CLR_CYCLES - 1);
      end
      CLEAR: if (left != '0) begin
        left_n = left - 1'b1;
      end else if (sample_cycles != '0) begin
        state_n = RUN;
        left_n  = sample_cycles - 1'b1;
      end else begin
        state_n = SETTLE;
        left_n  = window_t'(SETTLE_CYCLES - 1);
      end
      RUN: if (left != '0) begin
        left_n = left - 1'b1;
      end else begin
        state_n = SETTLE;
        left_n  = window_t'(SETTLE_CYCLES - 1);
      end
      SETTLE: if (left != '0) begin
        left_n = left - 1'b1;
      end else begin
        state_n = IDLE;
        done_n  = 1'b1;
      end
      default: state_n = IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= IDLE;
      left      <= '0;
      sensor_en <= 1'b0;
      clr_n     <= 1'b1;
      busy      <= 1'b0;
      done      <= 1'b0;
    end else begin
      state     <= state_n;
      left      <= left_n;
      sensor_en <= (state_n == RUN);
      clr_n     <= (state_n != CLEAR);
      busy      <= (state_n != IDLE);
      done      <= done_n;
    end
  end

  initial begin
    assert (CLR_CYCLES >= 1 && SETTLE_CYCLES >= 1)
      else $error("sample_timer: CLR_CYCLES and SETTLE_CYCLES must be at least 1");
  end

endmodule
