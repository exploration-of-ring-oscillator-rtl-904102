// ro_counter: the binary counter of one ring-oscillator sensor.
//
// The counter is clocked by the ring output itself and counts its rising
// edges while the count enable is high, so after a sampling window its value
// is the ring frequency times the window length.  The clear is asynchronous
// and active low: with the sensor disabled the ring does not toggle, so a
// synchronous clear would never take effect.  The counter wraps at 2^WIDTH;
// a 15-bit counter holds every window the platform uses (see the README).
//
// Ports: ro_clk (ring output, used as clock), ce (count enable, the sensor's
// EN), clr_n (asynchronous clear, active low), count (current value).
// Timing: count changes one clock-to-q after each rising ro_clk edge with ce
// high.  ce is asynchronous to ro_clk; the sampling sequence only reads count
// after the ring has come to rest.
module ro_counter
  import tsn_pkg::*;
#(
  parameter int unsigned WIDTH = COUNT_W
) (
  input  logic             ro_clk,
  input  logic             ce,
  input  logic             clr_n,
  output logic [WIDTH-1:0] count
);
  timeunit 1ns;
  timeprecision 1fs;

  always_ff @(posedge ro_clk or negedge clr_n) begin
    if (!clr_n)  count <= '0;
    else if (ce) count <= count + 1'b1;
  end

endmodule
