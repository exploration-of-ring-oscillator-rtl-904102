// count_readout: the path through which the processor reads sensor counts.
//
// The processor names a sensor with sel and gets its count on rd_count one
// clock later (a registered multiplexer).  An index beyond the last sensor
// reads as zero.  Counts are only read after a sampling window has ended
// and the rings have stopped, so the counter values are stable when they
// cross into the clock domain.
//
// Ports: clk, rst_n, sel (sensor index), count[i] (all sensor counts),
// rd_count (count of the selected sensor, one cycle after sel).
module count_readout
  import tsn_pkg::*;
#(
  parameter int unsigned NUM   = NUM_SENSORS,
  parameter int unsigned WIDTH = COUNT_W,
  parameter int unsigned SEL_W = (NUM > 1) ? $clog2(NUM) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [SEL_W-1:0] sel,
  input  logic [WIDTH-1:0] count [NUM],
  output logic [WIDTH-1:0] rd_count
);
  timeunit 1ns;
  timeprecision 1fs;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                  rd_count <= '0;
    else if (32'(sel) < NUM)     rd_count <= count[sel];
    else                         rd_count <= '0;
  end

endmodule
