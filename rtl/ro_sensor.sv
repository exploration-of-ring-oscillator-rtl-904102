// ro_sensor: one ring-oscillator temperature sensor.
//
// A NAND-gated ring oscillator drives the clock of a binary counter.  The
// same EN starts the ring and enables the counter, so the counter only
// counts inside the sampling window, and the ring is stopped outside it,
// which keeps the sensor from heating the die between samples.  The count
// after a window of W seconds is about W * f(T); the ring frequency falls as
// the die warms up.  The ring is a simulation model (see ring_oscillator);
// the counter is synthesizable.
//
// Ports: en (sensor enable), clr_n (asynchronous counter clear, active low),
// temp (die temperature at the sensor, 0.01 C, drives the model only),
// count (counter value).
module ro_sensor
  import tsn_pkg::*;
#(
  parameter int unsigned STAGES = RO_STAGES,
  parameter int unsigned WIDTH  = COUNT_W
) (
  input  logic             en,
  input  logic             clr_n,
  input  temp_t            temp,
  output logic [WIDTH-1:0] count
);
  timeunit 1ns;
  timeprecision 1fs;

  logic ro_out;

  ring_oscillator #(.STAGES(STAGES)) u_ro (
    .en     (en),
    .temp   (temp),
    .ro_out (ro_out)
  );

  ro_counter #(.WIDTH(WIDTH)) u_cnt (
    .ro_clk (ro_out),
    .ce     (en),
    .clr_n  (clr_n),
    .count  (count)
  );

endmodule
