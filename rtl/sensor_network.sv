// sensor_network: the array of ring-oscillator temperature sensors.
//
// NUM sensors are spread over the die, one per floorplan tile.  Each has its
// own enable bit, so any subset can be sampled, and all share one counter
// clear.  Every sensor's count is brought out; the readout logic selects
// one of them for the processor.
//
// Ports: en[i] (enable of sensor i), clr_n (asynchronous clear of all
// counters, active low), temp[i] (die temperature at sensor i, 0.01 C, model
// input only), count[i] (count of sensor i).
module sensor_network
  import tsn_pkg::*;
#(
  parameter int unsigned NUM    = NUM_SENSORS,
  parameter int unsigned STAGES = RO_STAGES,
  parameter int unsigned WIDTH  = COUNT_W
) (
  input  logic [NUM-1:0]   en,
  input  logic             clr_n,
  input  temp_t            temp  [NUM],
  output logic [WIDTH-1:0] count [NUM]
);
  timeunit 1ns;
  timeprecision 1fs;

  for (genvar i = 0; i < NUM; i++) begin : g_sensor
    ro_sensor #(.STAGES(STAGES), .WIDTH(WIDTH)) u_sensor (
      .en    (en[i]),
      .clr_n (clr_n),
      .temp  (temp[i]),
      .count (count[i])
    );
  end

endmodule
