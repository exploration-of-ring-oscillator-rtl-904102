// ro_tsn_top: the ring-oscillator temperature-sensor network platform.
//
// A network of ring-oscillator sensors measures the die temperature at many
// places at once, while banks of LUT-oscillator heaters warm the die in a
// controlled way.  A measurement is one sampling window: the sample timer
// clears every counter, enables the selected sensors for sample_cycles
// cycles of the 100 MHz clock and then stops them; each count is then the
// local ring frequency times the window, from which software derives the
// temperature with a per-sensor calibration polynomial.  The counts are read
// one at a time through a registered selector.
//
// The processor, its bus, the on-die voltage/temperature monitor and the
// serial logger that surround this logic on the platform are not part of
// it; their control and data signals are the ports below.
//
// Ports:
//   clk, rst_n      100 MHz system clock, asynchronous active-low reset
//   start           pulse: begin one sampling window
//   sample_cycles   window length in clock cycles (4000 = 40 us)
//   busy, done      window in progress / one-cycle pulse when counts are ready
//   sensor_mask[i]  sensor i takes part in the window
//   heater_en       enables every heat generator bank
//   heater_probe[h] one cell output of bank h, for observation
//   temp[i]         die temperature at sensor i in 0.01 C; drives the ring
//                   models only (on silicon it is physics, not a pin)
//   rd_sel          sensor index to read
//   rd_count        count of sensor rd_sel, one cycle after rd_sel
// Timing: see sample_timer.  sensor_mask must be held while busy.
module ro_tsn_top
  import tsn_pkg::*;
#(
  parameter int unsigned NUM      = NUM_SENSORS,
  parameter int unsigned STAGES   = RO_STAGES,
  parameter int unsigned WIDTH    = COUNT_W,
  parameter int unsigned N_HG     = NUM_HG,
  parameter int unsigned HG_LUTS  = LUTS_PER_HG,
  parameter int unsigned SEL_W    = (NUM > 1) ? $clog2(NUM) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  window_t          sample_cycles,
  output logic             busy,
  output logic             done,
  input  logic [NUM-1:0]   sensor_mask,
  input  logic             heater_en,
  output logic [N_HG-1:0]  heater_probe,
  input  temp_t            temp [NUM],
  input  logic [SEL_W-1:0] rd_sel,
  output logic [WIDTH-1:0] rd_count
);
  timeunit 1ns;
  timeprecision 1fs;

  logic             win_en;
  logic             clr_n;
  logic [NUM-1:0]   sensor_en;
  logic [WIDTH-1:0] count [NUM];

  sample_timer u_timer (
    .clk           (clk),
    .rst_n         (rst_n),
    .start         (start),
    .sample_cycles (sample_cycles),
    .sensor_en     (win_en),
    .clr_n         (clr_n),
    .busy          (busy),
    .done          (done)
  );

  assign sensor_en = sensor_mask & {NUM{win_en}};

  sensor_network #(.NUM(NUM), .STAGES(STAGES), .WIDTH(WIDTH)) u_net (
    .en    (sensor_en),
    .clr_n (clr_n),
    .temp  (temp),
    .count (count)
  );

  count_readout #(.NUM(NUM), .WIDTH(WIDTH), .SEL_W(SEL_W)) u_rd (
    .clk      (clk),
    .rst_n    (rst_n),
    .sel      (rd_sel),
    .count    (count),
    .rd_count (rd_count)
  );

  for (genvar h = 0; h < N_HG; h++) begin : g_hg
    heat_generator #(.N_LUTS(HG_LUTS)) u_hg (
      .en    (heater_en),
      .probe (heater_probe[h])
    );
  end

endmodule
