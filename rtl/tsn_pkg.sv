// tsn_pkg: constants and types shared by the ring-oscillator temperature
// sensor network.
//
// The network counts ring-oscillator (RO) edges during a fixed sampling
// window timed by a 100 MHz system clock.  The numbers below are the ones the
// platform is built around: a 15-bit counter per sensor, 140 sensors, five
// heat generators totalling 10,000 LUT oscillators, and sampling windows of
// 40, 80 or 120 us.  Temperatures handed to the oscillator models are carried
// as unsigned hundredths of a degree Celsius (3000 = 30.00 C); that encoding
// is this design's own choice.
package tsn_pkg;
  timeunit 1ns;
  timeprecision 1fs;

  // Counter width of every sensor.
  localparam int unsigned COUNT_W = 15;
  // Sensors in the network.
  localparam int unsigned NUM_SENSORS = 140;
  // Inverting stages of a ring (one NAND plus an even number of inverters).
  localparam int unsigned RO_STAGES = 7;
  // Heat generators and LUT oscillators in all of them together.
  localparam int unsigned NUM_HG = 5;
  localparam int unsigned TOTAL_HEATER_LUTS = 10_000;
  localparam int unsigned LUTS_PER_HG = TOTAL_HEATER_LUTS / NUM_HG;

  // System clock and the three sampling windows, in clock cycles.
  localparam int unsigned CLK_MHZ = 100;
  localparam int unsigned WINDOW_W = 16;
  localparam int unsigned SAMPLE_40US = 40 * CLK_MHZ;
  localparam int unsigned SAMPLE_80US = 80 * CLK_MHZ;
  localparam int unsigned SAMPLE_120US = 120 * CLK_MHZ;

  // Ring-oscillator timing.  The printed frequencies of the 7-stage ring are
  // 268.425 MHz at 30 C and 248.925 MHz at 60 C.  One period is two trips
  // round the ring, so the delay of one stage is 1 / (2 * 7 * f); the model
  // interpolates it linearly in temperature.
  localparam real RO7_F30_MHZ = 268.425;
  localparam real RO7_F60_MHZ = 248.925;
  localparam real TD_30C_PS = 1.0e6 / (RO7_F30_MHZ * 2.0 * 7.0);
  localparam real TD_60C_PS = 1.0e6 / (RO7_F60_MHZ * 2.0 * 7.0);

  // Delay of a heater LUT plus its feedback route (not given; assumed).
  localparam real HEATER_LOOP_PS = 500.0;

  // Heater LUT6 truth table: output high only for address 32 (I5=EN=1 and
  // the fed-back output low), so the LUT inverts its own output while EN=1.
  localparam logic [63:0] HEATER_LUT_INIT = 64'h0000_0001_0000_0000;

  typedef logic [COUNT_W-1:0] count_t;
  typedef logic [WINDOW_W-1:0] window_t;
  // Temperature in units of 0.01 C.
  typedef logic [15:0] temp_t;

endpackage
