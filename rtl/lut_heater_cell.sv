// lut_heater_cell: behavioural model of CELLS identical one-level LUT
// oscillators used as heaters.  It is a simulation model: the loop only
// oscillates because the model gives the LUT and its feedback route a delay.
// On the FPGA each cell is a single LUT6 whose output is routed back to its
// own inputs.  The cells of one bank share their enable and start together,
// so they are modelled as one vector updated by a single process, which
// keeps thousands of cells cheap to simulate and to elaborate.
//
// Structure of one cell: input I5 is EN; inputs I4..I0 are all tied to the
// output O.  The truth table (INIT 64'h0000000100000000) is 1 only at
// address 32, i.e. EN high and the fed-back output low.  So with EN high the
// LUT keeps inverting its own output and toggles as fast as the loop allows,
// burning dynamic power; with EN low the output settles to 0.
//
// Timing: the loop delay (LUT plus route) is LOOP_PS, so an enabled cell
// toggles with period 2 * LOOP_PS.  That delay is an assumed value.
//
// Ports: en (enable), o[i] (output of cell i, exposed so that it can be
// observed and kept by implementation tools).
module lut_heater_cell
  import tsn_pkg::*;
#(
  parameter int unsigned CELLS   = 1,
  parameter logic [63:0] INIT    = HEATER_LUT_INIT,
  parameter real         LOOP_PS = HEATER_LOOP_PS
) (
  input  logic             en,
  output logic [CELLS-1:0] o
);
  timeunit 1ns;
  timeprecision 1fs;

  logic [CELLS-1:0] lut_o;
  logic [CELLS-1:0] fb;

  // The LUT6 of every cell: address {I5, I4, I3, I2, I1, I0}.
  always_comb begin
    for (int c = 0; c < CELLS; c++) lut_o[c] = INIT[{en, {5{fb[c]}}}];
  end

  // LUT and feedback-route delay.
  initial fb = '0;
  always begin
    @(lut_o);
    #(LOOP_PS * 1ps);
    fb = lut_o;
  end

  assign o = fb;

endmodule
