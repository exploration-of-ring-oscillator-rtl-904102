// ring_oscillator: behavioural model of the sensor's ring oscillator.  This
// is a simulation model, not synthesizable logic: on the FPGA the ring is a
// NAND gate and an even number of inverters placed as LUTs with fixed routing.
//
// Structure: stage 0 is a two-input NAND of EN and the ring output; stages
// 1 .. STAGES-1 are inverters (an even number of them, so the loop has an
// odd number of inversions).  With EN low the NAND holds its output high and
// the ring rests with ro_out high.  When EN rises the wave starts running and
// ro_out toggles with period 2 * STAGES * tD.  When EN falls the wave in
// flight finishes and the ring comes to rest again.
//
// Timing: every stage has the same delay tD(T), interpolated linearly between
// the values at 30 C and 60 C.  The defaults reproduce the frequencies the
// 7-stage ring shows at those two temperatures; longer rings get the same
// per-stage delay, which is this model's simplification (real rings differ
// by routing).  The temperature input is a model-only port: it stands for
// the die temperature at the sensor's location, in 0.01 C.
//
// Ports: en (enable), temp (die temperature, 0.01 C), ro_out (ring output).
module ring_oscillator
  import tsn_pkg::*;
#(
  parameter int unsigned STAGES     = RO_STAGES,
  parameter real         TD_30C     = TD_30C_PS,
  parameter real         TD_60C     = TD_60C_PS
) (
  input  logic  en,
  input  temp_t temp,
  output logic  ro_out
);
  timeunit 1ns;
  timeprecision 1fs;

  // Stage outputs; stage[0] is the NAND.
  logic    stage [STAGES];
  realtime td;

  always_comb begin
    td = (TD_30C + (TD_60C - TD_30C) * ((real'(temp) / 100.0) - 30.0) / 30.0) * 1ps;
  end

  // Rest state with EN low: NAND high, then alternating.
  initial begin
    for (int i = 0; i < STAGES; i++) stage[i] = (i % 2 == 0);
  end

  always begin
    @(en or stage[STAGES-1]);
    #(td);
    stage[0] = ~(en & stage[STAGES-1]);
  end

  for (genvar i = 1; i < STAGES; i++) begin : g_inv
    always begin
      @(stage[i-1]);
      #(td);
      stage[i] = ~stage[i-1];
    end
  end

  assign ro_out = stage[STAGES-1];

  initial begin
    assert (STAGES >= 3 && STAGES % 2 == 1)
      else $error("ring_oscillator: STAGES must be odd and at least 3");
  end

endmodule
