// tb_ring_oscillator: checks the ring-oscillator model against the printed
// 7-stage frequencies (268.425 MHz at 30 C, 248.925 MHz at 60 C).
// Rings of 7 and 31 stages are run for 40 us windows at 30, 45 and 60 C; the
// number of rising edges must be within 2 of window / period, where the
// period is 2 * stages * tD and tD is derived here from those frequencies.
// With EN low each ring must rest with its output high and not toggle.
module tb_ring_oscillator;
  import tsn_pkg::*;
  timeunit 1ns;
  timeprecision 1fs;

  logic  en;
  temp_t temp;
  logic  out7, out31;
  int    edges7, edges31;
  int    checks = 0, failures = 0;

  ring_oscillator #(.STAGES(7))  u7  (.en(en), .temp(temp), .ro_out(out7));
  ring_oscillator #(.STAGES(31)) u31 (.en(en), .temp(temp), .ro_out(out31));

  always @(posedge out7)  edges7++;
  always @(posedge out31) edges31++;

  function automatic real stage_ps(real t_c);
    real d30 = 1.0e6 / (268.425 * 14.0);
    real d60 = 1.0e6 / (248.925 * 14.0);
    return d30 + (d60 - d30) * (t_c - 30.0) / 30.0;
  endfunction

  task automatic check_near(string what, int got, real want);
    checks++;
    if ((real'(got) - want) > 2.0 || (want - real'(got)) > 2.0) begin
      failures++;
      $display("FAIL %s: got %0d expected %0.1f", what, got, want);
    end
  endtask

  task automatic window(real t_c);
    real w_ps = 40.0e6;
    temp = temp_t'($rtoi(t_c * 100.0));
    edges7 = 0; edges31 = 0;
    en = 1'b1;
    #40us;
    en = 1'b0;
    #100ns;
    check_near($sformatf("7-stage at %0.0f C", t_c),  edges7,  w_ps / (2.0 * 7.0  * stage_ps(t_c)));
    check_near($sformatf("31-stage at %0.0f C", t_c), edges31, w_ps / (2.0 * 31.0 * stage_ps(t_c)));
  endtask

  initial begin
    en = 1'b0;
    temp = 16'd3000;
    #10ns;
    edges7 = 0; edges31 = 0;
    #1us;
    // at rest
    checks++;
    if (edges7 != 0 || edges31 != 0 || out7 != 1'b1 || out31 != 1'b1) begin
      failures++;
      $display("FAIL ring not at rest with EN low");
    end
    window(30.0);
    window(45.0);
    window(60.0);
    // stops after EN falls
    edges7 = 0; edges31 = 0;
    #2us;
    checks++;
    if (edges7 != 0 || edges31 != 0) begin
      failures++;
      $display("FAIL ring still toggling after EN fell");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1ms;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
