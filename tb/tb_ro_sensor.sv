// tb_ro_sensor: one 7-stage sensor through three measurements (clear,
// 40 us window, read) at 30 C, 60 C and 45 C.  Each count must be within 2
// of 40 us times the ring frequency, worked out here from the printed
// 7-stage frequencies, and must not change once EN is low.
module tb_ro_sensor;
  import tsn_pkg::*;
  timeunit 1ns;
  timeprecision 1fs;

  logic   en = 1'b0, clr_n = 1'b1;
  temp_t  temp = 16'd3000;
  count_t count;
  int     checks = 0, failures = 0;

  ro_sensor dut (.en(en), .clr_n(clr_n), .temp(temp), .count(count));

  function automatic real freq_mhz(real t_c);
    real d30 = 1.0e6 / (268.425 * 14.0);
    real d60 = 1.0e6 / (248.925 * 14.0);
    return 1.0e6 / (14.0 * (d30 + (d60 - d30) * (t_c - 30.0) / 30.0));
  endfunction

  task automatic measure(real t_c);
    real    want;
    count_t held;
    temp = temp_t'($rtoi(t_c * 100.0));
    clr_n = 1'b0;
    #20ns clr_n = 1'b1;
    #10ns en = 1'b1;
    #40us en = 1'b0;
    #50ns;
    want = 40.0 * freq_mhz(t_c);
    checks++;
    if ((real'(count) - want) > 2.0 || (want - real'(count)) > 2.0) begin
      failures++;
      $display("FAIL %0.0f C: count %0d expected %0.1f", t_c, count, want);
    end
    held = count;
    #1us;
    checks++;
    if (count != held) begin
      failures++;
      $display("FAIL count moved after EN fell");
    end
  endtask

  initial begin
    measure(30.0);
    measure(60.0);
    measure(45.0);
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
