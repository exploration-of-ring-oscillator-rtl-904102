// tb_sensor_network: a 6-sensor network with a different temperature at
// every sensor.  A 40 us window with a random subset of sensors enabled must
// leave each enabled sensor with 40 us times its own ring frequency (within
// 2) and every disabled sensor at zero; a second window with a new subset
// checks that the shared clear empties all counters.
module tb_sensor_network;
  import tsn_pkg::*;
  timeunit 1ns;
  timeprecision 1fs;

  localparam int unsigned N = 6;

  logic [N-1:0] en = '0;
  logic         clr_n = 1'b1;
  temp_t        temp [N];
  count_t       count [N];
  int           checks = 0, failures = 0;

  sensor_network #(.NUM(N)) dut (.en(en), .clr_n(clr_n), .temp(temp), .count(count));

  function automatic real freq_mhz(real t_c);
    real d30 = 1.0e6 / (268.425 * 14.0);
    real d60 = 1.0e6 / (248.925 * 14.0);
    return 1.0e6 / (14.0 * (d30 + (d60 - d30) * (t_c - 30.0) / 30.0));
  endfunction

  task automatic window(logic [N-1:0] mask);
    clr_n = 1'b0;
    #20ns clr_n = 1'b1;
    #10ns en = mask;
    #40us en = '0;
    #50ns;
    for (int i = 0; i < N; i++) begin
      real want = mask[i] ? 40.0 * freq_mhz(real'(temp[i]) / 100.0) : 0.0;
      checks++;
      if ((real'(count[i]) - want) > 2.0 || (want - real'(count[i])) > 2.0) begin
        failures++;
        $display("FAIL sensor %0d: count %0d expected %0.1f", i, count[i], want);
      end
    end
  endtask

  initial begin
    for (int i = 0; i < N; i++) temp[i] = temp_t'(3000 + 600 * i);
    window(6'b101101);
    for (int i = 0; i < N; i++) temp[i] = temp_t'($urandom_range(3000, 6000));
    window(6'b010111);
    window('1);
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
