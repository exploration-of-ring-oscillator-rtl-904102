// tb_ro_tsn_top_full: one complete measurement on the platform at its
// default sizes: 140 sensors of 7 stages with 15-bit counters and 5 heater
// banks of 2,000 LUT oscillators.  Each sensor has its own temperature
// between 30 C and 60 C; one sensor in five is masked off; the heaters run
// for the first 200 ns of a 40 us window.  All 140 counts and one
// out-of-range index are then read back and compared with 40 us times the
// ring frequency worked out here from the printed 7-stage frequencies
// (masked sensors must read 0).  The window length is checked through busy.
module tb_ro_tsn_top_full;
  import tsn_pkg::*;
  timeunit 1ns;
  timeprecision 1fs;

  localparam int unsigned N = NUM_SENSORS;

  logic            clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  window_t         sample_cycles = '0;
  logic            busy, done;
  logic [N-1:0]    sensor_mask = '0;
  logic            heater_en = 1'b0;
  logic [NUM_HG-1:0] heater_probe;
  temp_t           temp [N];
  logic [7:0]      rd_sel = '0;
  count_t          rd_count;

  int checks = 0, failures = 0;
  int n_window = 0, n_masked = 0, n_cleared = 0, n_heater = 0, n_nearfull = 0, n_oor = 0;
  int heater_rises [NUM_HG];

  ro_tsn_top dut (
    .clk, .rst_n, .start, .sample_cycles, .busy, .done, .sensor_mask,
    .heater_en, .heater_probe, .temp, .rd_sel, .rd_count
  );

  always #5ns clk = ~clk;

  for (genvar h = 0; h < NUM_HG; h++) begin : g_hmon
    always @(posedge heater_probe[h]) heater_rises[h]++;
  end

  function automatic real freq_mhz(real t_c);
    real d30 = 1.0e6 / (268.425 * 14.0);
    real d60 = 1.0e6 / (248.925 * 14.0);
    return 1.0e6 / (14.0 * (d30 + (d60 - d30) * (t_c - 30.0) / 30.0));
  endfunction

  task automatic fail(string msg);
    failures++;
    $display("FAIL %s", msg);
  endtask

  task automatic window(int unsigned cycles, logic [N-1:0] mask, bit heat);
    int busy_cyc = 0;
    real us = real'(cycles) / real'(CLK_MHZ);
    sensor_mask = mask;
    for (int h = 0; h < NUM_HG; h++) heater_rises[h] = 0;
    sample_cycles = window_t'(cycles);
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    if (heat) begin
      heater_en = 1'b1;
      #200ns heater_en = 1'b0;
      #10ns;
      for (int h = 0; h < NUM_HG; h++) begin
        checks++;
        if (heater_rises[h] < 150) fail($sformatf("heater bank %0d: %0d toggles", h, heater_rises[h]));
        heater_rises[h] = 0;
      end
      n_heater++;
      busy_cyc = 21;
    end else begin
      busy_cyc = 1;
    end
    while (!done) begin
      @(negedge clk);
      if (busy) busy_cyc++;
    end
    checks++;
    if (busy_cyc != int'(cycles) + 6) fail($sformatf("busy for %0d cycles, expected %0d", busy_cyc, cycles + 6));
    if (!heat) begin
      checks++;
      for (int h = 0; h < NUM_HG; h++)
        if (heater_rises[h] != 0) fail("heater toggling while disabled");
    end
    n_window++;
    // read every sensor
    for (int i = 0; i <= N; i++) begin
      real want;
      @(negedge clk) rd_sel = 8'(i);
      @(negedge clk);
      checks++;
      if (i == N) begin
        if (rd_count != '0) fail("out-of-range index did not read 0");
        n_oor++;
        continue;
      end
      want = mask[i] ? us * freq_mhz(real'(temp[i]) / 100.0) : 0.0;
      if ((real'(rd_count) - want) > 2.0 || (want - real'(rd_count)) > 2.0)
        fail($sformatf("sensor %0d at %0d: count %0d expected %0.1f", i, temp[i], rd_count, want));
      if (!mask[i]) n_masked++;
      if (want > 30000.0) n_nearfull++;
    end
  endtask

  initial begin
    logic [N-1:0] half;
    for (int i = 0; i < N; i++) temp[i] = temp_t'(3000 + ((i * 7) % 31) * 100);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);

    for (int i = 0; i < N; i++) half[i] = (i % 5 != 4);
    window(SAMPLE_40US, half, 1'b1);

    $display("mechanisms: windows=%0d masked_reads=%0d cleared=%0d heater_runs=%0d near_full=%0d out_of_range=%0d",
             n_window, n_masked, n_cleared, n_heater, n_nearfull, n_oor);
    checks++; if (n_window != 1) fail("window did not run");
    checks++; if (n_masked == 0) fail("sensor mask never exercised");
    checks++; if (n_heater == 0) fail("heaters never ran");
    checks++; if (n_oor == 0) fail("no out-of-range read");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2ms;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
