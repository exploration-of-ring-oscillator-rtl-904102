// tb_ro_tsn_top: end-to-end test of the whole platform, reduced to 12
// sensors and 64 cells per heater bank to keep the run short (rings of 7
// stages, 15-bit counters and 5 heater banks as in the default design).
//
// Each sensor gets its own die temperature between 30 C and 60 C.  Three
// sampling windows are run, 40, 80 and 120 us (4000, 8000, 12000 cycles):
//   1. all sensors, heaters switched on for part of the window;
//   2. a random half of the sensors masked off, heaters off;
//   3. all sensors with some at 30 C, where the 120 us count comes close to
//      the top of the 15-bit counter.
// After each window all counts (and one out-of-range index) are read
// through the readout port and compared with window * f(T), f worked out
// here from the printed 7-stage frequencies; masked sensors must read 0,
// which also shows the counters were cleared.  The window length is checked
// through busy.  Mechanisms counted: window, sensor mask, counter clear,
// heater activity, near-full count, out-of-range read.
module tb_ro_tsn_top;
  import tsn_pkg::*;
  timeunit 1ns;
  timeprecision 1fs;

  localparam int unsigned N = 12;

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

  ro_tsn_top #(.NUM(N), .HG_LUTS(64)) dut (
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

    window(SAMPLE_40US, '1, 1'b1);

    for (int i = 0; i < N; i++) half[i] = $urandom_range(0, 1);
    half[0] = 1'b0;
    window(SAMPLE_80US, half, 1'b0);
    n_cleared = n_masked;   // masked sensors held counts from window 1

    for (int i = 0; i < N; i += 4) temp[i] = 16'd3000;
    window(SAMPLE_120US, '1, 1'b0);

    $display("mechanisms: windows=%0d masked_reads=%0d cleared=%0d heater_runs=%0d near_full=%0d out_of_range=%0d",
             n_window, n_masked, n_cleared, n_heater, n_nearfull, n_oor);
    checks++; if (n_window != 3) fail("not all windows ran");
    checks++; if (n_masked == 0) fail("sensor mask never exercised");
    checks++; if (n_cleared == 0) fail("counter clear never exercised");
    checks++; if (n_heater == 0) fail("heaters never ran");
    checks++; if (n_nearfull == 0) fail("no count near the counter's limit");
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
