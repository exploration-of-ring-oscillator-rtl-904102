// tb_sample_timer: runs windows of random length (and of length 0) and
// checks, cycle by cycle, that clr_n is low for exactly CLR_CYCLES cycles
// before the window, sensor_en is high for exactly sample_cycles cycles,
// done follows SETTLE_CYCLES cycles after the window, busy covers the whole
// sequence, and a start while busy is ignored.
module tb_sample_timer;
  import tsn_pkg::*;
  timeunit 1ns;
  timeprecision 1fs;

  logic    clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  window_t sample_cycles = '0;
  logic    sensor_en, clr_n, busy, done;
  int      checks = 0, failures = 0;

  sample_timer dut (.clk(clk), .rst_n(rst_n), .start(start), .sample_cycles(sample_cycles),
                    .sensor_en(sensor_en), .clr_n(clr_n), .busy(busy), .done(done));

  always #5ns clk = ~clk;

  task automatic expect_eq(string what, int got, int want);
    checks++;
    if (got != want) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, want);
    end
  endtask

  task automatic run(int unsigned n);
    int clr_cyc = 0, en_cyc = 0, after_en = 0, busy_cyc = 0, total = 0;
    bit seen_en = 0;
    sample_cycles = window_t'(n);
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    while (!done) begin
      // a start pulse while busy must be ignored
      start = (total == 1);
      if (!clr_n) clr_cyc++;
      if (sensor_en) begin en_cyc++; seen_en = 1; end
      if (!sensor_en && (seen_en || n == 0) && clr_n && busy) after_en++;
      if (busy) busy_cyc++;
      total++;
      if (total > 100000) break;
      @(negedge clk);
    end
    expect_eq("clear cycles", clr_cyc, 2);
    expect_eq("window cycles", en_cyc, int'(n));
    expect_eq("settle cycles", after_en, 4);
    expect_eq("busy cycles", busy_cyc, 2 + int'(n) + 4);
    @(negedge clk);
    expect_eq("done is a pulse", int'(done), 0);
    expect_eq("idle after done", int'(busy), 0);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);
    expect_eq("reset: en", int'(sensor_en), 0);
    expect_eq("reset: clr_n", int'(clr_n), 1);
    run(SAMPLE_40US);
    run(0);
    run(1);
    for (int i = 0; i < 5; i++) run($urandom_range(1, 300));
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
