// tb_count_readout: random counts on a 10-input selector; every index,
// including out-of-range ones, is read and the result compared one clock
// after the index was applied.
module tb_count_readout;
  import tsn_pkg::*;
  timeunit 1ns;
  timeprecision 1fs;

  localparam int unsigned N = 10;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic [3:0] sel = '0;
  count_t     count [N];
  count_t     rd_count;
  int         checks = 0, failures = 0;

  count_readout #(.NUM(N)) dut (.clk(clk), .rst_n(rst_n), .sel(sel), .count(count), .rd_count(rd_count));

  always #5ns clk = ~clk;

  initial begin
    for (int i = 0; i < N; i++) count[i] = count_t'($urandom);
    repeat (2) @(negedge clk);
    checks++;
    if (rd_count != '0) begin failures++; $display("FAIL reset value"); end
    rst_n = 1'b1;
    for (int r = 0; r < 200; r++) begin
      int unsigned s = $urandom_range(0, 15);
      count_t want;
      @(negedge clk) sel = 4'(s);
      want = (s < N) ? count[s] : '0;
      @(negedge clk);
      checks++;
      if (rd_count != want) begin
        failures++;
        $display("FAIL sel %0d: got %0d expected %0d", s, rd_count, want);
      end
      if (r % 50 == 0) for (int i = 0; i < N; i++) count[i] = count_t'($urandom);
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
