// tb_ro_counter: drives the counter's ring clock directly with random
// enable patterns and clears, and compares every value with a reference
// count kept in the testbench.  Also checks that the clear acts without a
// clock edge and that the counter wraps at 2^WIDTH.
module tb_ro_counter;
  timeunit 1ns;
  timeprecision 1fs;

  localparam int unsigned W = 15;

  logic         ro_clk = 1'b0, ce = 1'b0, clr_n = 1'b1;
  logic [W-1:0] count;
  int unsigned  ref_cnt = 0;
  int           checks = 0, failures = 0;

  ro_counter #(.WIDTH(W)) dut (.ro_clk(ro_clk), .ce(ce), .clr_n(clr_n), .count(count));

  task automatic check(string what);
    checks++;
    if (count != W'(ref_cnt)) begin
      failures++;
      $display("FAIL %s: count %0d expected %0d", what, count, W'(ref_cnt));
    end
  endtask

  task automatic pulse();
    #1ns ro_clk = 1'b1;
    if (ce) ref_cnt++;
    #1ns ro_clk = 1'b0;
  endtask

  initial begin
    #1ns clr_n = 1'b0;
    #1ns clr_n = 1'b1;
    ref_cnt = 0;
    check("after clear");
    for (int i = 0; i < 2000; i++) begin
      ce = ($urandom_range(0, 3) != 0);
      pulse();
      check("random enable");
      if ($urandom_range(0, 199) == 0) begin
        #0.5ns clr_n = 1'b0;
        #0.5ns ref_cnt = 0;
        check("asynchronous clear");
        clr_n = 1'b1;
      end
    end
    // wrap-around
    ce = 1'b1;
    for (int i = 0; i < (1 << W); i++) pulse();
    check("wrap");
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
