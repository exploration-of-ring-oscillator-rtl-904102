// tb_heat_generator: a bank of four heater cells, watched through the
// probe output and the cell outputs.  With EN low all outputs must stay
// 0; with EN high each must toggle with period 2 * 500 ps (1 GHz, so about
// 100 rising edges in 100 ns); after EN falls they must return to 0 and stay.
module tb_heat_generator;
  timeunit 1ns;
  timeprecision 1fs;

  localparam int unsigned C = 4;

  logic         en = 1'b0;
  logic [C-1:0] o;
  logic         probe;
  int           rises [C];
  int           checks = 0, failures = 0;

  heat_generator #(.N_LUTS(C)) dut (.en(en), .probe(probe));
  assign o = dut.cell_o;

  for (genvar c = 0; c < C; c++) begin : g_mon
    always @(posedge o[c]) rises[c]++;
  end

  initial begin
    #10ns;
    for (int c = 0; c < C; c++) rises[c] = 0;
    #100ns;
    checks++;
    if (o != '0 || rises[0] != 0) begin failures++; $display("FAIL toggling while disabled"); end
    en = 1'b1;
    #100ns;
    for (int c = 0; c < C; c++) begin
      checks++;
      if (rises[c] < 98 || rises[c] > 101) begin
        failures++;
        $display("FAIL cell %0d: %0d rising edges in 100 ns, expected about 100", c, rises[c]);
      end
    end
    checks++;
    if (probe != o[0]) begin failures++; $display("FAIL probe is not cell 0"); end
    en = 1'b0;
    #10ns;
    for (int c = 0; c < C; c++) rises[c] = 0;
    #100ns;
    checks++;
    if (o != '0 || rises[0] != 0) begin failures++; $display("FAIL not quiet after EN fell"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100us;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
