// heat_generator: one bank of LUT-oscillator heaters sharing an enable.
//
// The platform heats the die from 30 C to 60 C with five such banks holding
// 10,000 LUT oscillators between them (2,000 each by default).  Every cell
// toggles at the fastest rate its loop allows while en is high, which turns
// the bank into a controllable heat source; with en low all cells are quiet.
// The heaters have no functional output.  probe is cell 0's output, brought
// out so that a bank can be observed; the keep attribute stops
// implementation tools from removing the cells, whose outputs drive nothing
// else (hence the lint note that cell_o[N_LUTS-1:1] is unused, which is
// intended).
//
// Ports: en (bank enable), probe (output of cell 0).
module heat_generator
  import tsn_pkg::*;
#(
  parameter int unsigned N_LUTS = LUTS_PER_HG
) (
  input  logic en,
  output logic probe
);
  timeunit 1ns;
  timeprecision 1fs;

  (* keep = "true" *) logic [N_LUTS-1:0] cell_o;

  lut_heater_cell #(.CELLS(N_LUTS)) u_cells (
    .en (en),
    .o  (cell_o)
  );

  assign probe = cell_o[0];

endmodule
