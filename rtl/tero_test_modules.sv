// tero_test_modules: behavioural model (not synthesizable) of the TERO test
// structures of the HECTOR ASIC: 128 TERO cells in 16 blocks of 8, each
// block built in a different configuration, so that the mean number of
// oscillations can be related to the configuration.
//
// Only one cell runs at a time: a de-multiplexer sends the activation signal
// `ctrl` to the cell chosen by `sel`, and a multiplexer sends that cell's
// output to `lvds_out` (an LVDS output pair on the chip). In the model, the
// cells of block b = sel/8 share a mean oscillation count that depends on b
// (osc_bank with C_GROUP = 8); within a block the oscillation period still
// varies from cell to cell.
module tero_test_modules (
  input  logic       ctrl,     // activation of the selected cell
  input  logic [6:0] sel,      // cell 0..127; block = sel[6:3]
  output logic       lvds_out  // selected cell output
);

  osc_bank #(
    .N(128), .MODE(1'b1), .SEED(5), .C_BASE(100), .C_SPAN(800), .C_GROUP(8)
  ) u_cells (
    .trig(ctrl), .sel, .out(lvds_out)
  );

endmodule
