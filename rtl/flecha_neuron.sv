// flecha_neuron: a GSN neuron built from six FLECHA logic cells.
//
// A neuron has four input wires E0..E3 (two three-valued inputs of two wires
// each, or four binary inputs for a merged first-layer group) and two output
// wires B0, B1 (the one-wire and the U-wire of its three-valued output). Each
// output wire is a 4-input function, too wide for one 3-input cell, so it is
// split on E3: cells 1 and 2 hold the function of E0..E2 for E3 = 0 and
// E3 = 1, and cell 5 chooses between them with E3 (B0); cells 3, 4 and 6 do
// the same for B1. Which lines each cell reads is set by its S1/S2 bits; the
// mapping in flecha_pkg::neuron_cfg uses S1 = S2 = 0 everywhere.
//
// Wiring: cells 1..4 see the input bus {E3, E2, E1, E0} (line k = Ek). Cell 5
// sees {0, E3, cell 2, cell 1}, cell 6 {0, E3, cell 4, cell 3} (lines 3..0).
// The split on E3 and this line assignment are this design's reading of the
// published six-cell arrangement, which does not show which wire goes where.
//
// Configuration: one shift chain cfg_in -> cell 1 -> ... -> cell 6 ->
// cfg_out, 66 bits, shifted while cfg_en is high. The first bit shifted in
// ends in bit 0 of cell 6.
//
// Timing: with S3 = 0 in all cells the neuron is combinational (two cell
// delays). With S3 = 1 in cells 5 and 6 the output is registered: y shows
// the function of the inputs present at the previous rising clk edge.
module flecha_neuron
  import gsn_pkg::*;
  import flecha_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       cfg_en,
  input  logic       cfg_in,
  output logic       cfg_out,
  input  logic [3:0] x,       // x[k] = Ek
  output gsn_t       y        // {B0, B1}
);

  logic [NEURON_CELLS:0]   chain;
  logic [NEURON_CELLS-1:0] c_out;

  assign chain[0] = cfg_in;
  assign cfg_out  = chain[NEURON_CELLS];

  for (genvar c = 0; c < NEURON_CELLS; c++) begin : g_cell
    logic [3:0] bus, bus_o_unused, bus_oe_unused;
    if (c < 4) begin : g_first
      assign bus = x;
    end else begin : g_select
      assign bus = {1'b0, x[3], c_out[2*(c-4)+1], c_out[2*(c-4)]};
    end
    flecha_cell u_cell (
      .clk    (clk),
      .rst_n  (rst_n),
      .cfg_en (cfg_en),
      .cfg_in (chain[c]),
      .cfg_out(chain[c+1]),
      .bus_i  (bus),
      .out    (c_out[c]),
      .bus_o  (bus_o_unused),
      .bus_oe (bus_oe_unused)
    );
  end

  assign y = {c_out[4], c_out[5]};

endmodule
