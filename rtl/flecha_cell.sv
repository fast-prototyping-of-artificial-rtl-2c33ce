// flecha_cell: the three-input programmable logic cell of the FLECHA
// user-programmable gate array.
//
// Functional block: an 8-bit configuration memory holds the truth table
// D0..D7 of any Boolean function of three inputs, and an 8:1 multiplexer
// addressed by the inputs E1, E2, E3 picks the entry (D[{E3,E2,E1}]).
// Output block: a 2:1 multiplexer controlled by configuration bit S3 passes
// either the truth-table value directly (S3 = 0) or the value stored in an
// edge-triggered D flip-flop at the last rising clock edge (S3 = 1), so a
// cell is combinational or sequential.
// Routing: four multiplexers connect E1, E2, E3 and the output to the four
// lines of the cell data bus. They share the two select bits S1, S2, each
// with its own polarity: mux A uses (S1, S2), B (!S1, S2), C (S1, !S2) and
// the output mux S (!S1, !S2), so the four always take four different
// lines. Line number = {first select, second select}, e.g. S1 = S2 = 0 gives
// A = line 0, C = line 1, B = line 2, S = line 3 (bit order own choice).
//
// Configuration: the 11 bits (flecha_cfg_t: S3, S2, S1, D7..D0) form a shift
// register. While cfg_en is high each rising clk edge moves cfg_in into the
// top bit and the bits down by one; cfg_out is the bottom bit, so cells chain
// cfg_out -> cfg_in. The user flip-flop holds its value while the chain
// shifts, so loading leaves the user state alone; the combinational path is
// not gated. The single clock for user flip-flop and configuration, the hold
// and the reset of the user flip-flop (rst_n, asynchronous, active low) are
// this design's own choices.
//
// Interface: bus_i are the four data-bus lines as seen by the cell; out is
// the cell output; bus_o/bus_oe put the output on the line chosen by the
// output mux (one-hot enable), for the interconnect to resolve.
module flecha_cell
  import flecha_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       cfg_en,
  input  logic       cfg_in,
  output logic       cfg_out,
  input  logic [3:0] bus_i,
  output logic       out,
  output logic [3:0] bus_o,
  output logic [3:0] bus_oe
);

  flecha_cfg_t cfg;
  logic        e1, e2, e3;
  logic        f;        // functional-block output
  logic        ff_q;
  logic [1:0]  line_s;

  // Configuration shift register.
  always_ff @(posedge clk) begin
    if (cfg_en) cfg <= {cfg_in, cfg[CFG_BITS-1:1]};
  end
  assign cfg_out = cfg[0];

  // Input multiplexers A, B, C.
  assign e1 = bus_i[{ cfg.s1,  cfg.s2}];
  assign e2 = bus_i[{~cfg.s1,  cfg.s2}];
  assign e3 = bus_i[{ cfg.s1, ~cfg.s2}];

  // Functional block: 8:1 multiplexer over the truth table.
  assign f = cfg.d[{e3, e2, e1}];

  // Output block.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       ff_q <= 1'b0;
    else if (!cfg_en) ff_q <= f;
  end
  assign out = cfg.s3 ? ff_q : f;

  // Output multiplexer S.
  assign line_s = {~cfg.s1, ~cfg.s2};
  always_comb begin
    bus_oe         = '0;
    bus_oe[line_s] = 1'b1;
    bus_o          = {4{out}} & bus_oe;
  end

endmodule
