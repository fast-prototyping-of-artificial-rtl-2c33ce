// flecha_network: the complete GSN network mapped onto FLECHA logic cells,
// N_PYR pyramids of 42 cells each (default 4 pyramids, 60 neurons, 168
// cells).
//
// Each pyramid is a flecha_pyramid; all read the same binary input vector
// e[15:0]. Their configuration chains are joined into one:
//   cfg_in -> pyramid 0 -> pyramid 1 -> ... -> pyramid N_PYR-1 -> cfg_out
// so the network is loaded with one N_PYR * 462-bit stream
// (flecha_pkg::network_chain builds it for N_PYR = NET_PYR). What each
// pyramid computes comes only from that stream, so the same cells hold any
// trained network. As in gsn_network, `code` collects the pyramids' one-wires
// and `code_valid` is high when no pyramid is at U; that decode is this
// design's addition.
//
// Timing: combinational from e to y (six cell delays per pyramid), or one
// clk cycle late for a pyramid whose D0 cells are configured as registered.
// The chain shifts on rising clk while cfg_en is high; until it is loaded the
// outputs are meaningless. rst_n clears the cells' user flip-flops. Chaining
// the pyramids in index order is this design's choice.
module flecha_network
  import gsn_pkg::*;
  import flecha_pkg::*;
#(
  parameter int unsigned N_PYR = NET_PYR
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cfg_en,
  input  logic              cfg_in,
  output logic              cfg_out,
  input  logic [PYR_IN-1:0] e,
  output gsn_t [N_PYR-1:0]  y,
  output logic [N_PYR-1:0]  code,
  output logic              code_valid
);

  logic [N_PYR:0]   chain;
  logic [N_PYR-1:0] is_u;

  assign chain[0] = cfg_in;
  assign cfg_out  = chain[N_PYR];

  for (genvar p = 0; p < N_PYR; p++) begin : g_pyr
    flecha_pyramid u_pyr (
      .clk(clk), .rst_n(rst_n), .cfg_en(cfg_en),
      .cfg_in(chain[p]), .cfg_out(chain[p+1]), .e(e), .y(y[p])
    );
    assign code[p] = y[p][1];
    assign is_u[p] = y[p][0];
  end

  assign code_valid = ~|is_u;

endmodule
