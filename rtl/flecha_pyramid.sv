// flecha_pyramid: one GSN pyramid mapped onto 42 FLECHA logic cells.
//
// A neuron with two-wire inputs takes six cells (flecha_neuron). A first-layer
// neuron has only two binary inputs, so each pair of first-layer neurons is
// merged with the second-layer neuron they feed: together they are a function
// of four binary inputs with a two-wire output, and they too fit in six
// cells. The pyramid is then seven six-cell neurons:
//   group g (g = 0..3): inputs e[4g+3:4g], computes A(2g), A(2g+1) and Bg
//   C0: reads B0, B1;  C1: reads B2, B3;  D0: reads C0, C1 -> y
// 7 x 6 = 42 cells. Only the wiring is fixed here; what each cell computes
// comes from the configuration loaded into the chain, so the same block
// holds any trained pyramid (flecha_pkg::pyramid_chain builds the stream).
//
// Configuration: one 462-bit chain cfg_in -> group 0 -> ... -> group 3 ->
// C0 -> C1 -> D0 -> cfg_out, shifted on rising clk while cfg_en is high.
// Until it is loaded the output is meaningless.
//
// Timing: combinational from e to y (three six-cell neurons deep, six cell
// delays) unless the D0 cells are configured as registered, in which case y
// follows e by one clk cycle. rst_n clears the cells' user flip-flops.
module flecha_pyramid
  import gsn_pkg::*;
  import flecha_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cfg_en,
  input  logic              cfg_in,
  output logic              cfg_out,
  input  logic [PYR_IN-1:0] e,
  output gsn_t              y
);

  logic [PYR_NEURONS:0] chain;
  gsn_t [N_B-1:0]       b_out;
  gsn_t [N_C-1:0]       c_out;

  assign chain[0] = cfg_in;
  assign cfg_out  = chain[PYR_NEURONS];

  for (genvar g = 0; g < N_B; g++) begin : g_grp
    flecha_neuron u_grp (
      .clk(clk), .rst_n(rst_n), .cfg_en(cfg_en),
      .cfg_in(chain[g]), .cfg_out(chain[g+1]),
      .x(e[4*g +: 4]), .y(b_out[g])
    );
  end

  for (genvar j = 0; j < N_C; j++) begin : g_c
    flecha_neuron u_c (
      .clk(clk), .rst_n(rst_n), .cfg_en(cfg_en),
      .cfg_in(chain[N_B+j]), .cfg_out(chain[N_B+j+1]),
      .x({b_out[2*j+1][0], b_out[2*j+1][1], b_out[2*j][0], b_out[2*j][1]}),
      .y(c_out[j])
    );
  end

  flecha_neuron u_d (
    .clk(clk), .rst_n(rst_n), .cfg_en(cfg_en),
    .cfg_in(chain[PYR_NEURONS-1]), .cfg_out(chain[PYR_NEURONS]),
    .x({c_out[1][0], c_out[1][1], c_out[0][0], c_out[0][1]}),
    .y(y)
  );

endmodule
