// gsn_pyramid: one four-layer GSN pyramid of 15 trained neurons.
//
// Structure (binary tree, two inputs per neuron):
//   layer A: A0..A7, neuron An reads inputs e[2n] and e[2n+1]
//   layer B: Bi reads A(2i), A(2i+1)
//   layer C: Cj reads B(2j), B(2j+1)
//   layer D: D0 reads C0, C1 and is the pyramid output
// The network inputs are binary (0 or 1 only), so the A layer never sees U;
// from layer B on, the three-valued two-wire signals of gsn_pkg are used.
//
// Interface: e[15:0] binary inputs, y the three-valued output ({one, u}).
// Purely combinational: y settles one neuron delay per layer after e.
// MEM holds the four memory values of each neuron (index 0..7 = A0..A7,
// 8..11 = B0..B3, 12..13 = C0..C1, 14 = D0); the default is the trained
// pyramid published with the network description. The numbering of the inputs
// (input k of An is e[2n+k]) is this design's own reading of the layout.
module gsn_pyramid
  import gsn_pkg::*;
#(
  parameter gsn_pyr_mem_t MEM = PYR_MEM_TRAINED
) (
  input  logic [PYR_IN-1:0] e,
  output gsn_t              y
);

  gsn_t [N_A-1:0] a_out;
  gsn_t [N_B-1:0] b_out;
  gsn_t [N_C-1:0] c_out;

  for (genvar n = 0; n < N_A; n++) begin : g_a
    gsn_neuron #(.MEM(MEM[n])) u_a (
      .a(gsn_from_bit(e[2*n])), .b(gsn_from_bit(e[2*n+1])), .y(a_out[n])
    );
  end

  for (genvar i = 0; i < N_B; i++) begin : g_b
    gsn_neuron #(.MEM(MEM[N_A+i])) u_b (
      .a(a_out[2*i]), .b(a_out[2*i+1]), .y(b_out[i])
    );
  end

  for (genvar j = 0; j < N_C; j++) begin : g_c
    gsn_neuron #(.MEM(MEM[N_A+N_B+j])) u_c (
      .a(b_out[2*j]), .b(b_out[2*j+1]), .y(c_out[j])
    );
  end

  gsn_neuron #(.MEM(MEM[N_NEURON-1])) u_d (
    .a(c_out[0]), .b(c_out[1]), .y(y)
  );

endmodule
