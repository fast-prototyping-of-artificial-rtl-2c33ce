// gsn_network: the complete GSN network, N_PYR pyramids of 15 neurons
// (default 4 pyramids, 60 neurons, four layers each).
//
// All pyramids read the same binary input vector e[15:0]; each produces one
// three-valued output on two wires, so the network has 2*N_PYR output wires
// (8 by default). When the training codes the output pattern in binary
// across the pyramids, pyramid p gives bit p of a class number: `code`
// collects the one-wires and `code_valid` is high when no pyramid is at U
// (the network has recognised a pattern). That decode is this design's
// addition for convenience; the pyramid outputs are also given as they are.
//
// Purely combinational, no clock: the outputs follow e after the delay of
// four neuron layers. MEM gives the trained contents of each pyramid. Only
// one pyramid's contents are published with the network, so by default all
// pyramids carry that one; a trained set for each pyramid is given by
// overriding MEM.
module gsn_network
  import gsn_pkg::*;
#(
  parameter int unsigned                N_PYR = 4,
  parameter gsn_pyr_mem_t [N_PYR-1:0]   MEM   = {N_PYR{PYR_MEM_TRAINED}}
) (
  input  logic [PYR_IN-1:0]   e,
  output gsn_t [N_PYR-1:0]    y,
  output logic [N_PYR-1:0]    code,
  output logic                code_valid
);

  logic [N_PYR-1:0] is_u;

  for (genvar p = 0; p < N_PYR; p++) begin : g_pyr
    gsn_pyramid #(.MEM(MEM[p])) u_pyr (.e(e), .y(y[p]));
    assign code[p] = y[p][1];
    assign is_u[p] = y[p][0];
  end

  assign code_valid = ~|is_u;

endmodule
