// gsn_neuron: one trained two-input Goal Seeking Neuron in recall mode.
//
// The neuron's four memory positions are fixed at elaboration (parameter MEM),
// so the block is pure combinational logic: the learned contents are folded
// into the gates instead of being kept in writable cells, as in the
// programmable-logic implementation of the network. Each input and the output
// are three-valued signals on two wires ({one_bit, u_bit}: 0 = 00, 1 = 10,
// U = 01, see gsn_pkg).
//
// Recall rule: an input at U addresses both memory halves. Among the
// addressed positions, the output is 1 if 1s outnumber 0s, 0 if 0s outnumber
// 1s, and U on a tie (positions holding U count for neither). With binary
// inputs the output is simply the addressed position.
//
// Interface: a, b (gsn_t) in, y (gsn_t) out. No clock; y follows the inputs
// after the combinational delay. An input code 11 is taken as U (own choice).
// The default MEM is neuron D0 of the published pyramid, which can give all
// three output values.
module gsn_neuron
  import gsn_pkg::*;
#(
  parameter gsn_mem_t MEM = PYR_MEM_TRAINED[N_NEURON-1]
) (
  input  gsn_t a,
  input  gsn_t b,
  output gsn_t y
);

  // Per input: which of its two memory halves are addressed ([1]: 1-half,
  // [0]: 0-half).
  logic [1:0] sel_a, sel_b;
  // Per position: addressed and holding 1 / holding 0.
  logic [3:0] vote_1, vote_0;
  logic [2:0] n_1, n_0;

  always_comb begin
    sel_a = a[0] ? 2'b11 : {a[1], ~a[1]};
    sel_b = b[0] ? 2'b11 : {b[1], ~b[1]};
    for (int p = 0; p < 4; p++) begin
      vote_1[p] = sel_a[p/2] && sel_b[p%2] && (MEM[p] == GSN_1);
      vote_0[p] = sel_a[p/2] && sel_b[p%2] && (MEM[p] == GSN_0);
    end
    n_1 = 3'(vote_1[0]) + 3'(vote_1[1]) + 3'(vote_1[2]) + 3'(vote_1[3]);
    n_0 = 3'(vote_0[0]) + 3'(vote_0[1]) + 3'(vote_0[2]) + 3'(vote_0[3]);
    if (n_1 > n_0)      y = GSN_1;
    else if (n_0 > n_1) y = GSN_0;
    else                y = GSN_U;
  end

endmodule
