// flecha_pkg: configuration word of the FLECHA logic cell and the functions
// that map GSN neurons onto cells.
//
// A cell holds 11 configuration bits in its shift-register chain: the 8-entry
// truth table D0..D7 and the select bits S1, S2, S3. S1/S2 choose which lines
// of the 4-line cell data bus feed the cell's three inputs and take its
// output; S3 chooses the registered (1) or the combinational (0) output.
//
// Neuron mapping (six cells per neuron). A neuron output wire is a function
// of four input wires E0..E3. Cells 1 and 2 (resp. 3 and 4) hold that
// function for E3 = 0 and E3 = 1 over E0..E2; cell 5 (resp. 6) picks one of
// them with E3, giving output wire B0 (resp. B1). All six cells use
// S1 = S2 = 0, which connects input mux A to line 0, B to line 2, C to line 1
// and the output mux to line 3 (see flecha_cell).
package flecha_pkg;
  import gsn_pkg::*;

  localparam int unsigned CFG_BITS    = 11;
  localparam int unsigned NEURON_CELLS = 6;
  localparam int unsigned NEURON_CFG  = CFG_BITS * NEURON_CELLS;   // 66

  typedef struct packed {
    logic       s3;    // 1: output from the flip-flop, 0: combinational
    logic       s2;
    logic       s1;
    logic [7:0] d;     // truth table, D0 = d[0], index {E3, E2, E1}
  } flecha_cfg_t;

  // Cell configurations of one neuron, index 0..5 = cell 1..6.
  typedef flecha_cfg_t [NEURON_CELLS-1:0] flecha_neuron_cfg_t;

  // Truth table of a first-stage cell (cell 1..4): with S1 = S2 = 0 the
  // neuron inputs reach the cell as E1 = E0n, E2 = E2n, E3 = E1n (lines 0, 2,
  // 1), so entry {E1n, E2n, E0n} holds t[{E0n, E1n, E2n, e3}].
  function automatic logic [7:0] half_lut(logic [15:0] t, bit e3);
    logic [7:0] d;
    logic [2:0] i;
    for (int k = 0; k < 8; k++) begin
      i    = 3'(k);               // i = {E1n, E2n, E0n}
      d[k] = t[{i[0], i[2], i[1], e3}];
    end
    return d;
  endfunction

  // Truth table of a selecting cell (cell 5, 6): local lines are 0 = low half,
  // 1 = high half, 2 = E3n, so the cell sees E1 = low, E2 = E3n, E3 = high.
  function automatic logic [7:0] sel_lut();
    logic [7:0] d;
    logic [2:0] i;
    for (int k = 0; k < 8; k++) begin
      i    = 3'(k);               // i = {high, E3n, low}
      d[k] = i[1] ? i[2] : i[0];
    end
    return d;
  endfunction

  // Six cell configurations from the two 16-entry tables of the neuron's
  // output wires (index {E0, E1, E2, E3}); reg_out sets S3 in cells 5, 6.
  function automatic flecha_neuron_cfg_t neuron_cfg(logic [15:0] t_one,
                                                    logic [15:0] t_u,
                                                    bit reg_out);
    flecha_neuron_cfg_t c;
    c = '0;
    c[0].d = half_lut(t_one, 1'b0);
    c[1].d = half_lut(t_one, 1'b1);
    c[2].d = half_lut(t_u, 1'b0);
    c[3].d = half_lut(t_u, 1'b1);
    c[4].d = sel_lut();
    c[5].d = sel_lut();
    c[4].s3 = reg_out;
    c[5].s3 = reg_out;
    return c;
  endfunction

  // Output-wire table of a merged first-layer group: neurons A(2g), A(2g+1)
  // on binary inputs E0..E3 and the B neuron they feed.
  function automatic logic [15:0] group_wire_table(gsn_mem_t ma0, gsn_mem_t ma1,
                                                   gsn_mem_t mb, bit one_wire);
    logic [15:0] t;
    logic [3:0]  x;
    gsn_t        y;
    for (int k = 0; k < 16; k++) begin
      x    = 4'(k);               // {E0, E1, E2, E3}
      y    = gsn_recall(mb, gsn_recall(ma0, gsn_from_bit(x[3]), gsn_from_bit(x[2])),
                            gsn_recall(ma1, gsn_from_bit(x[1]), gsn_from_bit(x[0])));
      t[k] = one_wire ? y[1] : y[0];
    end
    return t;
  endfunction

  // Shift order of one neuron's chain: bit 0 is shifted in first and ends in
  // bit 0 of cell 6; cell 1 takes the last 11 bits.
  function automatic logic [NEURON_CFG-1:0] neuron_chain(flecha_neuron_cfg_t c);
    logic [NEURON_CFG-1:0] v;
    for (int i = 0; i < NEURON_CELLS; i++) v[(NEURON_CELLS-1-i)*CFG_BITS +: CFG_BITS] = c[i];
    return v;
  endfunction

  // Neurons of a pyramid mapped onto cells: four merged A-A-B groups, C0, C1
  // and D0, 42 cells in all.
  localparam int unsigned PYR_NEURONS = 7;                         // 42 cells
  localparam int unsigned PYR_CFG     = PYR_NEURONS * NEURON_CFG;     // 462

  // Full configuration stream of a pyramid with trained contents m (the
  // output of the mapping tool). Chain order: group 0..3, C0, C1, D0; bit 0
  // is shifted in first. reg_out registers the output of D0.
  function automatic logic [PYR_CFG-1:0] pyramid_chain(gsn_pyr_mem_t m, bit reg_out);
    logic [PYR_CFG-1:0] v;
    flecha_neuron_cfg_t c;
    for (int n = 0; n < PYR_NEURONS; n++) begin
      if (n < 4)
        c = neuron_cfg(group_wire_table(m[2*n], m[2*n+1], m[N_A+n], 1'b1),
                       group_wire_table(m[2*n], m[2*n+1], m[N_A+n], 1'b0), 1'b0);
      else
        c = neuron_cfg(gsn_wire_table(m[N_A+n], 1'b1),
                       gsn_wire_table(m[N_A+n], 1'b0), (n == PYR_NEURONS-1) && reg_out);
      v[(PYR_NEURONS-1-n)*NEURON_CFG +: NEURON_CFG] = neuron_chain(c);
    end
    return v;
  endfunction

  // Whole network on cells: NET_PYR pyramids on one chain,
  // cfg_in -> pyramid 0 -> ... -> pyramid NET_PYR-1 -> cfg_out.
  localparam int unsigned NET_PYR = 4;
  localparam int unsigned NET_CFG = NET_PYR * PYR_CFG;             // 1848

  // Stream for the whole network, bit 0 shifted first. The first bits end
  // in the last pyramid of the chain, so pyramid p takes the slice at
  // (NET_PYR-1-p) * PYR_CFG.
  function automatic logic [NET_CFG-1:0] network_chain(
    gsn_pyr_mem_t [NET_PYR-1:0] m, logic [NET_PYR-1:0] reg_out);
    logic [NET_CFG-1:0] v;
    for (int p = 0; p < NET_PYR; p++)
      v[(NET_PYR-1-p)*PYR_CFG +: PYR_CFG] = pyramid_chain(m[p], reg_out[p]);
    return v;
  endfunction

endpackage
