// gsn_pkg: shared types, encodings and functions of the Goal Seeking Neuron
// (GSN) network.
//
// A GSN signal is three-valued: 0, 1 or U (undefined). Every neuron input and
// output carries it on two wires, {one_bit, u_bit}:
//   0 -> 00, 1 -> 10, U -> 01
// which is the encoding the network description uses (the first wire of a
// pair, "X0", marks a 1, the second, "X1", marks U). The code 11 never leaves
// a neuron; an input that carries it is read as U (the U wire wins), which is
// this design's own choice.
//
// A trained two-input neuron holds four memory positions, each 0, 1 or U,
// addressed by {first input, second input}. In recall mode an input that is
// U addresses both halves, so an input pair selects 1, 2 or 4 positions. The
// output is 1 if more selected positions hold 1 than 0, 0 if more hold 0 than
// 1, and U if the counts are equal (U positions count for neither side).
//
// The package also holds the trained contents of a published pyramid
// (layers A..D, 15 neurons; positions 00..11 of each neuron) and the helper
// that writes a neuron's output wires as 16-entry truth tables, from which
// flecha_pkg derives the configuration of the FLECHA cells.
package gsn_pkg;

  // Two-wire three-valued signal: [1] = one_bit ("X0"), [0] = u_bit ("X1").
  typedef logic [1:0] gsn_t;

  localparam gsn_t GSN_0 = 2'b00;
  localparam gsn_t GSN_1 = 2'b10;
  localparam gsn_t GSN_U = 2'b01;

  // Four memory positions of a two-input neuron, index = {in_a, in_b}.
  typedef gsn_t [3:0] gsn_mem_t;

  // Neurons of one pyramid: 8 first-layer (A), 4 second (B), 2 third (C),
  // 1 fourth (D).
  localparam int unsigned N_A      = 8;
  localparam int unsigned N_B      = 4;
  localparam int unsigned N_C      = 2;
  localparam int unsigned N_NEURON = 15;
  localparam int unsigned PYR_IN   = 2 * N_A;   // binary inputs of a pyramid

  // Memory of all 15 neurons of a pyramid, index 0..7 = A0..A7,
  // 8..11 = B0..B3, 12..13 = C0..C1, 14 = D0.
  typedef gsn_mem_t [N_NEURON-1:0] gsn_pyr_mem_t;

  // Builds a memory word from positions 00, 01, 10, 11 in that order.
  function automatic gsn_mem_t mem4(gsn_t m00, gsn_t m01, gsn_t m10, gsn_t m11);
    gsn_mem_t m;
    m[0] = m00; m[1] = m01; m[2] = m10; m[3] = m11;
    return m;
  endfunction

  // Trained contents of the published pyramid (memory values at the four binary
  // addresses of each neuron).
  function automatic gsn_pyr_mem_t trained_pyramid();
    gsn_pyr_mem_t m;
    m[0]  = mem4(GSN_0, GSN_0, GSN_U, GSN_0);   // A0
    m[1]  = mem4(GSN_0, GSN_U, GSN_U, GSN_0);   // A1
    m[2]  = mem4(GSN_U, GSN_1, GSN_U, GSN_0);   // A2
    m[3]  = mem4(GSN_1, GSN_U, GSN_1, GSN_1);   // A3
    m[4]  = mem4(GSN_0, GSN_U, GSN_1, GSN_U);   // A4
    m[5]  = mem4(GSN_0, GSN_U, GSN_U, GSN_U);   // A5
    m[6]  = mem4(GSN_1, GSN_U, GSN_U, GSN_1);   // A6
    m[7]  = mem4(GSN_0, GSN_1, GSN_1, GSN_U);   // A7
    m[8]  = mem4(GSN_0, GSN_U, GSN_U, GSN_U);   // B0
    m[9]  = mem4(GSN_U, GSN_0, GSN_U, GSN_1);   // B1
    m[10] = mem4(GSN_1, GSN_U, GSN_0, GSN_U);   // B2
    m[11] = mem4(GSN_U, GSN_U, GSN_0, GSN_1);   // B3
    m[12] = mem4(GSN_1, GSN_0, GSN_U, GSN_U);   // C0
    m[13] = mem4(GSN_0, GSN_0, GSN_1, GSN_0);   // C1
    m[14] = mem4(GSN_U, GSN_1, GSN_0, GSN_U);   // D0
    return m;
  endfunction

  localparam gsn_pyr_mem_t PYR_MEM_TRAINED = trained_pyramid();

  // Normalises a two-wire code: 11 is read as U.
  function automatic gsn_t gsn_norm(gsn_t v);
    return v[0] ? GSN_U : v;
  endfunction

  // Binary input bit to a GSN value.
  function automatic gsn_t gsn_from_bit(logic b);
    return b ? GSN_1 : GSN_0;
  endfunction

  // Recall-mode output of a two-input neuron with memory m.
  function automatic gsn_t gsn_recall(gsn_mem_t m, gsn_t a, gsn_t b);
    logic [1:0] sel_a, sel_b;   // which values of each input are addressed
    int unsigned ones, zeros;
    gsn_t an, bn;
    an = gsn_norm(a);
    bn = gsn_norm(b);
    sel_a = (an == GSN_U) ? 2'b11 : (an == GSN_1 ? 2'b10 : 2'b01);
    sel_b = (bn == GSN_U) ? 2'b11 : (bn == GSN_1 ? 2'b10 : 2'b01);
    ones  = 0;
    zeros = 0;
    for (int i = 0; i < 2; i++) begin
      for (int j = 0; j < 2; j++) begin
        if (sel_a[i] && sel_b[j]) begin
          if (m[2*i+j] == GSN_1) ones++;
          else if (m[2*i+j] == GSN_0) zeros++;
        end
      end
    end
    if (ones > zeros)      return GSN_1;
    else if (zeros > ones) return GSN_0;
    else                   return GSN_U;
  endfunction

  // One output wire (one_wire = 1: one_bit, 0: u_bit) of a neuron as a
  // 16-entry truth table over the four input wires, index
  // {a.one, a.u, b.one, b.u} = {E0, E1, E2, E3}.
  function automatic logic [15:0] gsn_wire_table(gsn_mem_t m, bit one_wire);
    logic [15:0] t;
    gsn_t y;
    for (int k = 0; k < 16; k++) begin
      y    = gsn_recall(m, gsn_t'(k[3:2]), gsn_t'(k[1:0]));
      t[k] = one_wire ? y[1] : y[0];
    end
    return t;
  endfunction

endpackage
