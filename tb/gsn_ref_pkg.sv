// gsn_ref_pkg: reference model of the trained GSN pyramid for the testbenches.
//
// It works from the published truth tables of the fifteen neurons (all nine
// three-valued input pairs per neuron, as text) and from a separately coded
// majority rule, never from the RTL. Values are the characters "0", "1", "U".
package gsn_ref_pkg;
  import gsn_pkg::*;

  // Column order: 00 01 0U 10 11 1U U0 U1 UU ('-': never reached).
  localparam string TT [15] = '{
    "00-U0----",   // A0
    "0U-U0----",   // A1
    "U1-U0----",   // A2
    "1U-11----",   // A3
    "0U-1U----",   // A4
    "0U-UU----",   // A5
    "1U-U1----",   // A6
    "01-1U----",   // A7
    "0U0UUU0U0",   // B0
    "U00U11UUU",   // B1
    "1U10U0UUU",   // B2
    "UUU01U01U",   // B3
    "10UUUU10U",   // C0
    "00010UU00",   // C1
    "U110U001U"    // D0
  };

  function automatic int col_of(byte c);
    return (c == "0") ? 0 : (c == "1") ? 1 : 2;
  endfunction

  function automatic byte table_neuron(int n, byte a, byte b);
    return TT[n][3 * col_of(a) + col_of(b)];
  endfunction

  // Output of the published pyramid for binary input vector e (input k of
  // neuron An is e[2n+k]).
  function automatic byte table_pyramid(logic [15:0] e);
    byte la [8];
    byte lb [4];
    byte lc [2];
    for (int n = 0; n < 8; n++)
      la[n] = table_neuron(n, e[2*n] ? "1" : "0", e[2*n+1] ? "1" : "0");
    for (int i = 0; i < 4; i++) lb[i] = table_neuron(8 + i, la[2*i], la[2*i+1]);
    for (int j = 0; j < 2; j++) lc[j] = table_neuron(12 + j, lb[2*j], lb[2*j+1]);
    return table_neuron(14, lc[0], lc[1]);
  endfunction

  // Majority recall over a memory given as four characters (positions 00, 01,
  // 10, 11), coded apart from the RTL.
  function automatic byte maj_neuron(string mem, byte a, byte b);
    int ones = 0, zeros = 0;
    for (int p = 0; p < 4; p++) begin
      bit hit;
      hit = (a == "U" || (a == "1") == (p >= 2)) && (b == "U" || (b == "1") == (p % 2 == 1));
      if (hit && mem[p] == "1") ones++;
      if (hit && mem[p] == "0") zeros++;
    end
    return (ones > zeros) ? "1" : (zeros > ones) ? "0" : "U";
  endfunction

  function automatic byte maj_pyramid(string mem [15], logic [15:0] e);
    byte la [8];
    byte lb [4];
    byte lc [2];
    for (int n = 0; n < 8; n++)
      la[n] = maj_neuron(mem[n], e[2*n] ? "1" : "0", e[2*n+1] ? "1" : "0");
    for (int i = 0; i < 4; i++) lb[i] = maj_neuron(mem[8 + i], la[2*i], la[2*i+1]);
    for (int j = 0; j < 2; j++) lc[j] = maj_neuron(mem[12 + j], lb[2*j], lb[2*j+1]);
    return maj_neuron(mem[14], lc[0], lc[1]);
  endfunction

  function automatic gsn_t char_to_gsn(byte c);
    return (c == "0") ? GSN_0 : (c == "1") ? GSN_1 : GSN_U;
  endfunction

  function automatic byte gsn_to_char(gsn_t v);
    case (v)
      GSN_0:   return "0";
      GSN_1:   return "1";
      GSN_U:   return "U";
      default: return "?";
    endcase
  endfunction

  // Pyramid memory from fifteen 4-character strings.
  function automatic gsn_pyr_mem_t mem_from_strings(string mem [15]);
    gsn_pyr_mem_t m;
    for (int n = 0; n < 15; n++)
      for (int p = 0; p < 4; p++) m[n][p] = char_to_gsn(mem[n][p]);
    return m;
  endfunction

endpackage
