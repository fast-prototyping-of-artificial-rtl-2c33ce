// gsn_neuron_tb: checks the recall-mode GSN neuron against full truth tables.
//
// Sixteen neurons are built: the fifteen trained neurons of the reference
// pyramid (contents from gsn_pkg) and the black-box example neuron with
// contents U, 1, 0, U. Every neuron is driven with all nine pairs of
// three-valued inputs (00, 01, 0U, 10, 11, 1U, U0, U1, UU) and compared with
// its expected truth table, typed in below as text, independently of the
// majority rule the neuron uses. First-layer neurons only see binary inputs,
// so only their four binary columns are checked ('-'). The unused code 11 is
// also applied and must behave as U. Combinational: outputs are sampled 1 ns
// after the inputs change.
module gsn_neuron_tb;
  import gsn_pkg::*;

  localparam int NN = 16;
  // Column order: 00 01 0U 10 11 1U U0 U1 UU
  localparam string TT [NN] = '{
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
    "U110U001U",   // D0
    "U110U001U"    // black-box example
  };

  localparam gsn_mem_t EXAMPLE_MEM = mem4(GSN_U, GSN_1, GSN_0, GSN_U);

  gsn_t a, b;
  gsn_t y [NN];
  int checks = 0, failures = 0;

  for (genvar n = 0; n < NN; n++) begin : g_n
    gsn_neuron #(.MEM(n < 15 ? PYR_MEM_TRAINED[n] : EXAMPLE_MEM)) dut (.a(a), .b(b), .y(y[n]));
  end

  function automatic gsn_t from_char(byte c);
    case (c)
      "0":     return GSN_0;
      "1":     return GSN_1;
      default: return GSN_U;
    endcase
  endfunction

  function automatic byte to_char(gsn_t v);
    case (v)
      GSN_0:   return "0";
      GSN_1:   return "1";
      GSN_U:   return "U";
      default: return "?";
    endcase
  endfunction

  localparam string COLS = "01U";

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int col;
    byte exp_c;
    for (int i = 0; i < 3; i++) begin
      for (int j = 0; j < 3; j++) begin
        a = from_char(COLS[i]);
        b = from_char(COLS[j]);
        col = 3 * i + j;
        #1;
        for (int n = 0; n < NN; n++) begin
          exp_c = TT[n][col];
          if (exp_c != "-") begin
            checks++;
            if (to_char(y[n]) != exp_c) begin
              failures++;
              $display("FAIL neuron %0d inputs %s%s: got %s expected %s", n,
                       COLS[i], COLS[j], to_char(y[n]), exp_c);
            end
          end
        end
      end
    end
    // The code 11 on an input is taken as U.
    for (int i = 0; i < 3; i++) begin
      for (int side = 0; side < 2; side++) begin
        a = side ? from_char(COLS[i]) : 2'b11;
        b = side ? 2'b11 : from_char(COLS[i]);
        col = side ? 3 * i + 2 : 6 + i;
        #1;
        for (int n = 8; n < NN; n++) begin
          checks++;
          if (to_char(y[n]) != TT[n][col]) begin
            failures++;
            $display("FAIL neuron %0d with code 11: got %s expected %s", n,
                     to_char(y[n]), TT[n][col]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
