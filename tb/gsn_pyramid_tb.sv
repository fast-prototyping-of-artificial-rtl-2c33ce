// gsn_pyramid_tb: exhaustive check of the four-layer pyramid.
//
// dut_ref carries the default (published) trained contents; all 65536 input
// vectors are applied and its output is compared with the pyramid built from
// the published truth tables (gsn_ref_pkg::table_pyramid). dut_alt carries a
// second, made-up set of contents (parameter override) and is compared with
// a separately coded majority model, so a wiring or parameter-passing error
// that the published contents happen to hide still shows. Output classes
// (0, 1, U) are counted; every class must occur. Combinational, sampled 1 ns
// after each input change.
// Input relevance: from the stored outputs of dut_ref, each input bit is
// flipped on every vector to see whether it can ever change the output. With
// the published contents only e4, e5, e8, e9, e14 and e15 matter: the other
// ten inputs feed neurons whose outputs are masked further up the tree. The
// set found on the RTL must equal the one found on the truth-table model and
// that expected set.
module gsn_pyramid_tb;
  import gsn_pkg::*;
  import gsn_ref_pkg::*;

  localparam string ALT [15] = '{
    "01U1", "1U00", "U011", "10U0", "0110", "U1U0", "1001", "01UU",
    "1U0U", "U101", "0U11", "10UU", "U01U", "1U01", "01U1"
  };
  localparam gsn_pyr_mem_t ALT_MEM = mem_from_strings(ALT);

  logic [15:0] e;
  gsn_t y_ref, y_alt;
  int checks = 0, failures = 0;
  int n_class [3] = '{0, 0, 0};
  localparam logic [15:0] RELEVANT_EXP = 16'b1100_0011_0011_0000;
  gsn_t dut_out [65536];
  byte  ref_out [65536];

  gsn_pyramid dut_ref (.e(e), .y(y_ref));
  gsn_pyramid #(.MEM(ALT_MEM)) dut_alt (.e(e), .y(y_alt));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    byte exp_c;
    for (int v = 0; v < 65536; v++) begin
      e = 16'(v);
      #1;
      exp_c = table_pyramid(e);
      dut_out[v] = y_ref;
      ref_out[v] = exp_c;
      checks++;
      if (gsn_to_char(y_ref) != exp_c) begin
        failures++;
        if (failures < 10) $display("FAIL ref e=%h got %s expected %s", e, gsn_to_char(y_ref), exp_c);
      end
      n_class[col_of(exp_c)]++;
      exp_c = maj_pyramid(ALT, e);
      checks++;
      if (gsn_to_char(y_alt) != exp_c) begin
        failures++;
        if (failures < 10) $display("FAIL alt e=%h got %s expected %s", e, gsn_to_char(y_alt), exp_c);
      end
    end
    $display("pyramid outputs: 0=%0d 1=%0d U=%0d", n_class[0], n_class[1], n_class[2]);
    for (int c = 0; c < 3; c++) begin
      checks++;
      if (n_class[c] == 0) begin
        failures++;
        $display("FAIL output class %0d never produced", c);
      end
    end
    begin
      logic [15:0] rel_dut, rel_ref;
      rel_dut = '0;
      rel_ref = '0;
      for (int k = 0; k < 16; k++) begin
        for (int v = 0; v < 65536; v++) begin
          if (dut_out[v] != dut_out[v ^ (1 << k)]) rel_dut[k] = 1'b1;
          if (ref_out[v] != ref_out[v ^ (1 << k)]) rel_ref[k] = 1'b1;
        end
      end
      $display("inputs that can change the output: RTL %b, model %b (%0d of 16)",
               rel_dut, rel_ref, $countones(rel_dut));
      checks += 2;
      if (rel_dut != rel_ref) begin
        failures++;
        $display("FAIL input relevance differs from the model");
      end
      if (rel_ref != RELEVANT_EXP) begin
        failures++;
        $display("FAIL model input relevance %b, expected %b", rel_ref, RELEVANT_EXP);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
