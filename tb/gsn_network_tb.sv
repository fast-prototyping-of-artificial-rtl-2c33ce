// gsn_network_tb: checks the four-pyramid network over all 65536 inputs.
//
// dut_def has the default contents (every pyramid the published one); each
// pyramid output is compared with the truth-table model. dut_mix gives the
// four pyramids four different contents (published, and three made-up sets),
// compared with a separately coded majority model, so a pyramid wired to
// the wrong contents or output slot is caught. For both, the class code and
// its valid flag are checked: code bit p is pyramid p's 1-wire, valid when no
// pyramid is U. Valid and invalid codes must both occur.
module gsn_network_tb;
  import gsn_pkg::*;
  import gsn_ref_pkg::*;

  localparam string M1 [15] = '{
    "01U1", "1U00", "U011", "10U0", "0110", "U1U0", "1001", "01UU",
    "1U0U", "U101", "0U11", "10UU", "U01U", "1U01", "01U1"
  };
  localparam string M2 [15] = '{
    "0110", "1001", "0101", "0011", "1100", "1010", "0110", "1001",
    "01U0", "0U10", "1U01", "U100", "0110", "1001", "0U10"
  };
  localparam string M3 [15] = '{
    "1110", "1000", "0111", "0001", "1011", "0100", "1101", "0010",
    "1U10", "0U01", "10U0", "01U1", "U101", "10U1", "1U0U"
  };
  localparam gsn_pyr_mem_t [3:0] MIX = {mem_from_strings(M3), mem_from_strings(M2),
                                        mem_from_strings(M1), PYR_MEM_TRAINED};

  logic [15:0]      e;
  gsn_t [3:0]       y_def, y_mix;
  logic [3:0]       code_def, code_mix;
  logic             valid_def, valid_mix;
  int checks = 0, failures = 0;
  int n_valid = 0, n_invalid = 0;

  gsn_network dut_def (.e(e), .y(y_def), .code(code_def), .code_valid(valid_def));
  gsn_network #(.N_PYR(4), .MEM(MIX)) dut_mix (.e(e), .y(y_mix), .code(code_mix),
                                               .code_valid(valid_mix));

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s e=%h got %0d expected %0d", what, e, got, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    byte r [4];
    logic [3:0] exp_code;
    logic       exp_valid;
    for (int v = 0; v < 65536; v++) begin
      e = 16'(v);
      #1;
      r[0] = table_pyramid(e);
      for (int p = 0; p < 4; p++) check("default pyramid", y_def[p], char_to_gsn(r[0]));
      check("default code", code_def, {4{r[0] == "1"}});
      check("default valid", valid_def, r[0] != "U");
      r[1] = maj_pyramid(M1, e);
      r[2] = maj_pyramid(M2, e);
      r[3] = maj_pyramid(M3, e);
      exp_valid = 1'b1;
      for (int p = 0; p < 4; p++) begin
        check("mixed pyramid", y_mix[p], char_to_gsn(r[p]));
        exp_code[p] = (r[p] == "1");
        if (r[p] == "U") exp_valid = 1'b0;
      end
      check("mixed code", code_mix, exp_code);
      check("mixed valid", valid_mix, exp_valid);
      if (exp_valid) n_valid++; else n_invalid++;
    end
    $display("mixed network: %0d recognised, %0d undefined", n_valid, n_invalid);
    checks++;
    if (n_valid == 0 || n_invalid == 0) begin
      failures++;
      $display("FAIL valid and undefined outputs did not both occur");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
