// flecha_network_tb: the four-pyramid network on 168 FLECHA cells.
//
//  1. The 1848-bit chain is loaded with four different pyramids (the
//     published one and three made-up sets). All 65536 input vectors are
//     applied; each pyramid output is compared with the truth-table model
//     (published pyramid) or a separately coded majority model (the others),
//     and the class code and its valid flag with the values derived from the
//     models. Valid and invalid codes must both occur.
//  2. The chain is reloaded with the pyramids in the opposite order and
//     pyramid 2 registered. The bits leaving cfg_out meanwhile must be the
//     first stream, bit for bit (chain length and order). Then, for 1024
//     random inputs, pyramid 2 must trail the input by one cycle while the
//     other three stay combinational.
module flecha_network_tb;
  import gsn_pkg::*;
  import flecha_pkg::*;
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

  logic        clk = 1'b0;
  logic        rst_n = 1'b0, cfg_en = 1'b0, cfg_in = 1'b0;
  logic        cfg_out;
  logic [15:0] e = '0;
  gsn_t [3:0]  y;
  logic [3:0]  code;
  logic        code_valid;
  int checks = 0, failures = 0, n_valid = 0, n_invalid = 0;

  flecha_network dut (.*);

  always #5 clk = ~clk;

  // Expected output of a pyramid holding contents `which`: 0 = published,
  // 1..3 = M1..M3. order[p] says which contents pyramid p holds.
  function automatic byte model(int which, logic [15:0] v);
    case (which)
      0:       return table_pyramid(v);
      1:       return maj_pyramid(M1, v);
      2:       return maj_pyramid(M2, v);
      default: return maj_pyramid(M3, v);
    endcase
  endfunction

  task automatic check(string what, byte got, byte exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s e=%h: got %s expected %s", what, e, got, exp);
    end
  endtask

  // Shifts s in; returns the bits that left the chain.
  task automatic load(input logic [NET_CFG-1:0] s, output logic [NET_CFG-1:0] old);
    @(negedge clk);
    cfg_en = 1'b1;
    for (int k = 0; k < NET_CFG; k++) begin
      cfg_in = s[k];
      #1;
      old[k] = cfg_out;
      @(negedge clk);
    end
    cfg_en = 1'b0;
  endtask

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    gsn_pyr_mem_t [3:0] mems;
    gsn_pyr_mem_t       all [4];
    int                 order [4];
    logic [NET_CFG-1:0] s1, s2, old;
    byte                r [4];
    all = '{PYR_MEM_TRAINED, mem_from_strings(M1), mem_from_strings(M2), mem_from_strings(M3)};

    repeat (2) @(negedge clk);
    rst_n = 1'b1;

    order = '{0, 1, 2, 3};
    for (int p = 0; p < 4; p++) mems[p] = all[order[p]];
    s1 = network_chain(mems, 4'b0000);
    load(s1, old);
    for (int v = 0; v < 65536; v++) begin
      logic valid_exp;
      e = 16'(v);
      #1;
      valid_exp = 1'b1;
      for (int p = 0; p < 4; p++) begin
        r[p] = model(order[p], e);
        check($sformatf("pyramid %0d", p), gsn_to_char(y[p]), r[p]);
        check($sformatf("code bit %0d", p), code[p] ? "1" : "0", r[p] == "1" ? "1" : "0");
        if (r[p] == "U") valid_exp = 1'b0;
      end
      check("code valid", code_valid ? "y" : "n", valid_exp ? "y" : "n");
      if (valid_exp) n_valid++; else n_invalid++;
    end
    checks += 2;
    if (n_valid == 0)   begin failures++; $display("FAIL no valid code"); end
    if (n_invalid == 0) begin failures++; $display("FAIL no invalid code"); end

    order = '{3, 2, 1, 0};
    for (int p = 0; p < 4; p++) mems[p] = all[order[p]];
    s2 = network_chain(mems, 4'b0100);
    load(s2, old);
    checks++;
    if (old != s1) begin
      failures++;
      $display("FAIL bits leaving the chain differ from the first stream");
    end
    for (int i = 0; i < 1024; i++) begin
      e = 16'($urandom);
      #1;
      for (int p = 0; p < 4; p++) r[p] = model(order[p], e);
      for (int p = 0; p < 4; p++)
        if (p != 2) check($sformatf("combinational pyramid %0d", p), gsn_to_char(y[p]), r[p]);
      @(negedge clk);
      check("registered pyramid 2", gsn_to_char(y[2]), r[2]);
      e = ~e;
      #1;
      check("registered pyramid 2 holds", gsn_to_char(y[2]), r[2]);
    end

    $display("codes: valid %0d, invalid %0d", n_valid, n_invalid);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
