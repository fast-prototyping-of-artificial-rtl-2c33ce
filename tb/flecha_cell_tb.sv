// flecha_cell_tb: configures a FLECHA logic cell through its shift chain and
// checks its function.
//
// For 40 random configurations (truth table, S1, S2, S3) the 11 bits are
// shifted in (11 clock edges), then all 16 values of the four bus lines are
// applied. Expected values are worked out here: inputs E1, E2, E3 come from
// lines {S1,S2}, {!S1,S2}, {S1,!S2}, the output goes to line {!S1,!S2}, the
// function value is D[{E3,E2,E1}]. With S3 = 0 the output must follow at
// once; with S3 = 1 it must show the value of the previous rising edge (one
// cycle of latency) and be 0 right after reset. The chain output must return
// the configuration shifted in 11 cycles earlier. Sequential and
// combinational configurations must both have been exercised.
module flecha_cell_tb;
  import flecha_pkg::*;

  logic       clk = 1'b0;
  logic       rst_n, cfg_en, cfg_in, cfg_out, out;
  logic [3:0] bus_i, bus_o, bus_oe;
  int checks = 0, failures = 0;
  int n_comb = 0, n_seq = 0;

  flecha_cell dut (.*);

  always #5 clk = ~clk;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d (t=%0t)", what, got, exp, $time);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    flecha_cfg_t c, prev;
    logic [1:0] la, lb, lc, ls;
    logic       f_exp, f_prev;
    rst_n  = 1'b0;
    cfg_en = 1'b0;
    cfg_in = 1'b0;
    bus_i  = '0;
    prev   = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 40; t++) begin
      c = flecha_cfg_t'($urandom);
      if (t == 0) c.s3 = 1'b0;
      if (t == 1) c.s3 = 1'b1;
      // Shift the word in, bit 0 first; the bits coming out are the old word.
      cfg_en = 1'b1;
      for (int k = 0; k < CFG_BITS; k++) begin
        cfg_in = c[k];
        if (t > 0) check("chain out", cfg_out, prev[k]);
        @(negedge clk);
      end
      cfg_en = 1'b0;
      prev   = c;
      la = {c.s1, c.s2};
      lb = {~c.s1, c.s2};
      lc = {c.s1, ~c.s2};
      ls = {~c.s1, ~c.s2};
      if (c.s3) begin
        // Registered: reset the flip-flop, then check one cycle of latency.
        n_seq++;
        rst_n = 1'b0;
        #1;
        check("reset ff", out, 0);
        rst_n = 1'b1;
        f_prev = 1'b0;
        for (int v = 0; v < 16; v++) begin
          bus_i = 4'(v);
          f_exp = c.d[{bus_i[lc], bus_i[lb], bus_i[la]}];
          #1;
          check("registered out before edge", out, f_prev);
          @(negedge clk);
          check("registered out after edge", out, f_exp);
          f_prev = f_exp;
        end
      end else begin
        n_comb++;
        for (int v = 0; v < 16; v++) begin
          bus_i = 4'(v);
          f_exp = c.d[{bus_i[lc], bus_i[lb], bus_i[la]}];
          #1;
          check("comb out", out, f_exp);
          check("output line enable", bus_oe, 4'b1 << ls);
          check("output line value", bus_o, f_exp ? (4'b1 << ls) : 4'b0);
        end
        @(negedge clk);
      end
    end
    checks++;
    if (n_comb == 0 || n_seq == 0) begin
      failures++;
      $display("FAIL combinational and registered modes not both exercised");
    end
    $display("configurations: %0d combinational, %0d registered", n_comb, n_seq);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
