// flecha_row_tb: a row of five FLECHA cells with its segmented cell data bus.
//
// 300 random configurations (truth tables, line selects, registered or not,
// all 24 bus switches) are shifted in through the 79-bit chain. A
// configuration in which combinational cells would feed each other in a
// circle is redrawn (such a configuration is invalid for the array). For
// each, 24 random values of the end inputs are applied and the end outputs
// compared with a model computed here: nets are the runs of segments joined
// by closed switches, a net is the OR of what drives it, cells are evaluated
// until nothing changes, registered cells update at clock edges. The
// configuration leaving the chain must be the previous one (its switch
// blocks cleared by the reset that precedes each load; the user flip-flops
// are cleared too and hold during loading). Counted: nets
// joining two or more cells, registered cells in use, end-to-end paths
// (a value entering at one end reaching the other); each must occur.
module flecha_row_tb;
  import flecha_pkg::*;

  localparam int NC = 5;
  localparam int NN = NC + 2;
  localparam int CHAIN = NC * CFG_BITS + (NC + 1) * 4;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0, cfg_en = 1'b0;
  logic       cfg_in, cfg_out;
  logic [3:0] left_i, left_o, right_i, right_o;
  int checks = 0, failures = 0;
  int n_shared = 0, n_reg = 0, n_through = 0;

  flecha_row dut (.*);

  always #5 clk = ~clk;

  flecha_cfg_t cc [NC];
  logic [3:0]  sw [NC+1];
  logic        ff [NC];

  function automatic logic [1:0] line_a(flecha_cfg_t c); return {c.s1, c.s2}; endfunction
  function automatic logic [1:0] line_b(flecha_cfg_t c); return {~c.s1, c.s2}; endfunction
  function automatic logic [1:0] line_c(flecha_cfg_t c); return {c.s1, ~c.s2}; endfunction
  function automatic logic [1:0] line_s(flecha_cfg_t c); return {~c.s1, ~c.s2}; endfunction

  // Leftmost node of the run that holds node n on line l.
  function automatic int run_of(int n, int l);
    int r = n;
    while (r > 0 && sw[r-1][l]) r--;
    return r;
  endfunction

  // Nets for given cell outputs.
  function automatic void nets(logic o [NC], logic [3:0] li, logic [3:0] ri,
                               output logic [3:0] v [NN]);
    logic [3:0] d [NN];
    d[0] = li;
    d[NN-1] = ri;
    for (int k = 0; k < NC; k++) d[k+1] = o[k] ? (4'b1 << line_s(cc[k])) : 4'b0;
    for (int n = 0; n < NN; n++) v[n] = '0;
    for (int l = 0; l < 4; l++)
      for (int n = 0; n < NN; n++)
        for (int m = 0; m < NN; m++)
          if (run_of(m, l) == run_of(n, l) && d[m][l]) v[n][l] = 1'b1;
  endfunction

  function automatic logic f_of(int k, logic [3:0] b);
    return cc[k].d[{b[line_c(cc[k])], b[line_b(cc[k])], b[line_a(cc[k])]}];
  endfunction

  // Settled nets and function values for the present inputs.
  function automatic void settle(logic [3:0] li, logic [3:0] ri,
                                 output logic [3:0] v [NN], output logic f [NC]);
    logic o [NC];
    for (int k = 0; k < NC; k++) o[k] = cc[k].s3 ? ff[k] : 1'b0;
    for (int it = 0; it < 2 * NC + 2; it++) begin
      nets(o, li, ri, v);
      for (int k = 0; k < NC; k++) begin
        f[k] = f_of(k, v[k+1]);
        if (!cc[k].s3) o[k] = f[k];
      end
    end
  endfunction

  // True if combinational cells feed each other in a circle.
  function automatic bit has_loop();
    bit edge_ [NC][NC];
    bit alive [NC];
    bit changed;
    int ls;
    for (int k = 0; k < NC; k++) begin
      alive[k] = !cc[k].s3;
      for (int j = 0; j < NC; j++) begin
        ls = line_s(cc[k]);
        edge_[k][j] = !cc[k].s3 && !cc[j].s3 &&
                      run_of(k+1, ls) == run_of(j+1, ls) &&
                      (line_a(cc[j]) == ls || line_b(cc[j]) == ls || line_c(cc[j]) == ls);
      end
    end
    // Strip cells with no live predecessor until nothing changes.
    changed = 1'b1;
    while (changed) begin
      changed = 1'b0;
      for (int j = 0; j < NC; j++) begin
        if (alive[j]) begin
          bit has_pred = 1'b0;
          for (int k = 0; k < NC; k++) if (alive[k] && edge_[k][j]) has_pred = 1'b1;
          if (!has_pred) begin alive[j] = 1'b0; changed = 1'b1; end
        end
      end
    end
    for (int k = 0; k < NC; k++) if (alive[k]) return 1'b1;
    return 1'b0;
  endfunction

  // Chain contents, first bit to shift first. no_sw: switch blocks cleared.
  function automatic logic [CHAIN-1:0] stream(bit no_sw);
    logic [CHAIN-1:0] s;
    int p = 0;
    for (int i = 0; i < 4; i++) s[p++] = no_sw ? 1'b0 : sw[NC][i];
    for (int k = NC - 1; k >= 0; k--) begin
      for (int i = 0; i < CFG_BITS; i++) s[p++] = cc[k][i];
      for (int i = 0; i < 4; i++) s[p++] = no_sw ? 1'b0 : sw[k][i];
    end
    return s;
  endfunction

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h expected %h (t=%0t)", what, got, exp, $time);
    end
  endtask

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [CHAIN-1:0] s, prev;
    logic [3:0] v [NN];
    logic f [NC];
    rst_n = 1'b0; cfg_en = 1'b0; cfg_in = 1'b0; left_i = '0; right_i = '0;
    prev = '0;
    @(negedge clk);
    for (int t = 0; t < 300; t++) begin
      do begin
        for (int k = 0; k < NC; k++) begin
          cc[k] = flecha_cfg_t'($urandom);
          cc[k].s3 = ($urandom_range(3) == 0);
        end
        for (int k = 0; k <= NC; k++) sw[k] = 4'($urandom);
      end while (has_loop());
      s = stream(1'b0);
      // Clear the user flip-flops (and the switch blocks) before loading.
      rst_n = 1'b0;
      #1;
      rst_n = 1'b1;
      for (int k = 0; k < NC; k++) ff[k] = 1'b0;
      cfg_en = 1'b1;
      for (int i = 0; i < CHAIN; i++) begin
        cfg_in = s[i];
        #1;
        if (t > 0) check("chain out", cfg_out, prev[i]);
        @(negedge clk);
      end
      cfg_en = 1'b0;
      // Reset clears the switch blocks, not the cells, before the next load.
      prev = stream(1'b1);
      // Coverage of what this configuration uses.
      for (int k = 0; k < NC; k++) begin
        if (cc[k].s3) n_reg++;
        for (int j = k + 1; j < NC; j++)
          for (int l = 0; l < 4; l++)
            if (run_of(k+1, l) == run_of(j+1, l)) n_shared++;
      end
      for (int l = 0; l < 4; l++) if (run_of(NN-1, l) == 0) n_through++;
      for (int i = 0; i < 24; i++) begin
        left_i  = 4'($urandom);
        right_i = 4'($urandom);
        #1;
        settle(left_i, right_i, v, f);
        check("left end", left_o, v[0]);
        check("right end", right_o, v[NN-1]);
        @(posedge clk);
        for (int k = 0; k < NC; k++) ff[k] = f[k];
        @(negedge clk);
      end
    end
    $display("shared nets=%0d registered cells=%0d end-to-end lines=%0d", n_shared, n_reg, n_through);
    checks++;
    if (n_shared == 0 || n_reg == 0 || n_through == 0) begin
      failures++;
      $display("FAIL a bus situation never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
