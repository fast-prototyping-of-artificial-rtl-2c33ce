// flecha_neuron_tb: a GSN neuron in six FLECHA cells, configured through the
// 66-bit chain.
//
// Each of the seven neurons a pyramid maps to cells (the four merged A-A-B
// groups, C0, C1, D0 of the published pyramid) is loaded in turn, with the
// stream built by flecha_pkg, and checked exhaustively against the published
// truth tables: a group over its 16 binary inputs, C0/C1/D0 over the nine
// three-valued input pairs (and code 11 read as U). D0 is then loaded once
// more with registered outputs and must answer one clock cycle late.
module flecha_neuron_tb;
  import gsn_pkg::*;
  import flecha_pkg::*;
  import gsn_ref_pkg::*;

  logic       clk = 1'b0;
  logic       rst_n, cfg_en, cfg_in, cfg_out;
  logic [3:0] x;
  gsn_t       y;
  int checks = 0, failures = 0;
  int n_groups = 0, n_upper = 0, n_reg = 0;

  flecha_neuron dut (.*);

  always #5 clk = ~clk;

  task automatic check(string what, byte got, byte exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s x=%b: got %s expected %s", what, x, got, exp);
    end
  endtask

  task automatic load(logic [NEURON_CFG-1:0] s);
    @(negedge clk);
    cfg_en = 1'b1;
    for (int k = 0; k < NEURON_CFG; k++) begin
      cfg_in = s[k];
      @(negedge clk);
    end
    cfg_en = 1'b0;
  endtask

  initial begin
    #500000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    flecha_neuron_cfg_t c;
    byte a, b, exp_c;
    gsn_t ga, gb;
    rst_n = 1'b0; cfg_en = 1'b0; cfg_in = 1'b0; x = '0;
    @(negedge clk);
    rst_n = 1'b1;
    // Merged first-layer groups: A(2g), A(2g+1) -> Bg.
    for (int g = 0; g < 4; g++) begin
      c = neuron_cfg(group_wire_table(PYR_MEM_TRAINED[2*g], PYR_MEM_TRAINED[2*g+1], PYR_MEM_TRAINED[8+g], 1'b1),
                     group_wire_table(PYR_MEM_TRAINED[2*g], PYR_MEM_TRAINED[2*g+1], PYR_MEM_TRAINED[8+g], 1'b0), 1'b0);
      load(neuron_chain(c));
      n_groups++;
      for (int v = 0; v < 16; v++) begin
        x = 4'(v);
        #1;
        a = table_neuron(2*g,   x[0] ? "1" : "0", x[1] ? "1" : "0");
        b = table_neuron(2*g+1, x[2] ? "1" : "0", x[3] ? "1" : "0");
        check($sformatf("group %0d", g), gsn_to_char(y), table_neuron(8+g, a, b));
      end
    end
    // C0, C1, D0 with three-valued inputs; x = {b.u, b.one, a.u, a.one}.
    for (int n = 12; n < 15; n++) begin
      c = neuron_cfg(gsn_wire_table(PYR_MEM_TRAINED[n], 1'b1), gsn_wire_table(PYR_MEM_TRAINED[n], 1'b0), 1'b0);
      load(neuron_chain(c));
      n_upper++;
      for (int v = 0; v < 16; v++) begin
        ga = {v[0], v[1]};
        gb = {v[2], v[3]};
        x  = 4'(v);
        #1;
        a = (ga[0]) ? "U" : gsn_to_char(ga);
        b = (gb[0]) ? "U" : gsn_to_char(gb);
        check($sformatf("neuron %0d", n), gsn_to_char(y), table_neuron(n, a, b));
      end
    end
    // D0 registered: the output of inputs applied in one cycle appears after
    // the next rising edge.
    c = neuron_cfg(gsn_wire_table(PYR_MEM_TRAINED[14], 1'b1), gsn_wire_table(PYR_MEM_TRAINED[14], 1'b0), 1'b1);
    load(neuron_chain(c));
    n_reg++;
    exp_c = "?";
    for (int v = 0; v < 16; v++) begin
      x  = 4'(v);
      @(negedge clk);
      ga = {x[0], x[1]};
      gb = {x[2], x[3]};
      a = (ga[0]) ? "U" : gsn_to_char(ga);
      b = (gb[0]) ? "U" : gsn_to_char(gb);
      check("registered D0", gsn_to_char(y), table_neuron(14, a, b));
      x = ~x;   // a change between edges must not show
      #1;
      check("registered D0 holds", gsn_to_char(y), table_neuron(14, a, b));
    end
    checks++;
    if (n_groups == 0 || n_upper == 0 || n_reg == 0) begin
      failures++;
      $display("FAIL not all neuron kinds exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
