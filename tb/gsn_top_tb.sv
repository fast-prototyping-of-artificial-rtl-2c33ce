// gsn_top_tb: end-to-end test of the whole design at its default size.
//
// The top is used as it is (four pyramids, 60 neurons, 168 cells).
//  1. After reset the boot loader fills the cell array from a ROM model
//     holding the published pyramid's stream four times; boot_done must
//     rise after exactly 1849 cycles (1848 bits, one register stage). All
//     65536 input vectors are then applied: every pyramid of both networks
//     is compared with the truth-table model, the class code and valid flag
//     with the values derived from it, and every cell-array output with the
//     matching output of the direct network.
//  2. The array is reconfigured with every D0 registered; its outputs must
//     trail the input by exactly one cycle while the network stays
//     combinational.
//  3. Pyramids 1 and 3 of the array are reprogrammed with another trained
//     pyramid and compared with a separately coded majority model; pyramids
//     0 and 2 keep the published one.
//  3b. A reset restarts the boot load, which restores the published
//     pyramid in all four.
//  4. The cell row is configured so that cell 0 ANDs three lines entering at
//     the left end and sends the result along line 3 to the right end, and
//     cell 2 registers that line and sends it along line 0 to the right end:
//     both right-end lines are checked for 256 cycles.
// Counted mechanisms, each of which must occur: undefined (U) pyramid
// outputs, recognised patterns (valid code), 0 and 1 outputs, configuration
// loads, boot loads, registered-output cycles, reprogramming.
module gsn_top_tb;
  import gsn_pkg::*;
  import flecha_pkg::*;
  import gsn_ref_pkg::*;

  localparam string ALT [15] = '{
    "01U1", "1U00", "U011", "10U0", "0110", "U1U0", "1001", "01UU",
    "1U0U", "U101", "0U11", "10UU", "U01U", "1U01", "01U1"
  };

  logic        clk = 1'b0;
  logic        rst_n = 1'b0, cfg_en = 1'b0;
  logic        cfg_in, cfg_out;
  logic [15:0] e;
  gsn_t [3:0]  net_y;
  logic [3:0]  net_code;
  logic        net_code_valid;
  gsn_t [3:0]  fl_y;
  logic [3:0]  fl_code;
  logic        fl_code_valid;
  logic        row_cfg_in, row_cfg_out;
  logic [3:0]  row_left_i, row_left_o, row_right_i, row_right_o;
  int checks = 0, failures = 0;
  int n_row_comb = 0, n_row_reg = 0;
  int n_u = 0, n_0 = 0, n_1 = 0, n_valid = 0, n_load = 0, n_reg = 0, n_reprog = 0;
  longint load_cycles;
  logic [$clog2(NET_CFG)-1:0] boot_addr;
  logic        boot_bit, boot_done;
  logic [NET_CFG-1:0] boot_rom = network_chain({4{PYR_MEM_TRAINED}}, 4'b0000);
  int n_boot = 0;

  gsn_top dut (.*);

  assign boot_bit = boot_rom[boot_addr];

  always #5 clk = ~clk;

  task automatic check(string what, byte got, byte exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s e=%h: got %s expected %s", what, e, got, exp);
    end
  endtask

  task automatic load(logic [NET_CFG-1:0] s);
    @(negedge clk);
    cfg_en = 1'b1;
    load_cycles = 0;
    for (int k = 0; k < NET_CFG; k++) begin
      cfg_in = s[k];
      @(negedge clk);
      load_cycles++;
    end
    cfg_en = 1'b0;
    n_load++;
  endtask

  // Reset, then wait for the boot loader; it must take exactly NET_CFG + 1
  // cycles.
  task automatic boot();
    int cycles;
    @(negedge clk);
    rst_n = 1'b0;
    @(negedge clk);
    checks++;
    if (boot_done) begin
      failures++;
      $display("FAIL boot_done high during reset");
    end
    rst_n = 1'b1;
    cycles = 0;
    while (!boot_done && cycles < 2 * NET_CFG) begin
      @(negedge clk);
      cycles++;
    end
    checks++;
    if (cycles != NET_CFG + 1 || NET_CFG != 4 * 42 * 11) begin
      failures++;
      $display("FAIL boot load took %0d cycles", cycles);
    end
    n_boot++;
  endtask

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    byte r;
    rst_n = 1'b0; cfg_en = 1'b0; cfg_in = 1'b0; e = '0;
    row_cfg_in = 1'b0; row_left_i = '0; row_right_i = '0;
    boot();
    for (int v = 0; v < 65536; v++) begin
      e = 16'(v);
      #1;
      r = table_pyramid(e);
      for (int p = 0; p < 4; p++) check($sformatf("network pyramid %0d", p), gsn_to_char(net_y[p]), r);
      check("code", net_code == {4{r == "1"}} ? "y" : "n", "y");
      check("code valid", net_code_valid ? "U" == r ? "n" : "y" : r == "U" ? "y" : "n", "y");
      for (int p = 0; p < 4; p++) begin
        check($sformatf("cell pyramid %0d", p), gsn_to_char(fl_y[p]), r);
        check($sformatf("cell pyramid %0d vs network", p), gsn_to_char(fl_y[p]),
              gsn_to_char(net_y[p]));
      end
      check("cell code vs network", fl_code == net_code ? "y" : "n", "y");
      check("cell code valid vs network", fl_code_valid == net_code_valid ? "y" : "n", "y");
      if (r == "U") n_u++;
      if (r == "0") n_0++;
      if (r == "1") n_1++;
      if (net_code_valid) n_valid++;
    end

    load(network_chain({4{PYR_MEM_TRAINED}}, 4'b1111));
    for (int i = 0; i < 1024; i++) begin
      e = 16'($urandom);
      r = table_pyramid(e);
      #1;
      check("network stays combinational", gsn_to_char(net_y[0]), r);
      @(negedge clk);
      for (int p = 0; p < 4; p++) check("registered array one cycle late", gsn_to_char(fl_y[p]), r);
      e = ~e;
      #1;
      for (int p = 0; p < 4; p++) check("registered array holds", gsn_to_char(fl_y[p]), r);
      n_reg++;
    end

    load(network_chain({mem_from_strings(ALT), PYR_MEM_TRAINED,
                        mem_from_strings(ALT), PYR_MEM_TRAINED}, 4'b0000));
    n_reprog++;
    for (int i = 0; i < 4096; i++) begin
      e = 16'($urandom);
      #1;
      check("reprogrammed pyramid 1", gsn_to_char(fl_y[1]), maj_pyramid(ALT, e));
      check("reprogrammed pyramid 3", gsn_to_char(fl_y[3]), maj_pyramid(ALT, e));
      check("kept pyramid 0", gsn_to_char(fl_y[0]), table_pyramid(e));
      check("kept pyramid 2", gsn_to_char(fl_y[2]), table_pyramid(e));
      check("network unchanged", gsn_to_char(net_y[3]), table_pyramid(e));
    end

    boot();
    for (int i = 0; i < 4096; i++) begin
      e = 16'($urandom);
      #1;
      for (int p = 0; p < 4; p++) check("array after reboot", gsn_to_char(fl_y[p]), table_pyramid(e));
    end

    // Row: cell 0 = AND(line 0, 1, 2) onto line 3 (selects 00); cell 2
    // registers line 3 (selects 11: input A = line 3) onto line 0; cells 1,
    // 3, 4 hold 0. Switch blocks 0..5 (lines 3..0): 0111, 1000, 1000, 1001,
    // 1001, 1001.
    begin
      flecha_cfg_t rc [5];
      logic [3:0]  rs [6];
      logic [5*11+6*4-1:0] rstream;
      logic r_and, r_reg;
      int p;
      foreach (rc[k]) rc[k] = '0;
      rc[0].d = 8'b1000_0000;
      rc[2].d = 8'b1010_1010;
      rc[2].s1 = 1'b1; rc[2].s2 = 1'b1; rc[2].s3 = 1'b1;
      rs = '{4'b0111, 4'b1000, 4'b1000, 4'b1001, 4'b1001, 4'b1001};
      p = 0;
      for (int i = 0; i < 4; i++) rstream[p++] = rs[5][i];
      for (int k = 4; k >= 0; k--) begin
        for (int i = 0; i < 11; i++) rstream[p++] = rc[k][i];
        for (int i = 0; i < 4; i++) rstream[p++] = rs[k][i];
      end
      row_left_i = '0; row_right_i = '0;
      @(negedge clk);
      cfg_en = 1'b1;
      for (int i = 0; i < p; i++) begin
        row_cfg_in = rstream[i];
        @(negedge clk);
      end
      cfg_en = 1'b0;
      r_reg = 1'b0;
      for (int i = 0; i < 256; i++) begin
        row_left_i = 4'($urandom);
        #1;
        r_and = &row_left_i[2:0];
        check("row combinational path", row_right_o[3] ? "1" : "0", r_and ? "1" : "0");
        check("row registered path", row_right_o[0] ? "1" : "0", r_reg ? "1" : "0");
        check("row left end", row_left_o == row_left_i ? "y" : "n", "y");
        if (r_and) n_row_comb++;
        if (r_reg) n_row_reg++;
        @(negedge clk);
        r_reg = r_and;
      end
    end

    $display("row: AND true %0d times, registered 1 seen %0d times", n_row_comb, n_row_reg);
    if (n_row_comb == 0 || n_row_reg == 0) begin failures++; $display("FAIL row paths never carried a 1"); end
    checks++;
    $display("mechanisms: U=%0d 0=%0d 1=%0d valid=%0d boots=%0d loads=%0d registered=%0d reprogram=%0d",
             n_u, n_0, n_1, n_valid, n_boot, n_load, n_reg, n_reprog);
    if (n_u == 0)      begin failures++; $display("FAIL no U output"); end
    if (n_0 == 0)      begin failures++; $display("FAIL no 0 output"); end
    if (n_1 == 0)      begin failures++; $display("FAIL no 1 output"); end
    if (n_valid == 0)  begin failures++; $display("FAIL no recognised pattern"); end
    if (n_boot != 2)   begin failures++; $display("FAIL boot loads"); end
    if (n_load != 2)   begin failures++; $display("FAIL configuration loads"); end
    if (n_reg == 0)    begin failures++; $display("FAIL no registered cycle"); end
    if (n_reprog == 0) begin failures++; $display("FAIL no reprogramming"); end
    checks += 8;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
