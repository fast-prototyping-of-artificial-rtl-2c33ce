// flecha_pyramid_tb: one GSN pyramid in 42 FLECHA cells.
//
// 1. The published pyramid's 462-bit stream is shifted in; all 65536 inputs are
//    compared with the truth-table model of the pyramid.
// 2. A different trained pyramid is shifted in (reprogramming); the bits that
//    leave the chain meanwhile must be the first stream. 4096 random inputs
//    are compared with a separately coded majority model.
// 3. The published pyramid is loaded with D0's cells registered; the output
//    must follow the input one clock cycle late.
// Each of the three situations is counted and must occur.
module flecha_pyramid_tb;
  import gsn_pkg::*;
  import flecha_pkg::*;
  import gsn_ref_pkg::*;

  localparam string ALT [15] = '{
    "01U1", "1U00", "U011", "10U0", "0110", "U1U0", "1001", "01UU",
    "1U0U", "U101", "0U11", "10UU", "U01U", "1U01", "01U1"
  };

  logic        clk = 1'b0;
  logic        rst_n, cfg_en, cfg_in, cfg_out;
  logic [15:0] e;
  gsn_t        y;
  int checks = 0, failures = 0;
  int n_comb = 0, n_reprog = 0, n_reg = 0;

  flecha_pyramid dut (.*);

  always #5 clk = ~clk;

  task automatic check(string what, byte got, byte exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s e=%h: got %s expected %s", what, e, got, exp);
    end
  endtask

  // Shifts s in; returns the bits that left the chain.
  task automatic load(input logic [PYR_CFG-1:0] s, output logic [PYR_CFG-1:0] old);
    @(negedge clk);
    cfg_en = 1'b1;
    for (int k = 0; k < PYR_CFG; k++) begin
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
    logic [PYR_CFG-1:0] s_ref, s_alt, s_reg, old;
    byte exp_c;
    s_ref = pyramid_chain(PYR_MEM_TRAINED, 1'b0);
    s_alt = pyramid_chain(mem_from_strings(ALT), 1'b0);
    s_reg = pyramid_chain(PYR_MEM_TRAINED, 1'b1);
    rst_n = 1'b0; cfg_en = 1'b0; cfg_in = 1'b0; e = '0;
    @(negedge clk);
    rst_n = 1'b1;

    load(s_ref, old);
    for (int v = 0; v < 65536; v++) begin
      e = 16'(v);
      #1;
      check("published pyramid", gsn_to_char(y), table_pyramid(e));
    end
    n_comb++;

    load(s_alt, old);
    checks++;
    if (old != s_ref) begin
      failures++;
      $display("FAIL chain output is not the previous configuration");
    end
    for (int i = 0; i < 4096; i++) begin
      e = 16'($urandom);
      #1;
      check("reprogrammed pyramid", gsn_to_char(y), maj_pyramid(ALT, e));
    end
    n_reprog++;

    load(s_reg, old);
    for (int i = 0; i < 512; i++) begin
      e = 16'($urandom);
      exp_c = table_pyramid(e);
      @(negedge clk);
      check("registered pyramid after edge", gsn_to_char(y), exp_c);
      e = ~e;
      #1;
      check("registered pyramid holds", gsn_to_char(y), exp_c);
    end
    n_reg++;

    checks++;
    if (n_comb == 0 || n_reprog == 0 || n_reg == 0) begin
      failures++;
      $display("FAIL not every configuration exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
