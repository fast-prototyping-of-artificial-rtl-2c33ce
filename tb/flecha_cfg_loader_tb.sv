// flecha_cfg_loader_tb: the power-up configuration loader.
//
// A random 462-bit stream sits in a ROM model. After reset the loader must
// shift exactly that stream, bit 0 first, one bit per cycle with cfg_en
// high, and raise done after exactly 463 cycles (462 bits plus the register
// stage behind the ROM read); afterwards cfg_en must stay low. A second reset in the middle of a load must restart it from bit 0.
// cfg_en and done must never be high together.
module flecha_cfg_loader_tb;
  import flecha_pkg::*;

  localparam int N = PYR_CFG;
  localparam int AW = $clog2(N);

  logic          clk = 1'b0;
  logic          rst_n = 1'b0;
  logic [AW-1:0] rom_addr;
  logic          rom_bit, cfg_en, cfg_in, done;
  logic [N-1:0]  rom;
  logic [N-1:0]  got;
  int            n_got;
  int checks = 0, failures = 0, n_restart = 0;

  flecha_cfg_loader dut (.*);

  always #5 clk = ~clk;

  assign rom_bit = rom[rom_addr];

  // Receiver: what a chain would see.
  always @(posedge clk) begin
    if (rst_n && cfg_en) begin
      got[n_got] <= cfg_in;
      n_got      <= n_got + 1;
    end
  end

  always @(posedge clk) begin
    if (cfg_en && done) begin
      failures++;
      $display("FAIL cfg_en and done together");
    end
  end

  task automatic check(string what, int got_v, int exp);
    checks++;
    if (got_v != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got_v, exp);
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
    int cycles;
    for (int i = 0; i < N; i++) rom[i] = 1'($urandom);
    for (int run = 0; run < 2; run++) begin
      rst_n = 1'b0;
      n_got = 0;
      got   = '0;
      repeat (2) @(negedge clk);
      rst_n = 1'b1;
      if (run == 0) begin
        // Interrupt the first load after 100 cycles.
        repeat (100) @(negedge clk);
        check("bits taken before the interrupting reset", n_got, 99);
        n_restart++;
        continue;
      end
      cycles = 0;
      while (!done && cycles < 2 * N) begin
        @(negedge clk);
        cycles++;
      end
      check("load cycles", cycles, N + 1);
      check("bits shifted", n_got, N);
      checks++;
      if (got != rom) begin
        failures++;
        $display("FAIL shifted stream differs from the ROM");
      end
      repeat (20) @(negedge clk);
      check("no shifting after done", n_got, N);
      check("done stays high", int'(done), 1);
    end
    check("restart exercised", n_restart, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
