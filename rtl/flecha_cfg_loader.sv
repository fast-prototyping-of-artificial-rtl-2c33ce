// flecha_cfg_loader: loads a FLECHA configuration chain automatically after
// reset.
//
// The configuration of the cell array lives in a shift-register chain that
// is filled at power-up without help from the user logic. This controller
// does that filling: when rst_n is released it asks an external bit source
// (for example a serial PROM or a ROM) for bits 0, 1, ..., CHAIN_LEN-1 of the
// configuration stream, one address per clock on rom_addr. The source
// answers on rom_bit in the same cycle; the loader registers that bit and
// shifts it into the chain in the next cycle. When the last bit has been
// shifted it raises done and stays idle until the next reset.
//
// Timing: rom_addr = k during cycle k after reset; bit k is on cfg_in with
// cfg_en high during cycle k+1 and enters the chain at the rising edge that
// ends that cycle. cfg_en is high for exactly CHAIN_LEN cycles (1 to
// CHAIN_LEN) and done is high from cycle CHAIN_LEN+1 on; an assertion checks
// that the two are never high together. The source interface
// (address out, bit in, one register stage) and the stream order (bit 0
// first) are this design's choices; the original describes only that the
// chain is loaded automatically at power-up.
module flecha_cfg_loader
  import flecha_pkg::*;
#(
  parameter int unsigned CHAIN_LEN = PYR_CFG,
  parameter int unsigned ADDR_W    = $clog2(CHAIN_LEN)
) (
  input  logic              clk,
  input  logic              rst_n,
  output logic [ADDR_W-1:0] rom_addr,
  input  logic              rom_bit,
  output logic              cfg_en,
  output logic              cfg_in,
  output logic              done
);

  // S_READ: addresses are being issued; S_DONE: all issued.
  typedef enum logic {S_READ, S_DONE} state_t;

  state_t            state;
  logic [ADDR_W-1:0] addr;
  logic              en_q, bit_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_READ;
      addr  <= '0;
      en_q  <= 1'b0;
      bit_q <= 1'b0;
    end else begin
      // The chain is never shifted once the load is reported complete.
      a_no_shift_after_done: assert (!(cfg_en && done));
      en_q  <= (state == S_READ);
      bit_q <= rom_bit;
      if (state == S_READ) begin
        if (addr == ADDR_W'(CHAIN_LEN - 1)) state <= S_DONE;
        else                                addr  <= addr + 1'b1;
      end
    end
  end

  assign rom_addr = addr;
  assign cfg_en   = en_q;
  assign cfg_in   = bit_q;
  assign done     = (state == S_DONE) && !en_q;

endmodule
