// gsn_top: a Boolean GSN neural network in programmable logic, in its two
// forms side by side.
//
//  * u_net: the trained network of four pyramids (60 neurons, four layers)
//    as direct logic, each neuron's learned contents folded into its gates.
//    16 binary inputs in, four three-valued outputs (8 wires) out, plus the
//    binary class code read across the pyramids.
//  * u_fl: the same network mapped onto FLECHA programmable logic cells, 42
//    cells per pyramid (six cells per neuron, the first-layer neurons merged
//    with the second-layer neuron they feed), 168 cells in all. Its function
//    is whatever is shifted into its configuration chain; loaded with the
//    stream of u_net's contents it must agree with u_net output for output.
//    u_net and u_fl read the same input vector e.
//  * u_row: one row of five FLECHA cells on its segmented 4-line cell data
//    bus with switch blocks, the interconnect unit of the array, brought out
//    at both ends (where the real array joins it to the central bus and the
//    I/O pads) with a configuration chain of its own.
//  * u_ldr: the power-up loader. After each reset it fills u_fl's chain
//    from an external bit source (boot_addr out, boot_bit in, read in the
//    same cycle), N_PYR * 462 = 1848 bits, and raises boot_done 1849 cycles
//    after reset (one register stage behind the read).
//    From then on the external cfg_en/cfg_in may reload u_fl at will.
//
// Interface: e[15:0] inputs; net_y/net_code/net_code_valid from the network
// (combinational); clk, rst_n, cfg_en, cfg_in, cfg_out for the cell array
// (configuration and the optional user flip-flops); fl_y/fl_code/
// fl_code_valid its outputs, combinational or one clk cycle late depending
// on the configuration;
// row_* the row's chain and its two bus ends (cfg_en, clk, rst_n shared).
// rst_n also opens all of the row's bus switches and restarts the boot load.
// While boot_done is low u_fl ignores the external cfg_en, which still
// drives the row chain. Booting only u_fl, and leaving the row to be loaded
// by the user, is this design's choice.
module gsn_top
  import gsn_pkg::*;
#(
  parameter int unsigned N_PYR = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [PYR_IN-1:0] e,
  output gsn_t [N_PYR-1:0]  net_y,
  output logic [N_PYR-1:0]  net_code,
  output logic              net_code_valid,
  input  logic              cfg_en,
  input  logic              cfg_in,
  output logic              cfg_out,
  output gsn_t [N_PYR-1:0]  fl_y,
  output logic [N_PYR-1:0]  fl_code,
  output logic              fl_code_valid,
  input  logic              row_cfg_in,
  output logic              row_cfg_out,
  input  logic [3:0]        row_left_i,
  output logic [3:0]        row_left_o,
  input  logic [3:0]        row_right_i,
  output logic [3:0]        row_right_o,
  output logic [$clog2(N_PYR*flecha_pkg::PYR_CFG)-1:0] boot_addr,
  input  logic              boot_bit,
  output logic              boot_done
);

  logic ldr_cfg_en, ldr_cfg_in, fl_cfg_en, fl_cfg_in;

  flecha_cfg_loader #(.CHAIN_LEN(N_PYR * flecha_pkg::PYR_CFG)) u_ldr (
    .clk(clk), .rst_n(rst_n), .rom_addr(boot_addr), .rom_bit(boot_bit),
    .cfg_en(ldr_cfg_en), .cfg_in(ldr_cfg_in), .done(boot_done)
  );

  assign fl_cfg_en = boot_done ? cfg_en : ldr_cfg_en;
  assign fl_cfg_in = boot_done ? cfg_in : ldr_cfg_in;

  gsn_network #(.N_PYR(N_PYR)) u_net (
    .e(e), .y(net_y), .code(net_code), .code_valid(net_code_valid)
  );

  flecha_network #(.N_PYR(N_PYR)) u_fl (
    .clk(clk), .rst_n(rst_n), .cfg_en(fl_cfg_en), .cfg_in(fl_cfg_in),
    .cfg_out(cfg_out), .e(e), .y(fl_y), .code(fl_code),
    .code_valid(fl_code_valid)
  );

  flecha_row u_row (
    .clk(clk), .rst_n(rst_n), .cfg_en(cfg_en), .cfg_in(row_cfg_in),
    .cfg_out(row_cfg_out), .left_i(row_left_i), .left_o(row_left_o),
    .right_i(row_right_i), .right_o(row_right_o)
  );

endmodule
