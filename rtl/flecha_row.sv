// flecha_row: a row of FLECHA logic cells on a segmented 4-line cell data
// bus.
//
// Row placement: the cells of one function sit side by side and talk only to
// their neighbours over the cell data bus, a bundle of 4 lines. Each cell owns
// one bus segment; switch blocks sit between neighbouring segments and at
// both ends of the row (where the row meets the central bus or the I/O bus).
// A switch block holds one configurable pass switch per line. Lines joined by
// closed switches form one net.
//
// Each cell reads three lines of its own segment and puts its output on the
// fourth (flecha_cell). A net carries the OR of everything that drives it:
// cell outputs put on it and, through a closed end switch, the left_i or
// right_i value from outside. Treating a net as wired-OR (a line nobody
// drives high reads 0) is this design's model of the bus; the electrical
// behaviour of the real switches and of two cells driving one net is not
// described and is not modelled. Nets are resolved with a left-to-right and a
// right-to-left pass over the switch chain, so the bus itself has no loop.
// A cell that, through the bus, reads its own output (directly or through
// other combinational cells) makes a combinational loop; that is a property
// of the configuration, as in any programmable array, and the loaded
// configuration must avoid it (a registered cell breaks such a path). The
// lint tools therefore see a structural loop through cells and bus, and,
// since each pass is held in one vector, a false one along the pass: both
// stand.
//
// Configuration chain (one shift register, shifted while cfg_en is high):
// cfg_in -> switch block 0 (left end) -> cell 0 -> switch block 1 -> cell 1
// -> ... -> cell N-1 -> switch block N (right end) -> cfg_out.
// A switch block is 4 bits, bit l closing the switch of line l; the first bit
// shifted in ends in bit 0 of the last block in the chain. rst_n (active
// low, asynchronous) clears the switch blocks, and every switch is held open
// while rst_n is low or cfg_en is high. Switch-block contents, bit order,
// chain order, the clear and the hold are this design's choices.
//
// Interface: left_i/right_i drive the end nets through the end switches;
// left_o/right_o show the end nets. Combinational from bus to bus except
// through cells configured as registered.
module flecha_row
  import flecha_pkg::*;
#(
  parameter int unsigned N_CELLS = 5
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       cfg_en,
  input  logic       cfg_in,
  output logic       cfg_out,
  input  logic [3:0] left_i,
  output logic [3:0] left_o,
  input  logic [3:0] right_i,
  output logic [3:0] right_o
);

  localparam int unsigned N_NODES = N_CELLS + 2;   // left end, segments, right end

  logic [N_CELLS:0][3:0]   sw;       // switch block k: between node k and k+1
  logic [N_CELLS:0][3:0]   sw_on;    // switches in effect
  logic [N_NODES-1:0][3:0] drv;      // what each node drives on its lines
  logic [N_NODES-1:0][3:0] fwd, bwd, net;
  logic [N_CELLS-1:0]      cell_cfg_in, cell_cfg_out;

  // Switch blocks and their place in the configuration chain.
  for (genvar k = 0; k <= N_CELLS; k++) begin : g_sw
    logic sw_in;
    if (k == 0) begin : g_first
      assign sw_in = cfg_in;
    end else begin : g_next
      assign sw_in = cell_cfg_out[k-1];
    end
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)      sw[k] <= '0;
      else if (cfg_en) sw[k] <= {sw_in, sw[k][3:1]};
    end
    if (k < N_CELLS) begin : g_to_cell
      assign cell_cfg_in[k] = sw[k][0];
    end
  end
  assign cfg_out = sw[N_CELLS][0];

  // Cells, each on its own segment (node k+1).
  for (genvar k = 0; k < N_CELLS; k++) begin : g_cell
    logic [3:0] bus_o, bus_oe;
    logic       out_unused;
    flecha_cell u_cell (
      .clk    (clk),
      .rst_n  (rst_n),
      .cfg_en (cfg_en),
      .cfg_in (cell_cfg_in[k]),
      .cfg_out(cell_cfg_out[k]),
      .bus_i  (net[k+1]),
      .out    (out_unused),
      .bus_o  (bus_o),
      .bus_oe (bus_oe)
    );
    assign drv[k+1] = bus_o & bus_oe;
  end
  assign drv[0]         = left_i;
  assign drv[N_NODES-1] = right_i;

  // All switches are open during reset and while the chain shifts, so a
  // half-loaded configuration cannot close a loop: alone on its segment a
  // cell never reads the line it drives.
  assign sw_on = rst_n && !cfg_en ? sw : '0;

  // Net resolution: OR of the drivers reachable through closed switches.
  assign fwd[0]         = drv[0];
  assign bwd[N_NODES-1] = drv[N_NODES-1];
  for (genvar n = 1; n < N_NODES; n++) begin : g_fwd
    assign fwd[n] = drv[n] | (sw_on[n-1] & fwd[n-1]);
  end
  for (genvar n = 0; n < N_NODES - 1; n++) begin : g_bwd
    assign bwd[n] = drv[n] | (sw_on[n] & bwd[n+1]);
  end
  assign net = fwd | bwd;

  assign left_o  = net[0];
  assign right_o = net[N_NODES-1];

endmodule
