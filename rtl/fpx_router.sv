// fpx_router: a switch port set of N_PORTS FPX modules with a shared cell scheduler.
//
// Each port of the switch fabric gets an fpx_port between its line card and the
// fabric. The ingress side of every FPX looks up the IP destination of each cell,
// tags the cell with its output port and sorts it into a virtual output queue; the
// egress side buffers cells from the fabric in an output queue before the line card.
// Once per cell slot the scheduler chooses which input sends a cell to which output,
// at most one cell per input and per output; an input is asked only when its VOQ can
// start a cell, its RAD is active, and the output queue has room.
//
// The fabric itself (a Benes network of switch ASICs), the line cards, the ZBT SRAMs
// and the RAD's configuration logic are outside this RTL: their connections are the
// ports below, one entry per switch port. Cells go to the fabric on sw_tx_* with the
// output port in word 1 bits 7:0 and come back on sw_rx_*.
//
// Eight ports is the document's WUGS-20 configuration (8 x 2.4 Gbit/s = 20 Gbit/s).
module fpx_router import fpx_pkg::*; #(
  parameter int unsigned N_PORTS     = 8,
  parameter int unsigned VOQ_SLOTS   = 512,
  parameter int unsigned OQ_DEPTH    = 256,
  parameter int unsigned CFG_DEPTH   = 1024,
  parameter int unsigned SLOT_CYCLES = 16
) (
  input  logic                              clk,
  input  logic                              rst_n,
  // line cards
  input  logic [N_PORTS-1:0]                lc_rx_valid,
  output logic [N_PORTS-1:0]                lc_rx_ready,
  input  logic [N_PORTS-1:0]                lc_rx_sof,
  input  logic [N_PORTS-1:0][31:0]          lc_rx_data,
  output logic [N_PORTS-1:0]                lc_tx_valid,
  input  logic [N_PORTS-1:0]                lc_tx_ready,
  output logic [N_PORTS-1:0]                lc_tx_sof,
  output logic [N_PORTS-1:0][31:0]          lc_tx_data,
  // switch fabric
  output logic [N_PORTS-1:0]                sw_tx_valid,
  input  logic [N_PORTS-1:0]                sw_tx_ready,
  output logic [N_PORTS-1:0]                sw_tx_sof,
  output logic [N_PORTS-1:0][31:0]          sw_tx_data,
  input  logic [N_PORTS-1:0]                sw_rx_valid,
  output logic [N_PORTS-1:0]                sw_rx_ready,
  input  logic [N_PORTS-1:0]                sw_rx_sof,
  input  logic [N_PORTS-1:0][31:0]          sw_rx_data,
  // ZBT SRAMs of the lookup engines
  output logic [N_PORTS-1:0][SRAM_AW-1:0]   sram_addr,
  output logic [N_PORTS-1:0]                sram_rd,
  input  logic [N_PORTS-1:0][SRAM_DW-1:0]   sram_rdata,
  // RAD JTAG pins
  output logic [N_PORTS-1:0]                rad_tck,
  output logic [N_PORTS-1:0]                rad_tms,
  output logic [N_PORTS-1:0]                rad_tdi,
  input  logic [N_PORTS-1:0]                rad_done,
  // status
  output logic [N_PORTS-1:0]                rad_active,
  output logic [N_PORTS-1:0][15:0]          voq_drops,
  output logic [N_PORTS-1:0][15:0]          lookup_misses,
  output logic                              slot_start,
  output logic [N_PORTS-1:0][N_PORTS-1:0]   grant
);
  localparam int unsigned PW = $clog2(N_PORTS);

  logic [N_PORTS-1:0][N_PORTS-1:0] nonempty, req;
  logic [N_PORTS-1:0]              deq_ready, oq_room, grant_any;
  logic [N_PORTS-1:0][PW-1:0]      grant_port;

  for (genvar i = 0; i < N_PORTS; i++) begin : g_port
    fpx_port #(.N_PORTS(N_PORTS), .VOQ_SLOTS(VOQ_SLOTS), .OQ_DEPTH(OQ_DEPTH), .CFG_DEPTH(CFG_DEPTH)) u_fpx (
      .clk, .rst_n,
      .lc_rx_valid(lc_rx_valid[i]), .lc_rx_ready(lc_rx_ready[i]), .lc_rx_sof(lc_rx_sof[i]), .lc_rx_data(lc_rx_data[i]),
      .lc_tx_valid(lc_tx_valid[i]), .lc_tx_ready(lc_tx_ready[i]), .lc_tx_sof(lc_tx_sof[i]), .lc_tx_data(lc_tx_data[i]),
      .sw_rx_valid(sw_rx_valid[i]), .sw_rx_ready(sw_rx_ready[i]), .sw_rx_sof(sw_rx_sof[i]), .sw_rx_data(sw_rx_data[i]),
      .sw_tx_valid(sw_tx_valid[i]), .sw_tx_ready(sw_tx_ready[i]), .sw_tx_sof(sw_tx_sof[i]), .sw_tx_data(sw_tx_data[i]),
      .sram_addr(sram_addr[i]), .sram_rd(sram_rd[i]), .sram_rdata(sram_rdata[i]),
      .rad_tck(rad_tck[i]), .rad_tms(rad_tms[i]), .rad_tdi(rad_tdi[i]), .rad_done(rad_done[i]),
      .voq_nonempty(nonempty[i]), .deq_ready(deq_ready[i]),
      .deq_valid(slot_start && grant_any[i]), .deq_port(grant_port[i]),
      .oq_room(oq_room[i]),
      .rad_active(rad_active[i]), .voq_drops(voq_drops[i]), .lookup_misses(lookup_misses[i])
    );
  end

  always_comb
    for (int i = 0; i < int'(N_PORTS); i++)
      req[i] = (deq_ready[i] && rad_active[i]) ? (nonempty[i] & oq_room) : '0;

  cell_scheduler #(.N_PORTS(N_PORTS), .SLOT_CYCLES(SLOT_CYCLES)) u_sched (
    .clk, .rst_n, .req,
    .grant_valid(slot_start), .grant, .grant_any, .grant_port
  );
endmodule
