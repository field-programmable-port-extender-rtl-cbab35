// fpx_port: one Field-programmable Port Extender between a line card and a switch port.
//
// It holds the NID (fixed routing, control cells, RAD programming) and the application
// the RAD carries in this design: on the ingress side the IP lookup (ingress_pair:
// two overlapped Tree Bitmap lookups on one ZBT SRAM) followed by the virtual output queues;
// on the egress side the output queue. Together with the switch-wide cell scheduler
// this is combined input/output queuing, with routing. Configuration words from control
// cells collect in the RAD program FIFO and rad_jtag_loader shifts them into the RAD.
//
// Dataflow in RAD mode: line card -> NID -> ingress_pair -> voq -> NID -> switch, and
// switch -> NID -> output queue -> NID -> line card. In bypass mode (before the RAD is
// programmed, or during a full reprogramming) the NID connects line card and switch
// directly. The queues hand the scheduler their state: voq_nonempty (a cell waits for
// output j), deq_ready (the VOQ can start a cell) and oq_room (room for two more cells
// in the output queue). A dequeue command (deq_valid, deq_port) sends one cell.
//
// The document shows the IP router and the queuing as two uses of the RAD; chaining
// lookup and VOQs in one RAD is this design's choice, as are the queue sizes.
module fpx_port import fpx_pkg::*; #(
  parameter int unsigned N_PORTS   = 8,
  parameter int unsigned VOQ_SLOTS = 512,    // cells in the ingress buffer
  parameter int unsigned OQ_DEPTH  = 256,    // words in the egress output queue
  parameter int unsigned CFG_DEPTH = 1024    // words in the RAD program FIFO
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // line card
  input  logic                       lc_rx_valid, output logic lc_rx_ready, input logic lc_rx_sof, input logic [31:0] lc_rx_data,
  output logic                       lc_tx_valid, input  logic lc_tx_ready, output logic lc_tx_sof, output logic [31:0] lc_tx_data,
  // switch
  input  logic                       sw_rx_valid, output logic sw_rx_ready, input logic sw_rx_sof, input logic [31:0] sw_rx_data,
  output logic                       sw_tx_valid, input  logic sw_tx_ready, output logic sw_tx_sof, output logic [31:0] sw_tx_data,
  // ZBT SRAM of the lookup engine
  output logic [SRAM_AW-1:0]         sram_addr,
  output logic                       sram_rd,
  input  logic [SRAM_DW-1:0]         sram_rdata,
  // RAD JTAG pins and DONE
  output logic                       rad_tck,
  output logic                       rad_tms,
  output logic                       rad_tdi,
  input  logic                       rad_done,
  // scheduler interface
  output logic [N_PORTS-1:0]         voq_nonempty,
  output logic                       deq_ready,
  input  logic                       deq_valid,
  input  logic [$clog2(N_PORTS)-1:0] deq_port,
  output logic                       oq_room,
  // status
  output logic                       rad_active,
  output logic [15:0]                voq_drops,
  output logic [15:0]                lookup_misses
);
  localparam int unsigned OQ_CW  = $clog2(OQ_DEPTH + 1);
  localparam int unsigned CFG_CW = $clog2(CFG_DEPTH + 1);

  // NID <-> RAD streams
  logic ri_tx_valid, ri_tx_ready, ri_tx_sof; logic [31:0] ri_tx_data;
  logic ri_rx_valid, ri_rx_ready, ri_rx_sof; logic [31:0] ri_rx_data;
  logic re_tx_valid, re_tx_ready, re_tx_sof; logic [31:0] re_tx_data;
  logic re_rx_valid, re_rx_ready, re_rx_sof; logic [31:0] re_rx_data;
  // lookup -> VOQ
  logic lk_valid, lk_ready, lk_sof; logic [31:0] lk_data;
  // configuration
  logic cfg_wr, prog_start, prog_busy, prog_done;
  logic [31:0] cfg_data;

  logic rad_configured_unused;
  logic [15:0] ctl_cells_unused, prog_count_unused, prog_errors_unused;
  logic [15:0] lookups_unused, enq_unused, deq_unused;
  logic buf_wr_unused, buf_rd_unused;

  nid u_nid (
    .clk, .rst_n,
    .lc_rx_valid, .lc_rx_ready, .lc_rx_sof, .lc_rx_data,
    .lc_tx_valid, .lc_tx_ready, .lc_tx_sof, .lc_tx_data,
    .sw_rx_valid, .sw_rx_ready, .sw_rx_sof, .sw_rx_data,
    .sw_tx_valid, .sw_tx_ready, .sw_tx_sof, .sw_tx_data,
    .ri_tx_valid, .ri_tx_ready, .ri_tx_sof, .ri_tx_data,
    .ri_rx_valid, .ri_rx_ready, .ri_rx_sof, .ri_rx_data,
    .re_tx_valid, .re_tx_ready, .re_tx_sof, .re_tx_data,
    .re_rx_valid, .re_rx_ready, .re_rx_sof, .re_rx_data,
    .cfg_wr, .cfg_data, .prog_start, .prog_busy, .prog_done, .rad_done,
    .rad_active, .rad_configured(rad_configured_unused),
    .ctl_cells(ctl_cells_unused), .prog_count(prog_count_unused), .prog_errors(prog_errors_unused)
  );

  ingress_pair u_ing (
    .clk, .rst_n,
    .in_valid(ri_tx_valid), .in_ready(ri_tx_ready), .in_sof(ri_tx_sof), .in_data(ri_tx_data),
    .out_valid(lk_valid), .out_ready(lk_ready), .out_sof(lk_sof), .out_data(lk_data),
    .sram_addr, .sram_rd, .sram_rdata,
    .lookups(lookups_unused), .misses(lookup_misses)
  );

  voq #(.N_PORTS(N_PORTS), .SLOTS(VOQ_SLOTS)) u_voq (
    .clk, .rst_n,
    .in_valid(lk_valid), .in_ready(lk_ready), .in_sof(lk_sof), .in_data(lk_data),
    .deq_valid, .deq_ready, .deq_port,
    .out_valid(ri_rx_valid), .out_ready(ri_rx_ready), .out_sof(ri_rx_sof), .out_data(ri_rx_data),
    .nonempty(voq_nonempty), .buf_wr(buf_wr_unused), .buf_rd(buf_rd_unused),
    .enq_cells(enq_unused), .deq_cells(deq_unused), .drops(voq_drops)
  );

  // Egress output queue: entries are {sof, data}.
  logic            oq_empty, oq_full, oq_ovf_unused;
  logic [32:0]     oq_rd_data;
  logic [OQ_CW-1:0] oq_count;
  sync_fifo #(.WIDTH(33), .DEPTH(OQ_DEPTH)) u_oq (
    .clk, .rst_n,
    .wr_en(re_tx_valid && !oq_full), .wr_data({re_tx_sof, re_tx_data}),
    .rd_en(re_rx_ready), .rd_data(oq_rd_data),
    .empty(oq_empty), .full(oq_full), .overflow(oq_ovf_unused), .count(oq_count)
  );
  assign re_tx_ready = !oq_full;
  assign re_rx_valid = !oq_empty;
  assign re_rx_sof   = oq_rd_data[32];
  assign re_rx_data  = oq_rd_data[31:0];
  assign oq_room     = int'(oq_count) + 2 * int'(CELL_WORDS) <= int'(OQ_DEPTH);

  // RAD program FIFO and loader.
  logic              cfg_empty, cfg_full_unused, cfg_ovf_unused, cfg_rd;
  logic [31:0]       cfg_rd_data;
  logic [CFG_CW-1:0] cfg_count;
  sync_fifo #(.WIDTH(32), .DEPTH(CFG_DEPTH)) u_cfg (
    .clk, .rst_n,
    .wr_en(cfg_wr), .wr_data(cfg_data),
    .rd_en(cfg_rd), .rd_data(cfg_rd_data),
    .empty(cfg_empty), .full(cfg_full_unused), .overflow(cfg_ovf_unused), .count(cfg_count)
  );

  rad_jtag_loader #(.CW(CFG_CW)) u_loader (
    .clk, .rst_n,
    .start(prog_start), .busy(prog_busy), .done(prog_done),
    .fifo_empty(cfg_empty), .fifo_data(cfg_rd_data), .fifo_count(cfg_count), .fifo_rd(cfg_rd),
    .tck(rad_tck), .tms(rad_tms), .tdi(rad_tdi)
  );
endmodule
