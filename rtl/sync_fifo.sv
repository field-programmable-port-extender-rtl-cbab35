// sync_fifo: single-clock first-in first-out buffer with show-ahead read.
//
// Used twice on the FPX: as the RAD program FIFO, which collects configuration words
// from control cells until the RAD is programmed, and as the egress output queue,
// which holds cells (33-bit entries: start-of-cell flag and data word) on their way
// to the line card. The document names both buffers; their depth and this
// register-array implementation are this design's choices.
//
// Interface: wr_en/wr_data write when not full (a write while full is dropped and
// flagged on 'overflow' for that cycle); rd_data always shows the oldest entry and
// rd_en pops it when not empty. 'count' is the number of entries held. Reading and
// writing in the same cycle is allowed, also when full.
module sync_fifo #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 1024
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       wr_en,
  input  logic [WIDTH-1:0]           wr_data,
  input  logic                       rd_en,
  output logic [WIDTH-1:0]           rd_data,
  output logic                       empty,
  output logic                       full,
  output logic                       overflow,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wr_ptr, rd_ptr;
  logic             do_wr, do_rd;

  assign empty    = (count == 0);
  assign full     = (count == ($clog2(DEPTH+1))'(DEPTH));
  assign do_rd    = rd_en && !empty;
  assign do_wr    = wr_en && (!full || do_rd);
  assign overflow = wr_en && !do_wr;
  assign rd_data  = mem[rd_ptr];

  function automatic logic [AW-1:0] inc(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_wr) wr_ptr <= inc(wr_ptr);
      if (do_rd) rd_ptr <= inc(rd_ptr);
      count <= count + ($bits(count))'(do_wr) - ($bits(count))'(do_rd);
    end
  end
endmodule
