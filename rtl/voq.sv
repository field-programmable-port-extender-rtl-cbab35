// voq: virtual output queues of one ingress port.
//
// Cells are sorted by destination port into N_PORTS queues so that a cell for a busy
// output never blocks cells for other outputs (no head-of-line blocking). Cell data
// sit in a shared buffer of SLOTS cell slots of 7 x 64-bit words, the width of the
// FPX's SDRAM: a cell is written with 7 writes and read back with 7 reads, as the
// document counts. Per-queue linked lists (head, tail, count, next pointer) play the
// part of the pointers the document keeps in its ZBT SRAM; here they are arrays.
// Free slots are handed out first from a never-used counter, then from a free list.
//
// Enqueue: a 14-word cell on in_* (in_ready is always 1). Its destination is the tag
// in word 1. The slot is taken when word 1 arrives and word pair k is written as
// buffer word k. The cell joins its queue after word 13. A cell is dropped, and
// counted in 'drops', when no slot is free (overflow) or its tag is not a port.
// Dequeue: deq_valid with deq_port while deq_ready starts reading the head cell of
// that queue (ignored if the queue is empty); the cell leaves on out_* in 14 words,
// one per cycle while out_ready. The slot is freed after the last word.
// buf_wr / buf_rd pulse once per 64-bit buffer write / read.
//
// From the document: sorting by destination port, 56-byte cells, 64-bit buffer words
// and 7 operations per cell. Buffer size, pointer layout, drop policy and the
// handshake are this design's choices.
module voq import fpx_pkg::*; #(
  parameter int unsigned N_PORTS = 8,
  parameter int unsigned SLOTS   = 512
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // cells in (from the ingress lookup)
  input  logic                         in_valid,
  output logic                         in_ready,
  input  logic                         in_sof,
  input  logic [31:0]                  in_data,
  // dequeue command (from the scheduler)
  input  logic                         deq_valid,
  output logic                         deq_ready,
  input  logic [$clog2(N_PORTS)-1:0]   deq_port,
  // cells out (towards the switch)
  output logic                         out_valid,
  input  logic                         out_ready,
  output logic                         out_sof,
  output logic [31:0]                  out_data,
  // status
  output logic [N_PORTS-1:0]           nonempty,
  output logic                         buf_wr,
  output logic                         buf_rd,
  output logic [15:0]                  enq_cells,
  output logic [15:0]                  deq_cells,
  output logic [15:0]                  drops
);
  localparam int unsigned SW = $clog2(SLOTS);
  localparam int unsigned PW = $clog2(N_PORTS);
  localparam int unsigned CW = $clog2(SLOTS + 1);

  logic [63:0]   buf_mem [SLOTS * CELL_DWORDS];
  logic [SW-1:0] next_ptr [SLOTS];
  logic [SW-1:0] free_mem [SLOTS];
  logic [SW-1:0] head [N_PORTS];
  logic [SW-1:0] tail [N_PORTS];
  logic [CW-1:0] cnt  [N_PORTS];

  logic [CW-1:0] fresh;                 // slots never used so far
  logic [SW-1:0] free_wr, free_rd;
  logic [CW-1:0] free_cnt;

  // ---------------- enqueue side ----------------
  logic          in_act, in_drop;
  logic [3:0]    in_w;                  // index of the next word of the cell
  logic [31:0]   even_q;
  logic [SW-1:0] in_slot;
  logic [PW-1:0] in_port;
  logic          slot_avail, tag_ok, do_alloc, do_commit;
  logic [SW-1:0] alloc_slot;
  logic [3:0]    w_idx;                 // index of the word now on in_data
  logic          take;
  logic [SW-1:0] wr_slot;               // slot the current word pair goes to

  assign in_ready   = 1'b1;
  assign take       = in_valid && (in_sof || in_act);
  assign w_idx      = in_sof ? 4'd0 : in_w;
  assign slot_avail = (fresh != CW'(SLOTS)) || (free_cnt != 0);
  assign alloc_slot = (fresh != CW'(SLOTS)) ? SW'(fresh) : free_mem[free_rd];
  assign tag_ok     = cell_tag(in_data) < 8'(N_PORTS);
  assign do_alloc   = take && w_idx == 4'd1 && !in_drop && slot_avail && tag_ok;
  assign wr_slot    = (w_idx == 4'd1) ? alloc_slot : in_slot;
  assign do_commit  = take && w_idx == 4'(CELL_WORDS - 1) && !in_drop;

  // ---------------- dequeue side ----------------
  logic          out_act;
  logic [3:0]    out_w;
  logic [SW-1:0] out_slot;
  logic          do_pop, out_last;
  logic [63:0]   rd_word;

  assign deq_ready = !out_act;
  assign do_pop    = deq_valid && !out_act && cnt[deq_port] != 0;
  assign rd_word   = buf_mem[int'(out_slot) * CELL_DWORDS + int'(out_w[3:1])];
  assign out_valid = out_act;
  assign out_sof   = out_act && out_w == 4'd0;
  assign out_data  = out_w[0] ? rd_word[31:0] : rd_word[63:32];
  assign out_last  = out_act && out_ready && out_w == 4'(CELL_WORDS - 1);
  assign buf_rd    = out_act && out_ready && !out_w[0];
  assign buf_wr    = take && w_idx[0] && !in_drop && (w_idx != 4'd1 || do_alloc);

  always_comb
    for (int p = 0; p < int'(N_PORTS); p++) nonempty[p] = cnt[p] != 0;

  // Buffer and pointer arrays (no reset needed: only written entries are read).
  always_ff @(posedge clk) begin
    if (buf_wr)
      buf_mem[int'(wr_slot) * CELL_DWORDS + int'(w_idx[3:1])] <= {even_q, in_data};
    if (do_commit && cnt[in_port] != 0) next_ptr[tail[in_port]] <= in_slot;
    if (out_last) free_mem[free_wr] <= out_slot;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_act <= 1'b0; in_drop <= 1'b0; in_w <= '0; even_q <= '0;
      in_slot <= '0; in_port <= '0;
      out_act <= 1'b0; out_w <= '0; out_slot <= '0;
      fresh <= '0; free_wr <= '0; free_rd <= '0; free_cnt <= '0;
      enq_cells <= '0; deq_cells <= '0; drops <= '0;
      for (int p = 0; p < int'(N_PORTS); p++) begin head[p] <= '0; tail[p] <= '0; cnt[p] <= '0; end
    end else begin
      // enqueue
      if (take) begin
        if (!w_idx[0]) even_q <= in_data;
        in_w   <= w_idx + 4'd1;
        in_act <= (w_idx != 4'(CELL_WORDS - 1));
        if (in_sof) in_drop <= 1'b0;
        if (w_idx == 4'd1) begin
          if (do_alloc) begin
            in_slot <= alloc_slot;
            in_port <= PW'(cell_tag(in_data));
            if (fresh != CW'(SLOTS)) fresh <= fresh + 1'b1;
            else free_rd <= (free_rd == SW'(SLOTS - 1)) ? '0 : free_rd + 1'b1;
          end else if (!in_drop) begin
            in_drop <= 1'b1;
            drops   <= drops + 1'b1;
          end
        end
        if (do_commit) enq_cells <= enq_cells + 1'b1;
      end
      // free-list occupancy
      free_cnt <= free_cnt + CW'(out_last) - CW'(do_alloc && fresh == CW'(SLOTS));
      if (out_last) free_wr <= (free_wr == SW'(SLOTS - 1)) ? '0 : free_wr + 1'b1;
      // dequeue
      if (do_pop) begin
        out_act  <= 1'b1;
        out_w    <= '0;
        out_slot <= head[deq_port];
      end else if (out_act && out_ready) begin
        out_w <= out_w + 4'd1;
        if (out_last) begin
          out_act   <= 1'b0;
          deq_cells <= deq_cells + 1'b1;
        end
      end
      // queue lists
      for (int p = 0; p < int'(N_PORTS); p++) begin
        automatic logic push = do_commit && in_port == PW'(p);
        automatic logic pop  = do_pop && deq_port == PW'(p);
        cnt[p] <= cnt[p] + CW'(push) - CW'(pop);
        if (push) tail[p] <= in_slot;
        if (push && (cnt[p] == 0 || (pop && cnt[p] == 1))) head[p] <= in_slot;
        else if (pop) head[p] <= next_ptr[head[p]];
      end
    end
  end
endmodule
