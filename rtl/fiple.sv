// fiple: Fast IP Lookup Engine, a Tree Bitmap longest-prefix-match engine.
//
// The routing table is a multibit trie with a 4-bit stride, stored in a 32-bit ZBT
// SRAM with an 18-bit word address. Each node takes a 4-word slot:
//   word 0  {extending-paths bitmap[15:0], child array pointer[15:0]}
//   word 1  {internal bitmap[14:0], 1'b0, next-hop array pointer[15:0]}
//   words 2-3 unused
// Children of a node are stored contiguously; next-hop entries are one 32-bit word
// each, at {next-hop pointer, 2'b00} + result index. The stride, bitmaps, 16-bit child
// pointer, single-word child resolution and the separate next-hop table are the
// document's; the placement of the internal bitmap and the next-hop pointer in word 1
// is this design's choice.
//
// Timing. The SRAM has 2 cycles of latency and both the address and the read data are
// registered at the FPGA pads here, so a read issued in cycle T returns in cycle T+4.
// Word 0 of a node is read in its first cycle and word 1 in its second. When word 0
// comes back, the child address is resolved in that same cycle and the child's word 0
// is issued at once, so each trie level costs 4 cycles. Word 1 comes back one cycle
// later and its internal bitmap updates the best match found so far. After the last
// node the next-hop entry is read in the cycle its word 1 returns, in the slot a
// child's word 1 would have used.
// A lookup that visits n nodes has rsp_valid high 4*n + 6 cycles after the cycle in
// which req_valid && req_ready; the worst case of 8 nodes is the document's 38 cycles.
// One lookup runs at a time; req_ready is high only when idle. rsp_valid is a
// one-cycle pulse with rsp_found = 0 when no prefix matched (no next-hop read then
// contributes to the result, but the timing is the same).
//
// A lookup reads the SRAM only in the first two cycles of its 4-cycle node period
// (word 0, word 1, and the next-hop entry in the place of a word 1), so the other two
// cycles are free. With SHARE = 2, two engines share one SRAM: their sram outputs are
// ORed and both see the read data; engine SLOT starts a lookup only in cycles 2*SLOT
// of a free-running 4-cycle count, so their reads never meet. This is the overlapping
// of two lookups the document proposes to fill the gaps in the memory pipeline.
module fiple import fpx_pkg::*; #(
  parameter logic [SRAM_AW-1:0] ROOT_ADDR = '0,  // word address of the root node
  parameter int unsigned        SHARE     = 1,   // engines on the SRAM: 1 or 2
  parameter int unsigned        SLOT      = 0    // this engine's slot when SHARE = 2
) (
  input  logic               clk,
  input  logic               rst_n,
  // lookup request
  input  logic               req_valid,
  output logic               req_ready,
  input  logic [31:0]        req_ip,
  // lookup result
  output logic               rsp_valid,
  output logic               rsp_found,
  output logic [31:0]        rsp_next_hop,
  output logic [3:0]         rsp_nodes,     // trie nodes visited
  // ZBT SRAM read port (pad registers inside)
  output logic [SRAM_AW-1:0] sram_addr,
  output logic               sram_rd,
  input  logic [SRAM_DW-1:0] sram_rdata
);
  typedef enum logic [1:0] {S_IDLE, S_RUN, S_LAST, S_NH} state_e;

  state_e             state;
  logic [1:0]         ph;          // phase within a 4-cycle node period
  logic [2:0]         lvl;         // level of the node most recently issued
  logic [31:0]        ip_q;
  logic [SRAM_AW-1:0] node_q;      // address of the node most recently issued
  logic               best_vld;
  logic [SRAM_AW-1:0] best_addr;   // next-hop entry of the longest match so far
  logic [2:0]         nh_cnt;
  logic [SRAM_DW-1:0] rdata_q;     // input pad register
  logic [SRAM_DW-1:0] nh_q;        // next-hop entry
  logic [1:0]         gph;         // free-running phase shared by the engines

  // Issue side, before the output pad register.
  logic               iss_rd;
  logic [SRAM_AW-1:0] iss_addr;

  // Stride of a level: bits [31-4*l -: 4] of the address.
  function automatic logic [3:0] stride_of(input logic [31:0] ip, input logic [2:0] l);
    return 4'(ip >> (5'd28 - {l, 2'b00}));
  endfunction

  // Child address from the returning word 0 of node 'lvl'.
  logic        has_child;
  logic [17:0] child_addr;
  logic [4:0]  ones_unused;
  tbm_child_addr u_child (
    .ext_bm    (rdata_q[31:16]),
    .child_ptr (rdata_q[15:0]),
    .stride    (stride_of(ip_q, lvl)),
    .has_child (has_child),
    .ones_left (ones_unused),
    .child_addr(child_addr)
  );

  // Internal-bitmap match for the returning word 1. In S_RUN (phase 1) it belongs to
  // the node one level up from 'lvl'; in S_LAST to node 'lvl' itself.
  logic [2:0]  lpm_lvl;
  logic [3:0]  lpm_stride;
  logic        lpm_match;
  logic [1:0]  lpm_len_unused;
  logic [3:0]  lpm_idx;
  assign lpm_lvl    = (state == S_LAST) ? lvl : lvl - 3'd1;
  assign lpm_stride = stride_of(ip_q, lpm_lvl);
  tbm_int_lpm u_lpm (
    .int_bm   (rdata_q[31:17]),
    .bits     (lpm_stride[3:1]),
    .match    (lpm_match),
    .match_len(lpm_len_unused),
    .res_idx  (lpm_idx)
  );
  logic lpm_take;   // returning word 1 is valid this cycle
  assign lpm_take = (state == S_LAST) || (state == S_RUN && ph == 2'd1 && lvl != 3'd0);

  assign req_ready = (state == S_IDLE) && (SHARE == 1 || gph == 2'(2 * SLOT));

  // Next-hop entry of the longest match including the last node's word 1, which
  // returns in S_LAST.
  logic [SRAM_AW-1:0] nh_addr;
  logic               nh_vld;
  assign nh_vld  = best_vld || (lpm_take && lpm_match);
  assign nh_addr = (lpm_take && lpm_match) ? {rdata_q[15:0], 2'b00} + 18'(lpm_idx) : best_addr;

  always_comb begin
    iss_rd   = 1'b0;
    iss_addr = '0;
    unique case (state)
      S_IDLE: if (req_valid && req_ready) begin iss_rd = 1'b1; iss_addr = ROOT_ADDR; end
      S_RUN: begin
        if (ph == 2'd1) begin
          iss_rd = 1'b1; iss_addr = node_q + 18'd1;
        end else if (ph == 2'd0 && lvl != 3'd7 && has_child) begin
          iss_rd = 1'b1; iss_addr = child_addr;
        end
      end
      S_LAST: if (nh_vld) begin iss_rd = 1'b1; iss_addr = nh_addr; end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      ph        <= '0;
      lvl       <= '0;
      ip_q      <= '0;
      node_q    <= '0;
      best_vld  <= 1'b0;
      best_addr <= '0;
      nh_cnt    <= '0;
      sram_addr <= '0;
      sram_rd   <= 1'b0;
      rdata_q   <= '0;
      nh_q      <= '0;
      gph       <= '0;
    end else begin
      gph       <= gph + 2'd1;
      sram_addr <= iss_addr;
      sram_rd   <= iss_rd;
      rdata_q   <= sram_rdata;
      if (lpm_take && lpm_match) begin
        best_vld  <= 1'b1;
        best_addr <= {rdata_q[15:0], 2'b00} + 18'(lpm_idx);
      end
      unique case (state)
        S_IDLE: if (req_valid && req_ready) begin
          ip_q     <= req_ip;
          node_q   <= ROOT_ADDR;
          lvl      <= '0;
          ph       <= 2'd1;
          best_vld <= 1'b0;
          state    <= S_RUN;
        end
        S_RUN: begin
          ph <= ph + 2'd1;
          if (ph == 2'd0) begin
            if (lvl != 3'd7 && has_child) begin
              node_q <= child_addr;
              lvl    <= lvl + 3'd1;
            end else begin
              state <= S_LAST;
            end
          end
        end
        S_LAST: begin
          nh_cnt <= '0;
          state  <= S_NH;
        end
        S_NH: begin
          nh_cnt <= nh_cnt + 3'd1;
          if (nh_cnt == 3'd3) nh_q <= rdata_q;
          if (nh_cnt == 3'd4) state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign rsp_valid    = (state == S_NH) && (nh_cnt == 3'd4);
  assign rsp_found    = best_vld;
  assign rsp_next_hop = best_vld ? nh_q : '0;
  assign rsp_nodes    = {1'b0, lvl} + 4'd1;
endmodule
