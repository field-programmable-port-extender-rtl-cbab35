// ingress_lookup: the FPX ingress function of the IP router.
//
// Takes one cell at a time, reads the IPv4 destination address from it, looks it up in
// the Tree Bitmap engine (fiple) and sends the cell on with the output port written
// into its switch tag (word 1, bits 7:0), so that the switch delivers it to the right
// egress port. Cells whose address matches no prefix are dropped and counted.
//
// The lookup starts as soon as the address word (cell word IP_DST_WORD) has arrived,
// while the rest of the cell is still coming in. The cell is held in a 14-word register
// buffer; in_ready is low from the end of the cell until it has been sent on. The next
// hop entry's low 8 bits are the output port.
//
// From the document: the ingress function does the IP lookup and its result steers the
// switch. The position of the address in the cell, the next-hop entry format and the
// one-cell buffering are this design's choices.
module ingress_lookup import fpx_pkg::*; #(
  parameter logic [SRAM_AW-1:0] ROOT_ADDR = '0,
  parameter int unsigned        SHARE     = 1,   // lookup engines on the SRAM (see fiple)
  parameter int unsigned        SLOT      = 0
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  output logic               in_ready,
  input  logic               in_sof,
  input  logic [31:0]        in_data,
  output logic               out_valid,
  input  logic               out_ready,
  output logic               out_sof,
  output logic [31:0]        out_data,
  output logic [SRAM_AW-1:0] sram_addr,
  output logic               sram_rd,
  input  logic [SRAM_DW-1:0] sram_rdata,
  output logic [15:0]        lookups,
  output logic [15:0]        misses
);
  typedef enum logic [1:0] {L_RX, L_WAIT, L_TX} lstate_e;

  lstate_e     state;
  logic [31:0] cbuf [CELL_WORDS];
  logic [3:0]  rx_w, tx_w;
  logic        rx_act;
  logic        lk_req, lk_done, lk_found;
  logic [7:0]  lk_port;
  logic [31:0] lk_ip;
  logic        take;
  logic [3:0]  w_idx;

  logic        req_ready, rsp_valid, rsp_found;
  logic [31:0] rsp_next_hop;
  logic [3:0]  rsp_nodes_unused;

  fiple #(.ROOT_ADDR(ROOT_ADDR), .SHARE(SHARE), .SLOT(SLOT)) u_fiple (
    .clk, .rst_n,
    .req_valid(lk_req), .req_ready, .req_ip(lk_ip),
    .rsp_valid, .rsp_found, .rsp_next_hop, .rsp_nodes(rsp_nodes_unused),
    .sram_addr, .sram_rd, .sram_rdata
  );

  assign in_ready  = (state == L_RX);
  assign take      = in_valid && in_ready && (in_sof || rx_act);
  assign w_idx     = in_sof ? 4'd0 : rx_w;
  assign out_valid = (state == L_TX);
  assign out_sof   = (state == L_TX) && tx_w == 4'd0;
  assign out_data  = (tx_w == 4'd1) ? {cbuf[1][31:8], lk_port} : cbuf[tx_w];

  always_ff @(posedge clk) begin
    if (take) cbuf[w_idx] <= in_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= L_RX; rx_w <= '0; tx_w <= '0; rx_act <= 1'b0;
      lk_req <= 1'b0; lk_done <= 1'b0; lk_found <= 1'b0; lk_port <= '0; lk_ip <= '0;
      lookups <= '0; misses <= '0;
    end else begin
      if (lk_req && req_ready) lk_req <= 1'b0;
      if (rsp_valid) begin
        lk_done  <= 1'b1;
        lk_found <= rsp_found;
        lk_port  <= rsp_next_hop[7:0];
        lookups  <= lookups + 1'b1;
      end
      unique case (state)
        L_RX: if (take) begin
          rx_w   <= w_idx + 4'd1;
          rx_act <= 1'b1;
          if (w_idx == 4'(IP_DST_WORD)) begin
            lk_ip   <= in_data;
            lk_req  <= 1'b1;
            lk_done <= 1'b0;
          end
          if (w_idx == 4'(CELL_WORDS - 1)) begin
            rx_act <= 1'b0;
            state  <= L_WAIT;
          end
        end
        L_WAIT: if (lk_done && !lk_req) begin
          tx_w <= '0;
          if (lk_found) state <= L_TX;
          else begin
            state  <= L_RX;
            misses <= misses + 1'b1;
          end
        end
        L_TX: if (out_ready) begin
          tx_w <= tx_w + 4'd1;
          if (tx_w == 4'(CELL_WORDS - 1)) state <= L_RX;
        end
        default: state <= L_RX;
      endcase
    end
  end
endmodule
