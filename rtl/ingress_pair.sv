// ingress_pair: the ingress function with two lookups overlapped on one SRAM.
//
// One lookup engine leaves the SRAM idle in two of every four cycles, and a cell waits
// for its whole lookup, so a single ingress_lookup takes a worst-case cell only every
// 61 cycles. The document proposes to overlap the lookups of two packets to fill
// these gaps. Here two ingress_lookup lanes each hold one cell and run their own
// Tree Bitmap engine in alternate SRAM slots (fiple SHARE = 2), so their reads never
// collide: the SRAM address and read strobe are the OR of the two lanes, and both
// lanes see the read data.
//
// Cells go to the lanes in turn (lane 0, lane 1, lane 0, ...) and leave in the same
// turn, so cell order is kept. A lane that drops a cell (no matching prefix) raises
// its miss count; each such drop stands for that lane's next turn at the output.
//
// Interface and cell format as ingress_lookup; lookups and misses are the sums of
// the two lanes.
module ingress_pair import fpx_pkg::*; #(
  parameter logic [SRAM_AW-1:0] ROOT_ADDR = '0
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
  logic [1:0]              l_in_valid, l_in_ready, l_out_valid, l_out_ready, l_out_sof, l_sram_rd;
  logic [1:0][31:0]        l_out_data;
  logic [1:0][SRAM_AW-1:0] l_sram_addr;
  logic [1:0][15:0]        l_lookups, l_misses, misses_seen;
  logic [1:0][1:0]         drops_pend;    // dropped cells not yet passed at the output
  logic                    in_sel, out_sel;
  logic [3:0]              in_w, out_w;
  logic                    in_take, out_take, out_skip;

  for (genvar l = 0; l < 2; l++) begin : g_lane
    ingress_lookup #(.ROOT_ADDR(ROOT_ADDR), .SHARE(2), .SLOT(l)) u_lane (
      .clk, .rst_n,
      .in_valid(l_in_valid[l]), .in_ready(l_in_ready[l]), .in_sof, .in_data,
      .out_valid(l_out_valid[l]), .out_ready(l_out_ready[l]), .out_sof(l_out_sof[l]), .out_data(l_out_data[l]),
      .sram_addr(l_sram_addr[l]), .sram_rd(l_sram_rd[l]), .sram_rdata,
      .lookups(l_lookups[l]), .misses(l_misses[l])
    );
    assign l_in_valid[l]  = in_valid && (in_sel == 1'(l));
    assign l_out_ready[l] = out_ready && (out_sel == 1'(l)) && (drops_pend[l] == '0);
  end

  assign sram_addr = l_sram_addr[0] | l_sram_addr[1];
  assign sram_rd   = l_sram_rd[0] | l_sram_rd[1];
  assign lookups   = l_lookups[0] + l_lookups[1];
  assign misses    = l_misses[0] + l_misses[1];

  assign in_ready  = l_in_ready[in_sel];
  assign in_take   = in_valid && in_ready && (in_sof || in_w != '0);
  assign out_skip  = drops_pend[out_sel] != '0;
  assign out_valid = !out_skip && l_out_valid[out_sel];
  assign out_sof   = l_out_sof[out_sel];
  assign out_data  = l_out_data[out_sel];
  assign out_take  = out_valid && out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_sel <= 1'b0; out_sel <= 1'b0; in_w <= '0; out_w <= '0;
      misses_seen <= '0; drops_pend <= '0;
    end else begin
      if (in_take) begin
        in_w <= (in_w == 4'(CELL_WORDS - 1)) ? '0 : in_w + 4'd1;
        if (in_w == 4'(CELL_WORDS - 1)) in_sel <= ~in_sel;
      end
      if (out_take) begin
        out_w <= (out_w == 4'(CELL_WORDS - 1)) ? '0 : out_w + 4'd1;
        if (out_w == 4'(CELL_WORDS - 1)) out_sel <= ~out_sel;
      end else if (out_skip) begin
        out_sel <= ~out_sel;
      end
      for (int l = 0; l < 2; l++) begin
        misses_seen[l] <= l_misses[l];
        drops_pend[l]  <= drops_pend[l] + 2'(l_misses[l] != misses_seen[l])
                                        - 2'(out_skip && !out_take && out_sel == 1'(l));
      end
    end
  end
endmodule
