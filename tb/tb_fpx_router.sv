// tb_fpx_router: end-to-end test of the 8-port FPX router at its default parameters.
//
// Around the design: one ZBT SRAM model per port (all holding the same Tree Bitmap
// routing table), one RAD TAP model per port, and a behavioural switch fabric that
// takes each whole cell from an ingress port and delivers it to the egress port named
// in its tag. The test runs, in order:
//   1. bypass: before any programming a line-card cell crosses the NID to the fabric;
//   2. programming: two control cells (VCI 34) per port load 22 words into each RAD;
//   3. routing: random traffic on all ports through lookup, VOQs, scheduler and output
//      queues, with a table that has no default route (some lookups miss);
//   4. overflow: one output's line card stops; port 0 floods it until its VOQ drops,
//      while a quarter of its cells, for another output, must still get through;
//   5. partial reprogramming of port 2 while traffic flows (RAD never leaves the path);
//   6. full reprogramming of port 1 (bypass meanwhile, with a bypass cell sent).
// Every delivered cell is checked word by word, for its egress port and for order per
// (input, output) pair; all cells must be delivered, counted as a lookup miss or
// counted as a VOQ drop. Each mechanism is counted and must have happened.
module tb_fpx_router;
  import fpx_pkg::*;
  localparam int N = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [N-1:0]        lc_rx_valid, lc_rx_ready, lc_rx_sof, lc_tx_valid, lc_tx_ready, lc_tx_sof;
  logic [N-1:0][31:0]  lc_rx_data, lc_tx_data, sw_tx_data, sw_rx_data, sram_rdata;
  logic [N-1:0]        sw_tx_valid, sw_tx_ready, sw_tx_sof, sw_rx_valid, sw_rx_ready, sw_rx_sof;
  logic [N-1:0][17:0]  sram_addr;
  logic [N-1:0]        sram_rd, rad_tck, rad_tms, rad_tdi, rad_done, rad_active;
  logic [N-1:0][15:0]  voq_drops, lookup_misses;
  logic                slot_start;
  logic [N-1:0][N-1:0] grant;

  fpx_router dut (.*);

  int checks = 0, failures = 0;
  // mechanism counters
  int m_bypass = 0, m_program = 0, m_hit = 0, m_miss = 0, m_contention = 0, m_multi_voq = 0;
  int m_hol = 0;
  int m_overlap = 0;   // cycles in which a port ran two lookups at once

  for (genvar i = 0; i < N; i++) begin : g_ovl
    always @(posedge clk)
      if (rst_n && dut.g_port[i].u_fpx.u_ing.g_lane[0].u_lane.u_fiple.state != 0 &&
                   dut.g_port[i].u_fpx.u_ing.g_lane[1].u_lane.u_fiple.state != 0) m_overlap++;
  end
  int m_overflow = 0, m_oq_full = 0, m_partial = 0, m_full_reprog = 0;

  // ---------------- routing table image ----------------
  logic [31:0] img [2**18];
  event load_ev;
  `define TBM_MEM img
  `include "tbm_builder.svh"

  // ---------------- per-port models and stream drivers ----------------
  logic [31:0] lc_q  [N][$];   // words waiting to enter from each line card
  logic [31:0] fab_q [N][$];   // words waiting in the fabric for each egress port
  bit          lc_block [N];

  for (genvar i = 0; i < N; i++) begin : g
    zbt_sram_model u_mem (.clk, .addr(sram_addr[i]), .rd(sram_rd[i]), .rdata(sram_rdata[i]));
    rad_tap_model  u_tap (.tck(rad_tck[i]), .tms(rad_tms[i]), .tdi(rad_tdi[i]), .done(rad_done[i]));
    always @(load_ev) for (int k = 0; k < 2**18; k++) u_mem.mem[k] = img[k];

    int lc_w = 0, fab_w = 0, in_w = 0;
    logic [31:0] cur [CELL_WORDS];
    // line card -> FPX
    always @(negedge clk) begin
      lc_rx_valid[i] <= lc_q[i].size() > 0;
      lc_rx_data[i]  <= lc_q[i].size() > 0 ? lc_q[i][0] : 32'h0;
      lc_rx_sof[i]   <= lc_w == 0;
      sw_rx_valid[i] <= fab_q[i].size() > 0;
      sw_rx_data[i]  <= fab_q[i].size() > 0 ? fab_q[i][0] : 32'h0;
      sw_rx_sof[i]   <= fab_w == 0;
      lc_tx_ready[i] <= !lc_block[i] && ($urandom % 8) != 0;
    end
    always @(posedge clk) if (rst_n) begin
      if (lc_rx_valid[i] && lc_rx_ready[i]) begin void'(lc_q[i].pop_front()); lc_w = (lc_w + 1) % CELL_WORDS; end
      if (sw_rx_valid[i] && sw_rx_ready[i]) begin void'(fab_q[i].pop_front()); fab_w = (fab_w + 1) % CELL_WORDS; end
      // fabric input: collect whole cells, deliver by tag
      if (sw_tx_valid[i]) begin
        if (sw_tx_sof[i]) in_w = 0;
        cur[in_w] = sw_tx_data[i];
        in_w++;
        if (in_w == CELL_WORDS) begin
          int d;
          d = int'(cur[1][7:0]);
          if (d >= N) begin failures++; $display("FAIL bad tag %0d from port %0d", d, i); end
          else begin
            for (int k = 0; k < CELL_WORDS; k++) fab_q[d].push_back(cur[k]);
            if (&rad_active) slot_cells[d]++;
          end
          in_w = 0;
        end
      end
      if (lc_tx_valid[i] && lc_tx_ready[i]) receive(i, lc_tx_sof[i], lc_tx_data[i]);
    end
  end
  assign sw_tx_ready = '1;

  // ---------------- cell generation and checking ----------------
  int unsigned ip_of [int];       // key src*65536+seq
  int          seq_next [N];
  int          last_seq [N][N];   // last delivered seq per (src, dst)
  int          sent = 0, delivered = 0;
  int          slot_cells [N];
  logic [31:0] rx_cell [N][CELL_WORDS];
  int          rx_w [N];

  function automatic logic [31:0] word_of(int src, int seq, int k, int unsigned ip, int tag);
    case (k)
      0: return {4'h0, 8'h00, 16'(100 + src), 4'h0};
      1: return {8'h00, 16'(seq), 8'(tag)};
      2: return {8'(src), 8'h00, 16'(seq)};
      IP_DST_WORD: return ip;
      default: return {8'(src), 8'(k), 16'(seq)};
    endcase
  endfunction

  // Queue a cell at line card src; returns the expected egress port or -1 (miss).
  function automatic int send_cell(int src, int unsigned ip, bit bypass_tag = 0, int tag = 0);
    int unsigned nh, plen; bit hit; int seq;
    seq = seq_next[src]++;
    hit = ref_lookup(ip, nh, plen);
    if (bypass_tag) begin hit = 1; nh = tag; end
    ip_of[src * 65536 + seq] = ip;
    for (int k = 0; k < CELL_WORDS; k++) lc_q[src].push_back(word_of(src, seq, k, ip, bypass_tag ? tag : 255));
    sent++;
    return hit ? int'(nh) : -1;
  endfunction

  task automatic receive(int j, logic sof, logic [31:0] data);
    if (sof) rx_w[j] = 0;
    rx_cell[j][rx_w[j]] = data;
    rx_w[j]++;
    if (rx_w[j] == CELL_WORDS) begin
      int src, seq; int unsigned nh, plen; bit hit;
      src = int'(rx_cell[j][2][31:24]); seq = int'(rx_cell[j][2][15:0]);
      checks++;
      if (src >= N || !ip_of.exists(src * 65536 + seq)) begin failures++; $display("FAIL unknown cell at %0d", j); end
      else begin
        int unsigned ip;
        bit bad;
        ip = ip_of[src * 65536 + seq];
        bad = 0;
        hit = ref_lookup(ip, nh, plen);
        if (rx_cell[j][1][7:0] != 8'(j)) bad = 1;
        if (rx_cell[j][1][23:8] != 16'(seq)) bad = 1;
        for (int k = 0; k < CELL_WORDS; k++) if (k != 1 && rx_cell[j][k] !== word_of(src, seq, k, ip, 0)) bad = 1;
        if (seq <= last_seq[src][j]) bad = 1;
        if (bad) begin failures++; $display("FAIL cell src %0d seq %0d at port %0d", src, seq, j); end
        last_seq[src][j] = seq;
        if (lc_block[6] && src == 0 && j == 3) m_hol++;
        delivered++;
      end
      rx_w[j] = 0;
    end
  endtask

  // ---------------- scheduler-level observations ----------------
  always @(posedge clk) if (rst_n && slot_start) begin
    for (int j = 0; j < N; j++) begin
      int r;
      r = 0;
      for (int i = 0; i < N; i++) r += dut.req[i][j];
      if (r > 1) m_contention++;
      checks++;
      if (slot_cells[j] > 1) begin failures++; $display("FAIL %0d cells to output %0d in one slot", slot_cells[j], j); end
      slot_cells[j] = 0;
    end
    for (int i = 0; i < N; i++) if ($countones(dut.nonempty[i]) > 1) m_multi_voq++;
    for (int j = 0; j < N; j++) if (!dut.oq_room[j]) m_oq_full++;
    // the scheduler only sends to an output whose queue has room, so cells never pile up in the fabric
    for (int j = 0; j < N; j++) begin
      checks++;
      if (fab_q[j].size() > 3 * CELL_WORDS) begin failures++; $display("FAIL %0d words waiting in the fabric for output %0d", fab_q[j].size(), j); end
    end
  end

  function automatic int total_lost();
    int t = 0;
    for (int i = 0; i < N; i++) t += int'(voq_drops[i]) + int'(lookup_misses[i]);
    return t;
  endfunction

  task automatic wait_settle(int limit);
    int idle = 0;
    for (int c = 0; c < limit && idle < 200; c++) begin
      @(negedge clk);
      if (delivered + total_lost() == sent) idle++; else idle = 0;
    end
  endtask

  task automatic ctl_cell(int port, int unsigned id, ctl_op_e op, bit partial = 0);
    for (int k = 0; k < CELL_WORDS; k++)
      fab_q[port].push_back(k == 0 ? {4'h0, 8'h00, CONTROL_VCI, 4'h0} :
                            k == 2 ? {op, 23'd0, partial} : {16'(id), 8'h5A, 8'(k)});
  endtask

  initial begin #20_000_000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    int d;
    for (int i = 0; i < N; i++) begin seq_next[i] = 0; lc_block[i] = 0; slot_cells[i] = 0; rx_w[i] = 0;
      for (int j = 0; j < N; j++) last_seq[i][j] = -1; end
    // Routing table: one /16 per egress port, random prefixes, no default route.
    for (int j = 0; j < N; j++) add(32'h0A00_0000 | (j << 16), 16, j);
    for (int i = 0; i < 50; i++) add($urandom, 3 + $urandom % 22, $urandom % N);
    add(32'h0A05_8000, 28, 2);     // a long prefix inside 10.5/16
    for (int k = 0; k < 2**18; k++) img[k] = 0;
    build_trie();
    ->load_ev;
    repeat (5) @(negedge clk); rst_n = 1;
    repeat (5) @(negedge clk);

    // 1. bypass
    checks++; if (rad_active != '0) begin failures++; $display("FAIL not in bypass after reset"); end
    void'(send_cell(0, 32'h0A03_0001, 1, 3));
    wait_settle(2000);
    m_bypass = delivered;

    // 2. program every RAD with 22 words
    for (int p = 0; p < N; p++) begin ctl_cell(p, 100 + p, CTL_DATA); ctl_cell(p, 200 + p, CTL_DATA_LAST); end
    for (int c = 0; c < 5000 && rad_active != '1; c++) @(negedge clk);
    for (int p = 0; p < N; p++) begin
      checks++;
      if (!rad_active[p]) begin failures++; $display("FAIL port %0d not programmed", p); end
    end
    m_program = $countones(rad_active);
    // the words each TAP received
    begin
      logic [31:0] w;
      for (int k = 0; k < 22; k++) begin
        checks++;
        w = g[4].u_tap.pop_word();
        if (w !== {16'(k < 11 ? 104 : 204), 8'h5A, 8'(3 + k % 11)}) begin failures++; $display("FAIL TAP word %0d %h", k, w); end
      end
    end

    // 3. routing traffic on all ports
    for (int r = 0; r < 60; r++)
      for (int s = 0; s < N; s++) begin
        int unsigned ip;
        ip = ($urandom % 3 == 0) ? $urandom : (32'h0A00_0000 | (($urandom % N) << 16) | ($urandom & 32'hFFFF));
        void'(send_cell(s, ip));
      end
    wait_settle(200000);
    checks++;
    if (delivered + total_lost() != sent) begin failures++; $display("FAIL routing: sent %0d delivered %0d lost %0d", sent, delivered, total_lost()); end
    for (int i = 0; i < N; i++) m_miss += int'(lookup_misses[i]);
    m_hit = delivered - m_bypass;

    // 4. overflow: egress 6 blocked, port 0 floods it
    lc_block[6] = 1;
    // every fourth cell goes to port 3, which must not wait behind the blocked cells
    for (int r = 0; r < 800; r++) void'(send_cell(0, ((r % 4 == 0) ? 32'h0A03_0000 : 32'h0A06_0000) | r));
    for (int c = 0; c < 60000 && voq_drops[0] == 0; c++) @(negedge clk);
    repeat (2000) @(negedge clk);
    m_overflow = int'(voq_drops[0]);
    lc_block[6] = 0;
    wait_settle(200000);
    checks++;
    if (delivered + total_lost() != sent) begin failures++; $display("FAIL overflow: sent %0d delivered %0d lost %0d", sent, delivered, total_lost()); end

    // 5. partial reprogramming of port 2 under traffic
    ctl_cell(2, 300, CTL_DATA); ctl_cell(2, 301, CTL_CONFIRM, 1);
    for (int r = 0; r < 20; r++) void'(send_cell(2, 32'h0A01_0000 | r));
    begin
      bit dropped_out;
      dropped_out = 0;
      for (int c = 0; c < 3000; c++) begin @(negedge clk); if (!rad_active[2]) dropped_out = 1; end
      checks++;
      if (dropped_out) begin failures++; $display("FAIL partial reprogramming left RAD mode"); end
      else if (g[2].u_tap.updates >= 2) m_partial++;
    end
    wait_settle(100000);

    // 6. full reprogramming of port 1, bypass cell meanwhile
    ctl_cell(1, 400, CTL_CONFIRM, 0);
    for (int c = 0; c < 500 && rad_active[1]; c++) @(negedge clk);
    if (!rad_active[1]) begin
      void'(send_cell(1, 32'h0A07_0000, 1, 7));   // crosses in bypass, tag set by sender
      for (int c = 0; c < 5000 && !rad_active[1]; c++) @(negedge clk);
      if (rad_active[1]) m_full_reprog++;
    end
    wait_settle(100000);
    checks++;
    if (delivered + total_lost() != sent) begin failures++; $display("FAIL final: sent %0d delivered %0d lost %0d", sent, delivered, total_lost()); end

    $display("mechanisms: bypass=%0d programmed=%0d delivered_routed=%0d lookup_miss=%0d contention=%0d multi_voq=%0d oq_full=%0d voq_drops=%0d partial=%0d full_reprog=%0d hol_passed=%0d overlapped_lookups=%0d",
             m_bypass, m_program, m_hit, m_miss, m_contention, m_multi_voq, m_oq_full, m_overflow, m_partial, m_full_reprog, m_hol, m_overlap);
    $display("cells sent %0d delivered %0d lost %0d", sent, delivered, total_lost());
    checks += 12;
    if (m_overlap == 0)     begin failures++; $display("FAIL lookups never overlapped"); end
    if (m_hol == 0)         begin failures++; $display("FAIL no cell passed a blocked output's cells"); end
    if (m_bypass == 0)      begin failures++; $display("FAIL no bypass cell"); end
    if (m_program != N)     begin failures++; $display("FAIL not all RADs programmed"); end
    if (m_hit == 0)         begin failures++; $display("FAIL no routed cell"); end
    if (m_miss == 0)        begin failures++; $display("FAIL no lookup miss"); end
    if (m_contention == 0)  begin failures++; $display("FAIL no output contention"); end
    if (m_multi_voq == 0)   begin failures++; $display("FAIL no input with several non-empty VOQs"); end
    if (m_oq_full == 0)     begin failures++; $display("FAIL output queue never filled"); end
    if (m_overflow == 0)    begin failures++; $display("FAIL no VOQ overflow"); end
    if (m_partial == 0)     begin failures++; $display("FAIL no partial reprogramming"); end
    if (m_full_reprog == 0) begin failures++; $display("FAIL no full reprogramming"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
