// tb_nid: checks the NID's cell routing in bypass and RAD mode, the capture of
// configuration words from VCI-34 control cells, the start of programming after the
// first complete bitstream and on CONFIRM cells, bypass during a full reprogramming,
// RAD mode kept during a partial one, and a failed programming (no DONE).
// The loader is emulated: it is busy for 30 cycles after prog_start, then pulses
// prog_done.
module tb_nid;
  import fpx_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic lc_rx_valid, lc_rx_ready, lc_rx_sof; logic [31:0] lc_rx_data;
  logic lc_tx_valid, lc_tx_ready, lc_tx_sof; logic [31:0] lc_tx_data;
  logic sw_rx_valid, sw_rx_ready, sw_rx_sof; logic [31:0] sw_rx_data;
  logic sw_tx_valid, sw_tx_ready, sw_tx_sof; logic [31:0] sw_tx_data;
  logic ri_tx_valid, ri_tx_ready, ri_tx_sof; logic [31:0] ri_tx_data;
  logic ri_rx_valid, ri_rx_ready, ri_rx_sof; logic [31:0] ri_rx_data;
  logic re_tx_valid, re_tx_ready, re_tx_sof; logic [31:0] re_tx_data;
  logic re_rx_valid, re_rx_ready, re_rx_sof; logic [31:0] re_rx_data;
  logic cfg_wr, prog_start, prog_busy, prog_done, rad_done, rad_active, rad_configured;
  logic [31:0] cfg_data;
  logic [15:0] ctl_cells, prog_count, prog_errors;
  int checks = 0, failures = 0, starts = 0;

  nid dut (.*);

  // Captured output words, {sof, data}.
  logic [32:0] got_lc [$], got_sw [$], got_ri [$], got_re [$];
  logic [31:0] got_cfg [$];
  always @(posedge clk) if (rst_n) begin
    if (lc_tx_valid && lc_tx_ready) got_lc.push_back({lc_tx_sof, lc_tx_data});
    if (sw_tx_valid && sw_tx_ready) got_sw.push_back({sw_tx_sof, sw_tx_data});
    if (ri_tx_valid && ri_tx_ready) got_ri.push_back({ri_tx_sof, ri_tx_data});
    if (re_tx_valid && re_tx_ready) got_re.push_back({re_tx_sof, re_tx_data});
    if (cfg_wr) got_cfg.push_back(cfg_data);
  end
  always @(negedge clk) begin
    lc_tx_ready <= ($urandom % 4) != 0; sw_tx_ready <= ($urandom % 4) != 0;
    ri_tx_ready <= ($urandom % 4) != 0; re_tx_ready <= ($urandom % 4) != 0;
  end

  // Loader emulation.
  initial begin
    prog_busy = 0; prog_done = 0;
    forever begin
      @(posedge clk iff prog_start);
      starts++;
      @(negedge clk); prog_busy = 1;
      repeat (30) @(negedge clk);
      prog_busy = 0; prog_done = 1;
      @(negedge clk); prog_done = 0;
    end
  end

  function automatic logic [31:0] word_of(int unsigned id, int k, int vci);
    if (k == 0) return {4'h0, 8'h00, 16'(vci), 4'h0};
    return {16'(id), 8'hC0, 8'(k)};
  endfunction

  // Send a cell on one of the four input streams (0 lc, 1 sw, 2 ri, 3 re).
  task automatic send(int s, int unsigned id, int vci, logic [31:0] w2 = '0, bit use_w2 = 0);
    for (int k = 0; k < CELL_WORDS; k++) begin
      logic [31:0] w;
      w = (use_w2 && k == 2) ? w2 : word_of(id, k, vci);
      @(negedge clk);
      case (s)
        0: begin lc_rx_valid = 1; lc_rx_sof = (k == 0); lc_rx_data = w; end
        1: begin sw_rx_valid = 1; sw_rx_sof = (k == 0); sw_rx_data = w; end
        2: begin ri_rx_valid = 1; ri_rx_sof = (k == 0); ri_rx_data = w; end
        default: begin re_rx_valid = 1; re_rx_sof = (k == 0); re_rx_data = w; end
      endcase
      @(posedge clk);
      while (!(s == 0 ? lc_rx_ready : s == 1 ? sw_rx_ready : s == 2 ? ri_rx_ready : re_rx_ready)) @(posedge clk);
    end
    @(negedge clk);
    lc_rx_valid = 0; sw_rx_valid = 0; ri_rx_valid = 0; re_rx_valid = 0;
  endtask

  // Check that queue q holds exactly the given cell, then clear it.
  task automatic expect_cell(ref logic [32:0] q [$], input int unsigned id, input int vci, input string what);
    repeat (20) @(negedge clk);
    checks++;
    if (q.size() != CELL_WORDS) begin failures++; $display("FAIL %s: %0d words", what, q.size()); end
    else for (int k = 0; k < CELL_WORDS; k++)
      if (q[k] !== {k == 0, word_of(id, k, vci)}) begin failures++; $display("FAIL %s word %0d", what, k); break; end
    q.delete();
  endtask

  task automatic expect_none(string what);
    checks++;
    if (got_lc.size() + got_sw.size() + got_ri.size() + got_re.size() != 0) begin
      failures++; $display("FAIL %s: stray words %0d %0d %0d %0d", what, got_lc.size(), got_sw.size(), got_ri.size(), got_re.size());
    end
  endtask

  task automatic ctl(int unsigned id, ctl_op_e op, bit partial = 0);
    send(1, id, int'(CONTROL_VCI), {op, 23'd0, partial}, 1);
  endtask

  task automatic check(bit cond, string what);
    checks++; if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin #2_000_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    lc_rx_valid = 0; sw_rx_valid = 0; ri_rx_valid = 0; re_rx_valid = 0;
    lc_rx_sof = 0; sw_rx_sof = 0; ri_rx_sof = 0; re_rx_sof = 0;
    lc_rx_data = 0; sw_rx_data = 0; ri_rx_data = 0; re_rx_data = 0; rad_done = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    // 1. Bypass after reset.
    check(!rad_active, "bypass after reset");
    send(0, 1, 200); expect_cell(got_sw, 1, 200, "bypass ingress");
    send(1, 2, 201); expect_cell(got_lc, 2, 201, "bypass egress");
    expect_none("bypass");
    // 2. First bitstream: two data cells, programming starts on the last one.
    ctl(10, CTL_DATA); ctl(11, CTL_DATA_LAST);
    repeat (3) @(negedge clk);
    check(starts == 1, "programming started by DATA_LAST");
    check(got_cfg.size() == 22, "22 configuration words");
    for (int k = 0; k < 22; k++) check(got_cfg[k] == word_of(10 + k / 11, 3 + k % 11, int'(CONTROL_VCI)), "configuration word");
    got_cfg.delete();
    rad_done = 1;
    repeat (40) @(negedge clk);
    check(rad_active && rad_configured, "RAD mode after programming");
    expect_none("control cells pass nowhere");
    // 3. RAD mode routing.
    send(0, 3, 202); expect_cell(got_ri, 3, 202, "to RAD ingress");
    send(1, 4, 203); expect_cell(got_re, 4, 203, "to RAD egress");
    send(2, 5, 204); expect_cell(got_sw, 5, 204, "RAD ingress to switch");
    send(3, 6, 205); expect_cell(got_lc, 6, 205, "RAD egress to line card");
    // A second DATA_LAST does not reprogram by itself.
    ctl(12, CTL_DATA_LAST); repeat (5) @(negedge clk);
    check(starts == 1, "no start without CONFIRM");
    // 4. Full reprogramming: bypass until done.
    ctl(13, CTL_CONFIRM, 0);
    @(negedge clk);
    check(starts == 2 && !rad_active, "full reprogramming bypasses the RAD");
    send(0, 7, 206); expect_cell(got_sw, 7, 206, "bypass during full reprogramming");
    repeat (30) @(negedge clk);
    check(rad_active, "RAD mode after reprogramming");
    // 5. Partial reprogramming: RAD stays in the path.
    ctl(14, CTL_CONFIRM, 1);
    @(negedge clk);
    check(starts == 3 && rad_active, "partial reprogramming keeps RAD mode");
    send(0, 8, 207); expect_cell(got_ri, 8, 207, "RAD path during partial reprogramming");
    repeat (30) @(negedge clk);
    // 6. Failed programming.
    rad_done = 0;
    ctl(15, CTL_CONFIRM, 0);
    repeat (50) @(negedge clk);
    check(!rad_active && prog_errors == 1, "failed programming leaves bypass");
    check(ctl_cells == 6 && prog_count == 4, $sformatf("control and programming counters %0d %0d", ctl_cells, prog_count));
    expect_none("end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
