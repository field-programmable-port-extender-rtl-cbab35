// tb_ingress_line_rate: runs the ingress function (two overlapped lookup lanes,
// ingress_pair) at line rates with worst-case lookups.
//
// The table holds long prefixes (/28 to /31), so every cell's lookup walks all 8 trie
// levels and takes the full 38 clocks. Cells of minimum size arrive back to back at a
// fixed spacing, one cell time apart at 100 MHz:
//   OC12, 622 Mbit/s: 53*8 bits / 622 Mbit/s = 682 ns = 68 clocks;
//   OC48, 2.4 Gbit/s: 53*8 bits / 2.4 Gbit/s = 177 ns = 18 clocks (rounded up).
// At OC12 every cell must be accepted on time. At OC48 the lanes cannot keep up with
// back-to-back minimum cells: the test measures the spacing at which cells are in fact
// taken, and checks that the overlap brings it below the 38 clocks of one lookup
// (a single lane needs 61). In both runs every cell must come out with the right
// output port.
module tb_ingress_line_rate;
  import fpx_pkg::*;
  localparam int OC12_CLOCKS = 68;
  localparam int OC48_CLOCKS = 18;
  localparam int N_CELLS     = 60;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, in_ready, in_sof, out_valid, out_ready, out_sof, sram_rd;
  logic [31:0] in_data, out_data, sram_rdata;
  logic [17:0] sram_addr;
  logic [15:0] lookups, misses;
  int checks = 0, failures = 0;
  int unsigned ips [N_CELLS];
  logic [31:0] exp_q [$];
  int long_lookups = 0;

  ingress_pair dut (.*);
  zbt_sram_model u_mem (.clk, .addr(sram_addr), .rd(sram_rd), .rdata(sram_rdata));

  `define TBM_MEM u_mem.mem
  `include "tbm_builder.svh"

  function automatic logic [31:0] word_of(int id, int k, int unsigned ip);
    if (k == 0) return {4'h0, 8'h00, 16'(200 + id), 4'h0};
    if (k == 1) return {8'h00, 16'(id), 8'hEE};
    if (k == IP_DST_WORD) return ip;
    return {16'(id), 8'h00, 8'(k)};
  endfunction

  assign out_ready = 1'b1;

  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    checks++;
    if (exp_q.size() == 0) begin failures++; $display("FAIL unexpected word %h", out_data); end
    else begin
      logic [31:0] e;
      e = exp_q.pop_front();
      if (out_data !== e) begin failures++; $display("FAIL word %h exp %h", out_data, e); end
    end
  end

  // every lookup in this test must visit all eight levels
  always @(posedge clk) if (rst_n) begin
    if (dut.g_lane[0].u_lane.u_fiple.rsp_valid) begin
      checks++;
      if (dut.g_lane[0].u_lane.u_fiple.rsp_nodes != 4'd8) begin failures++; $display("FAIL lookup visited %0d nodes", dut.g_lane[0].u_lane.u_fiple.rsp_nodes); end
      else long_lookups++;
    end
    if (dut.g_lane[1].u_lane.u_fiple.rsp_valid) begin
      checks++;
      if (dut.g_lane[1].u_lane.u_fiple.rsp_nodes != 4'd8) begin failures++; $display("FAIL lookup visited %0d nodes", dut.g_lane[1].u_lane.u_fiple.rsp_nodes); end
      else long_lookups++;
    end
  end

  initial begin #2_000_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  // Offers one cell from the current falling edge on; returns the clock at which its
  // first word was taken. Ends on a falling edge.
  task automatic send(int id, int unsigned ip, output int t_first);
    t_first = 0;
    for (int k = 0; k < CELL_WORDS; k++) begin
      in_valid = 1; in_sof = (k == 0); in_data = word_of(id, k, ip);
      while (!in_ready) @(negedge clk);
      if (k == 0) t_first = int'($time / 10);
      @(negedge clk);
    end
    in_valid = 0; in_sof = 0;
  endtask

  // Sends N_CELLS cells, one every `spacing` clocks or as soon after as the block takes
  // them; returns the number of clocks from the first to the last cell start.
  task automatic run(int spacing, int id0, output int late_cells, output int span);
    int t0, due, t;
    late_cells = 0;
    t = 0;
    span = 0;
    @(negedge clk);
    t0 = int'($time / 10);
    for (int c = 0; c < N_CELLS; c++) begin
      int unsigned nh, plen;
      due = t0 + c * spacing;
      while (int'($time / 10) < due) @(negedge clk);
      void'(ref_lookup(ips[c], nh, plen));
      for (int k = 0; k < CELL_WORDS; k++)
        exp_q.push_back(k == 1 ? {word_of(id0 + c, 1, ips[c])[31:8], 8'(nh)} : word_of(id0 + c, k, ips[c]));
      send(id0 + c, ips[c], t);
      if (t > due) late_cells++;
    end
    span = t - t0;
    repeat (100) @(negedge clk);
  endtask

  initial begin
    int late12, span12, late48, span48;
    real per48;
    in_valid = 0; in_sof = 0; in_data = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    add(32'h0, 0, 1);
    for (int c = 0; c < N_CELLS; c++) begin
      int unsigned base;
      base = $urandom;
      add(base, 28 + c % 4, 2 + c % 6);
      ips[c] = base;
    end
    build_trie();

    run(OC12_CLOCKS, 0, late12, span12);
    checks++;
    if (late12 != 0) begin failures++; $display("FAIL OC12: %0d of %0d cells had to wait", late12, N_CELLS); end
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL OC12: %0d words missing", exp_q.size()); end
    $display("OC12: %0d cells, one every %0d clocks, %0d late", N_CELLS, OC12_CLOCKS, late12);

    run(OC48_CLOCKS, 1000, late48, span48);
    per48 = real'(span48) / real'(N_CELLS - 1);
    checks++;
    if (late48 == 0) begin failures++; $display("FAIL OC48: no cell had to wait"); end
    checks++;
    if (per48 > 38.0) begin failures++; $display("FAIL OC48: %f clocks per cell", per48); end
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL OC48: %0d words missing", exp_q.size()); end
    $display("OC48: cells offered every %0d clocks, taken every %0.1f clocks (%0.2f cell times)",
             OC48_CLOCKS, per48, per48 / real'(OC48_CLOCKS));

    checks++;
    if (long_lookups != 2 * N_CELLS) begin failures++; $display("FAIL %0d eight-level lookups", long_lookups); end
    checks++;
    if (misses != 0) begin failures++; $display("FAIL %0d misses", misses); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
