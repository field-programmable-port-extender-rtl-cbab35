// tb_fiple: self-checking test of the Tree Bitmap lookup engine.
// Builds a trie image from a prefix list, then compares each lookup with a linear
// longest-prefix search and checks the latency 4*nodes + 6 (38 for 8 nodes).
// Tables: the 8-prefix example table, then random tables with long prefixes.
module tb_fiple;
  import fpx_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic req_valid, req_ready, rsp_valid, rsp_found, sram_rd;
  logic [31:0] req_ip, rsp_next_hop, sram_rdata;
  logic [3:0]  rsp_nodes;
  logic [17:0] sram_addr;
  int checks = 0, failures = 0;
  int max_lat = 0;

  fiple dut (.*);
  zbt_sram_model u_mem (.clk, .addr(sram_addr), .rd(sram_rd), .rdata(sram_rdata));

  `define TBM_MEM u_mem.mem
  `include "tbm_builder.svh"

  task automatic lookup_check(int unsigned ip);
    int unsigned exp_nh, plen; bit exp_found; int exp_nodes, lat;
    exp_found = ref_lookup(ip, exp_nh, plen);
    exp_nodes = ref_nodes(ip);
    @(negedge clk);
    req_valid = 1; req_ip = ip;
    while (!req_ready) @(negedge clk);
    @(negedge clk); req_valid = 0;
    lat = 1;
    while (!rsp_valid) begin @(negedge clk); lat++; end
    checks += 3;
    if (rsp_found !== exp_found || (exp_found && rsp_next_hop !== exp_nh)) begin
      failures++; $display("FAIL ip=%08h found=%0d nh=%0d exp %0d/%0d", ip, rsp_found, rsp_next_hop, exp_found, exp_nh);
    end
    if (int'(rsp_nodes) != exp_nodes) begin failures++; $display("FAIL ip=%08h nodes=%0d exp %0d", ip, rsp_nodes, exp_nodes); end
    if (lat != 4*exp_nodes + 6) begin failures++; $display("FAIL ip=%08h latency=%0d exp %0d", ip, lat, 4*exp_nodes + 6); end
    if (lat > max_lat) max_lat = lat;
  endtask

  initial begin
    #2_000_000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    req_valid = 0; req_ip = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    // The example table: * ->4, 10*->7, 01*->2, 110*->9, 1011*->1, 0001*->0, 01011*->5, 00110*->3
    add(32'h0, 0, 4); add(32'h8000_0000, 2, 7); add(32'h4000_0000, 2, 2); add(32'hC000_0000, 3, 9);
    add(32'hB000_0000, 4, 1); add(32'h1000_0000, 4, 0); add(32'h5800_0000, 5, 5); add(32'h3000_0000, 5, 3);
    build_trie();
    // The root node must match the example's bitmaps.
    checks++; if (u_mem.mem[0][31:16] !== 16'b0101_0100_0001_0000 || u_mem.mem[1][31:17] !== 15'b1_00_0110_00000010) begin
      failures++; $display("FAIL root bitmaps %h", u_mem.mem[0]); end
    lookup_check(32'h5B00_0001);   // 0101 1011 ... 0001 -> 5
    checks++; if (rsp_next_hop !== 5) failures++;
    for (int i = 0; i < 40; i++) lookup_check($urandom);
    // Random tables with prefixes up to /31, several sharing long paths.
    for (int t = 0; t < 4; t++) begin
      int unsigned base;
      pfx_val.delete(); pfx_len.delete(); pfx_nh.delete();
      base = $urandom;
      if (t != 3) add(0, 0, 1000);            // table 3 has no default route
      for (int i = 0; i < 60; i++) add($urandom, 1 + $urandom % 24, i);
      for (int i = 0; i < 30; i++) add(base ^ ($urandom & 32'h0000_FFFF), 20 + $urandom % 12, 100 + i);
      add(base, 28 + t, 500 + t);            // forces an 8-node path
      build_trie();
      lookup_check(base);
      for (int i = 0; i < 60; i++) lookup_check(base ^ ($urandom & 32'h0000_0FFF));
      for (int i = 0; i < 30; i++) lookup_check($urandom);
    end
    checks++; if (max_lat != 38) begin failures++; $display("FAIL worst latency %0d, expected 38", max_lat); end
    $display("worst-case latency %0d cycles", max_lat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
