// tb_ingress_lookup: sends cells with random IPv4 destinations through the ingress
// function over a Tree Bitmap table without a default route. Cells with a match must
// come out unchanged except for the output-port tag (low byte of word 1), which must
// equal the reference next hop; cells without a match must be dropped and counted.
module tb_ingress_lookup;
  import fpx_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, in_ready, in_sof, out_valid, out_ready, out_sof, sram_rd;
  logic [31:0] in_data, out_data, sram_rdata;
  logic [17:0] sram_addr;
  logic [15:0] lookups, misses;
  int checks = 0, failures = 0, n_hit = 0, n_miss = 0;
  logic [31:0] exp_q [$];      // expected output words

  ingress_lookup dut (.*);
  zbt_sram_model u_mem (.clk, .addr(sram_addr), .rd(sram_rd), .rdata(sram_rdata));

  `define TBM_MEM u_mem.mem
  `include "tbm_builder.svh"

  function automatic logic [31:0] word_of(int unsigned id, int k, int unsigned ip);
    if (k == 0) return {4'h0, 8'h00, 16'(100 + id % 50), 4'h0};
    if (k == 1) return {8'h00, 16'(id), 8'hEE};
    if (k == IP_DST_WORD) return ip;
    return {16'(id), 8'h00, 8'(k)};
  endfunction

  bit stall_off = 0;
  always @(negedge clk) out_ready <= stall_off || ($urandom % 5) != 0;

  // Output monitor.
  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    checks++;
    if (exp_q.size() == 0) begin failures++; $display("FAIL unexpected word %h", out_data); end
    else begin
      logic [31:0] e;
      e = exp_q.pop_front();
      if (out_data !== e) begin failures++; $display("FAIL word %h exp %h", out_data, e); end
    end
  end

  initial begin #5_000_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    in_valid = 0; in_sof = 0; in_data = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 40; i++) add($urandom, 2 + $urandom % 20, $urandom % 8);
    add(32'hC0A8_0000, 16, 3); add(32'hC0A8_0100, 24, 6);
    build_trie();
    for (int c = 0; c < 150; c++) begin
      int unsigned ip, nh, plen; bit hit;
      ip  = (c % 3 == 0) ? (32'hC0A8_0000 | ($urandom & 32'h1FF)) : $urandom;
      hit = ref_lookup(ip, nh, plen);
      if (hit) begin
        n_hit++;
        for (int k = 0; k < CELL_WORDS; k++)
          exp_q.push_back(k == 1 ? {word_of(c, 1, ip)[31:8], 8'(nh)} : word_of(c, k, ip));
      end else n_miss++;
      for (int k = 0; k < CELL_WORDS; k++) begin
        @(negedge clk);
        in_valid = 1; in_sof = (k == 0); in_data = word_of(c, k, ip);
        while (!in_ready) @(negedge clk);
      end
      @(negedge clk); in_valid = 0; in_sof = 0;
    end
    stall_off = 1;
    repeat (100) @(negedge clk);
    checks += 3;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d words missing", exp_q.size()); end
    if (misses !== 16'(n_miss)) begin failures++; $display("FAIL misses %0d exp %0d", misses, n_miss); end
    if (lookups !== 16'(n_hit + n_miss)) begin failures++; $display("FAIL lookups %0d", lookups); end
    $display("hits %0d misses %0d", n_hit, n_miss);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
