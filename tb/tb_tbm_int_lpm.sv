// tb_tbm_int_lpm: checks the in-node longest match against a direct search over
// prefix lengths 3..0, exhaustively for all 2^15 bitmaps with random paths.
module tb_tbm_int_lpm;
  logic [14:0] int_bm;
  logic [2:0]  bits;
  logic        match;
  logic [1:0]  match_len;
  logic [3:0]  res_idx;
  int checks = 0, failures = 0;
  tbm_int_lpm dut (.*);

  task automatic check();
    bit m = 0; int len = 0, pos = 0, idx = 0;
    for (int l = 3; l >= 0 && !m; l--) begin
      int v = int'(bits) >> (3 - l);
      int p = (2 ** l) - 1 + v;
      if (int_bm[14 - p]) begin m = 1; len = l; pos = p; end
    end
    for (int q = 0; q < pos; q++) idx += int_bm[14 - q];
    #1; checks++;
    if (match !== m || (m && (match_len !== 2'(len) || res_idx !== 4'(idx)))) begin
      failures++; $display("FAIL bm=%b bits=%b -> %0d %0d %0d exp %0d %0d %0d", int_bm, bits, match, match_len, res_idx, m, len, idx);
    end
  endtask

  initial begin
    // Example root 1 00 0110 00000010, path 010: matches 01* (position 4), index 1.
    int_bm = 15'b1_00_0110_00000010; bits = 3'b010; #1;
    checks++; if (!match || match_len != 2 || res_idx != 1) begin failures++; $display("FAIL example 010: %0d %0d %0d", match, match_len, res_idx); end
    // Path 110: matches 110* (position 13), index 3.
    bits = 3'b110; #1;
    checks++; if (!match || match_len != 3 || res_idx != 3) begin failures++; $display("FAIL example 110: %0d %0d %0d", match, match_len, res_idx); end
    for (int b = 0; b < 2**15; b++) begin int_bm = 15'(b); bits = 3'($urandom); check(); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
