// tb_rad_jtag_loader: loads word sets of several sizes into a FIFO reference, lets the
// loader shift them into a model of the RAD's TAP, and checks the words received, that
// the TAP ends in Run-Test/Idle after an Update-DR, the DONE pin, and the load time of
// 2 clocks per TCK for 6 + 3 + 32*words + 2 TCK periods, plus one clock per word fetch.
module tb_rad_jtag_loader;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start, busy, done, fifo_empty, fifo_rd, tck, tms, tdi, rad_done;
  logic [31:0] fifo_data;
  logic [10:0] fifo_count;
  logic [31:0] fmem [64];      // FIFO reference: show-ahead, read and write indices
  int rdp = 0, wrp = 0;
  int checks = 0, failures = 0;

  rad_jtag_loader #(.CW(11)) dut (.*);
  rad_tap_model u_tap (.tck, .tms, .tdi, .done(rad_done));

  assign fifo_empty = (rdp == wrp);
  assign fifo_data  = fmem[rdp % 64];
  assign fifo_count = 11'(wrp - rdp);
  always @(posedge clk) if (fifo_rd && rdp != wrp) rdp <= rdp + 1;

  initial begin #5_000_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    int sizes [4];
    sizes = '{1, 2, 11, 40};
    start = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    foreach (sizes[s]) begin
      logic [31:0] words [$];
      int cyc;
      words.delete();
      for (int i = 0; i < sizes[s]; i++) begin words.push_back($urandom); fmem[wrp % 64] = words[i]; wrp++; end
      u_tap.bits.delete();
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      repeat (2) @(negedge clk);
      checks += 4;
      if (u_tap.bits.size() != 32 * sizes[s]) begin failures++; $display("FAIL %0d bits shifted for %0d words", u_tap.bits.size(), sizes[s]); end
      else foreach (words[i]) begin
        logic [31:0] w;
        w = u_tap.pop_word();
        checks++;
        if (w !== words[i]) begin failures++; $display("FAIL word %0d: %h exp %h", i, w, words[i]); end
      end
      if (u_tap.st != u_tap.RTI) begin failures++; $display("FAIL TAP not in Run-Test/Idle"); end
      if (!rad_done || busy) begin failures++; $display("FAIL done pin %0d busy %0d", rad_done, busy); end
      if (cyc < 2 * (11 + 32 * sizes[s]) + sizes[s] || cyc > 2 * (11 + 32 * sizes[s]) + sizes[s] + 4) begin
        failures++; $display("FAIL load took %0d clocks for %0d words", cyc, sizes[s]);
      end
    end
    // An empty FIFO finishes at once and leaves the pins alone.
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    checks++; if (!done) begin failures++; $display("FAIL no done for an empty FIFO"); end
    repeat (3) @(negedge clk);
    checks++; if (busy || u_tap.bits.size() != 0) begin failures++; $display("FAIL empty load"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
