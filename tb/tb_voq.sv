// tb_voq: virtual output queue test against per-port reference queues.
// Phase 1 fills the buffer past its size (and sends a cell with a bad tag) to check
// drops; phase 2 drains every queue, also asking for empty ones; phase 3 enqueues and
// dequeues at the same time with random output stalls. Checks cell contents and
// per-port order, the 7 buffer writes per stored cell and 7 reads per sent cell.
module tb_voq;
  import fpx_pkg::*;
  localparam int N = 4, SLOTS = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, in_ready, in_sof, deq_valid, deq_ready, out_valid, out_ready, out_sof, buf_wr, buf_rd;
  logic [31:0] in_data, out_data;
  logic [1:0]  deq_port;
  logic [N-1:0] nonempty;
  logic [15:0] enq_cells, deq_cells, drops;
  int checks = 0, failures = 0;
  int n_wr = 0, n_rd = 0, n_stored = 0, n_sent = 0, n_drop = 0, occupancy = 0;
  int unsigned model [N][$];   // cell ids per port
  bit enq_done = 0;

  voq #(.N_PORTS(N), .SLOTS(SLOTS)) dut (.*);

  always @(posedge clk) begin
    if (buf_wr) n_wr++;
    if (buf_rd) n_rd++;
  end

  function automatic logic [31:0] word_of(int unsigned id, int k, int tag);
    if (k == 0) return {4'h0, 8'h01, id[15:0], 4'h0};
    if (k == 1) return {8'h55, id[15:0], 8'(tag)};
    return {id[15:0], 8'hA0, 8'(k)};
  endfunction

  task automatic send(int unsigned id, int tag, bit expect_store);
    for (int k = 0; k < CELL_WORDS; k++) begin
      @(negedge clk);
      in_valid = 1; in_sof = (k == 0); in_data = word_of(id, k, tag);
    end
    @(negedge clk); in_valid = 0; in_sof = 0;
    if (expect_store) begin model[tag].push_back(id); n_stored++; occupancy++; end
    else n_drop++;
  endtask

  task automatic dequeue(int port);
    bit expect_cell = model[port].size() > 0;
    int unsigned id = expect_cell ? model[port][0] : 0;
    @(negedge clk);
    while (!deq_ready) @(negedge clk);
    deq_valid = 1; deq_port = 2'(port);
    @(negedge clk); deq_valid = 0;
    if (!expect_cell) begin
      repeat (3) @(negedge clk);
      checks++; if (out_valid) begin failures++; $display("FAIL output from empty queue %0d", port); end
      return;
    end
    void'(model[port].pop_front());
    for (int k = 0; k < CELL_WORDS; k++) begin
      out_ready = ($urandom % 4) != 0;
      #1;
      while (!(out_valid && out_ready)) begin
        @(negedge clk); out_ready = ($urandom % 4) != 0; #1;
      end
      checks++;
      if (out_data !== word_of(id, k, port) || out_sof !== (k == 0)) begin
        failures++; $display("FAIL port %0d cell %0d word %0d: %h exp %h", port, id, k, out_data, word_of(id, k, port));
      end
      @(negedge clk);
    end
    out_ready = 1;
    n_sent++; occupancy--;
  endtask

  initial begin #5_000_000; failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    in_valid = 0; in_sof = 0; in_data = 0; deq_valid = 0; deq_port = 0; out_ready = 1;
    repeat (3) @(negedge clk); rst_n = 1;
    // Phase 1: overflow and a bad tag.
    send(100, 9, 0);
    for (int i = 0; i < SLOTS + 3; i++) send(i, $urandom % N, i < SLOTS);
    checks++; if (drops !== 16'(n_drop)) begin failures++; $display("FAIL drops %0d exp %0d", drops, n_drop); end
    for (int p = 0; p < N; p++) begin
      checks++; if (nonempty[p] !== (model[p].size() > 0)) begin failures++; $display("FAIL nonempty %0d", p); end
    end
    // Phase 2: drain, asking for every port including empty ones.
    for (int r = 0; r < SLOTS + 2; r++) dequeue(r % N);
    for (int p = 0; p < N; p++) while (model[p].size() > 0) dequeue(p);
    checks++; if (nonempty !== '0) begin failures++; $display("FAIL not empty after drain"); end
    // Phase 3: concurrent traffic, never more than SLOTS-1 cells held.
    fork
      begin
        for (int i = 0; i < 60; i++) begin
          while (occupancy >= SLOTS - 1) @(negedge clk);
          send(1000 + i, $urandom % N, 1);
        end
        enq_done = 1;
      end
      begin
        int p;
        repeat (40) @(negedge clk);
        while (!enq_done || n_sent < n_stored) begin
          p = $urandom % N;
          if (model[p].size() > 0) dequeue(p); else @(negedge clk);
        end
      end
    join
    repeat (3) @(negedge clk);
    checks += 3;
    if (n_wr != 7 * n_stored) begin failures++; $display("FAIL %0d buffer writes for %0d cells", n_wr, n_stored); end
    if (n_rd != 7 * n_sent)   begin failures++; $display("FAIL %0d buffer reads for %0d cells", n_rd, n_sent); end
    if (enq_cells !== 16'(n_stored) || deq_cells !== 16'(n_sent)) begin failures++; $display("FAIL counters"); end
    $display("stored %0d sent %0d dropped %0d", n_stored, n_sent, n_drop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
