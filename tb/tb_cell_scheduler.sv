// tb_cell_scheduler: random request matrices, held for a slot at a time. Each grant
// set must be a subset of the requests with at most one grant per input and per
// output, and maximal (no requested pair left with both ends free). Also checks the
// slot period and the per-input port encoding.
module tb_cell_scheduler;
  localparam int N = 8, SLOT = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [N-1:0][N-1:0] req, grant;
  logic grant_valid;
  logic [N-1:0] grant_any;
  logic [N-1:0][2:0] grant_port;
  int checks = 0, failures = 0, last_t = -1, total = 0;

  cell_scheduler #(.N_PORTS(N), .SLOT_CYCLES(SLOT)) dut (.*);

  initial begin #2_000_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    req = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int s = 0; s < 400; s++) begin
      logic [N-1:0][N-1:0] r;
      int density;
      density = 5 + (s % 4) * 25;
      for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) r[i][j] = ($urandom % 100) < density;
      req = r;
      @(posedge clk iff grant_valid);
      #1;
      total++;
      checks++;
      if (last_t >= 0 && (int'($time) - last_t) != SLOT * 10) begin failures++; $display("FAIL period %0d", int'($time) - last_t); end
      last_t = int'($time);
      begin
        logic [N-1:0] in_busy, out_busy; bit bad;
        in_busy = '0; out_busy = '0; bad = 0;
        for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) if (grant[i][j]) begin
          if (!r[i][j] || in_busy[i] || out_busy[j]) bad = 1;
          in_busy[i] = 1; out_busy[j] = 1;
        end
        for (int i = 0; i < N; i++) for (int j = 0; j < N; j++)
          if (r[i][j] && !in_busy[i] && !out_busy[j]) bad = 1;
        for (int i = 0; i < N; i++)
          if (grant_any[i] !== in_busy[i] || (in_busy[i] && !grant[i][grant_port[i]])) bad = 1;
        checks++;
        if (bad) begin failures++; $display("FAIL slot %0d req=%h grant=%h", s, r, grant); end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
