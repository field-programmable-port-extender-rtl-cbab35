// tb_sync_fifo: random writes and reads against a queue reference; checks data order,
// count, empty/full and the overflow flag, including simultaneous read and write.
module tb_sync_fifo;
  localparam int DEPTH = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic wr_en, rd_en, empty, full, overflow;
  logic [31:0] wr_data, rd_data;
  logic [$clog2(DEPTH+1)-1:0] count;
  int checks = 0, failures = 0;
  logic [31:0] model [$];

  sync_fifo #(.WIDTH(32), .DEPTH(DEPTH)) dut (.*);

  initial begin #1_000_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    wr_en = 0; rd_en = 0; wr_data = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      int phase;
      bit exp_ovf;
      phase = (i / 500) % 3;   // fill-heavy, drain-heavy, balanced
      @(negedge clk);
      wr_en   = ($urandom % 100) < (phase == 0 ? 80 : phase == 1 ? 20 : 50);
      rd_en   = ($urandom % 100) < (phase == 0 ? 20 : phase == 1 ? 80 : 50);
      wr_data = $urandom;
      #1;
      checks++;
      if (count !== ($clog2(DEPTH+1))'(model.size()) || empty !== (model.size() == 0) || full !== (model.size() == DEPTH)) begin
        failures++; $display("FAIL count %0d model %0d", count, model.size());
      end
      if (model.size() > 0) begin
        checks++;
        if (rd_data !== model[0]) begin failures++; $display("FAIL data %h exp %h", rd_data, model[0]); end
      end
      exp_ovf = wr_en && model.size() == DEPTH && !(rd_en && model.size() > 0);
      checks++;
      if (overflow !== exp_ovf) begin failures++; $display("FAIL overflow %0d exp %0d", overflow, exp_ovf); end
      @(posedge clk);
      if (rd_en && model.size() > 0) void'(model.pop_front());
      if (wr_en && !exp_ovf) model.push_back(wr_data);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
