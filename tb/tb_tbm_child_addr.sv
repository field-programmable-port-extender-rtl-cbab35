// tb_tbm_child_addr: checks the next-node address against a bit-by-bit count of
// the ones left of the stride position, for the example root node and random nodes.
module tb_tbm_child_addr;
  logic [15:0] ext_bm, child_ptr;
  logic [3:0]  stride;
  logic        has_child;
  logic [4:0]  ones_left;
  logic [17:0] child_addr;
  int checks = 0, failures = 0;
  tbm_child_addr dut (.*);

  task automatic check();
    int n = 0; logic [15:0] s;
    for (int k = 0; k < int'(stride); k++) n += ext_bm[15 - k];
    s = child_ptr + 16'(n);
    #1; checks++;
    if (has_child !== ext_bm[15 - stride] || ones_left !== 5'(n) || child_addr !== {s, 2'b00}) begin
      failures++; $display("FAIL ext=%h ptr=%h s=%0d -> %0d %0d %h", ext_bm, child_ptr, stride, has_child, ones_left, child_addr);
    end
  endtask

  initial begin
    // Example root: extending paths 0101 0100 0001 0000; stride 0101 is the 3rd child.
    ext_bm = 16'b0101_0100_0001_0000; child_ptr = 16'd1; stride = 4'b0101; #1;
    checks++; if (!has_child || ones_left != 2 || child_addr != 18'd12) failures++;
    for (int s = 0; s < 16; s++) begin stride = 4'(s); check(); end
    for (int i = 0; i < 3000; i++) begin
      ext_bm = 16'($urandom); child_ptr = 16'($urandom); stride = 4'($urandom); check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
