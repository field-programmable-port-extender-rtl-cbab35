// cell_scheduler: per-cell-slot selection of cells across the switch.
//
// Every SLOT_CYCLES cycles it looks at the request matrix (req[i][j]: input i holds a
// cell for output j and output j can take one) and grants a set of (input, output)
// pairs in which no input and no output appears twice, the rule the document states
// for an input-buffered switch. The document leaves the selection algorithm open; this
// design uses the simplest maximal matching: inputs are visited in order starting at
// a round-robin pointer, and each takes the first free output it requests, searching
// from the same pointer. The pointer advances by one every slot so that no input or
// output is favoured for long. The matching is combinational; grants are registered
// and grant_valid pulses for one cycle at the start of each slot.
module cell_scheduler #(
  parameter int unsigned N_PORTS     = 8,
  parameter int unsigned SLOT_CYCLES = 16
) (
  input  logic                                      clk,
  input  logic                                      rst_n,
  input  logic [N_PORTS-1:0][N_PORTS-1:0]           req,        // [input][output]
  output logic                                      grant_valid,
  output logic [N_PORTS-1:0][N_PORTS-1:0]           grant,      // [input][output]
  output logic [N_PORTS-1:0]                        grant_any,  // per input
  output logic [N_PORTS-1:0][$clog2(N_PORTS)-1:0]   grant_port  // per input
);
  localparam int unsigned PW = $clog2(N_PORTS);

  logic [$clog2(SLOT_CYCLES)-1:0]          tick;
  logic [PW-1:0]                           rr;
  logic [N_PORTS-1:0][N_PORTS-1:0]         match;

  always_comb begin
    logic [N_PORTS-1:0] out_taken;
    out_taken = '0;
    match     = '0;
    for (int k = 0; k < int'(N_PORTS); k++) begin
      automatic int i = (int'(rr) + k) % int'(N_PORTS);
      automatic logic done = 1'b0;
      for (int m = 0; m < int'(N_PORTS); m++) begin
        automatic int j = (int'(rr) + m) % int'(N_PORTS);
        if (!done && req[i][j] && !out_taken[j]) begin
          match[i][j]  = 1'b1;
          out_taken[j] = 1'b1;
          done         = 1'b1;
        end
      end
    end
  end

  always_comb
    for (int i = 0; i < int'(N_PORTS); i++) begin
      grant_any[i]  = |grant[i];
      grant_port[i] = '0;
      for (int j = 0; j < int'(N_PORTS); j++)
        if (grant[i][j]) grant_port[i] = PW'(j);
    end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tick        <= '0;
      rr          <= '0;
      grant       <= '0;
      grant_valid <= 1'b0;
    end else begin
      grant_valid <= 1'b0;
      if (tick == ($clog2(SLOT_CYCLES))'(SLOT_CYCLES - 1)) begin
        tick        <= '0;
        grant       <= match;
        grant_valid <= 1'b1;
        rr          <= (rr == PW'(N_PORTS - 1)) ? '0 : rr + 1'b1;
      end else begin
        tick <= tick + 1'b1;
      end
    end
  end
endmodule
