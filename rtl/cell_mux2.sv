// cell_mux2: merges two cell streams into one, a whole cell at a time.
//
// When the output is between cells, a start-of-cell word on input a wins, else one on
// input b; the chosen input then owns the output for CELL_WORDS words. Words that
// arrive on an input outside a cell (no sof, input not owning the output) are held
// back, not lost. Valid/ready handshake on all three streams; combinational data path.
module cell_mux2 import fpx_pkg::*; (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        a_valid,
  output logic        a_ready,
  input  logic        a_sof,
  input  logic [31:0] a_data,
  input  logic        b_valid,
  output logic        b_ready,
  input  logic        b_sof,
  input  logic [31:0] b_data,
  output logic        y_valid,
  input  logic        y_ready,
  output logic        y_sof,
  output logic [31:0] y_data
);
  logic       busy, own_b;      // a cell is in progress, and from which input
  logic [3:0] w;                // words of that cell already passed
  logic       sel_b;

  assign sel_b   = busy ? own_b : !(a_valid && a_sof) && (b_valid && b_sof);
  assign y_valid = busy ? (own_b ? b_valid : a_valid)
                        : ((a_valid && a_sof) || (b_valid && b_sof));
  assign y_sof   = sel_b ? b_sof : a_sof;
  assign y_data  = sel_b ? b_data : a_data;
  assign a_ready = y_ready && (busy ? !own_b : (a_valid && a_sof));
  assign b_ready = y_ready && (busy ? own_b : !(a_valid && a_sof) && (b_valid && b_sof));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; own_b <= 1'b0; w <= '0;
    end else if (y_valid && y_ready) begin
      if (!busy) begin
        busy  <= 1'b1;
        own_b <= sel_b;
        w     <= 4'd1;
      end else if (w == 4'(CELL_WORDS - 1)) begin
        busy <= 1'b0;
      end else begin
        w <= w + 4'd1;
      end
    end
  end
endmodule
