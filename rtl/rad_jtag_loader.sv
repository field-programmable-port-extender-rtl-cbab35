// rad_jtag_loader: shifts the RAD program FIFO into the RAD through its JTAG pins.
//
// On 'start' it walks the RAD's test access port (IEEE 1149.1) from Test-Logic-Reset
// to Run-Test/Idle (TMS 1,1,1,1,1,0), into Shift-DR (TMS 1,0,0), shifts every FIFO word
// in, most significant bit first, with TMS high on the very last bit (to Exit1-DR), then
// goes through Update-DR back to Run-Test/Idle (TMS 1,0) and pulses 'done'. TCK runs at
// half the clock: TMS and TDI change while TCK is low and the RAD samples them on the
// rising edge of TCK. Fetching each word takes one extra clock, so a load of W words
// takes 2*(11 + 32*W) + W clocks plus the clock that sees 'start'. The FIFO is a show-ahead FIFO: fifo_data is its oldest word and
// fifo_rd pops it; the word is the last when fifo_count is 1 as it is popped. An empty
// FIFO on 'start' gives 'done' at once, without touching the pins.
//
// From the document: the NID programs the RAD from the FIFO by driving the RAD's JTAG
// pins, which also allows partial reprogramming. The TAP sequence is the standard one;
// which JTAG instruction selects the RAD's configuration register is device specific,
// not given, and is taken to be selected already, so only the data register is shifted.
module rad_jtag_loader #(
  parameter int unsigned CW = 11      // width of fifo_count
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  output logic          busy,
  output logic          done,
  // RAD program FIFO (show-ahead)
  input  logic          fifo_empty,
  input  logic [31:0]   fifo_data,
  input  logic [CW-1:0] fifo_count,
  output logic          fifo_rd,
  // RAD JTAG pins
  output logic          tck,
  output logic          tms,
  output logic          tdi
);
  typedef enum logic [2:0] {J_IDLE, J_RESET, J_ENTER, J_LOAD, J_SHIFT, J_EXIT} jstate_e;

  jstate_e     state;
  logic [2:0]  step;      // TCK period inside J_RESET / J_ENTER / J_EXIT
  logic [31:0] sh;        // word being shifted
  logic [4:0]  bitn;      // bits of sh already shifted
  logic        last_word;
  logic        half;      // 0: TCK low (set TMS/TDI), 1: TCK high (sampled)

  assign busy    = (state != J_IDLE);
  assign fifo_rd = (state == J_LOAD) && !fifo_empty;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= J_IDLE; step <= '0; sh <= '0; bitn <= '0; last_word <= 1'b0;
      half <= 1'b0; tck <= 1'b0; tms <= 1'b1; tdi <= 1'b0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        J_IDLE: begin
          tck <= 1'b0;
          if (start && fifo_empty) done <= 1'b1;          // nothing to load
          else if (start) begin state <= J_RESET; step <= '0; half <= 1'b0; end
        end
        J_LOAD: begin
          // Fetch the next word. The FIFO is not written while loading, so it can only
          // run dry here if it was changed under the loader; then leave through Exit.
          if (!fifo_empty) begin
            sh        <= fifo_data;
            last_word <= (fifo_count == CW'(1));
            bitn      <= '0;
            state     <= J_SHIFT;
          end else begin
            state <= J_EXIT; step <= '0;
          end
          half <= 1'b0;
        end
        default: begin
          // One TCK period per two clocks.
          if (!half) begin
            tck  <= 1'b0;
            half <= 1'b1;
            unique case (state)
              J_RESET: tms <= (step != 3'd5);
              J_ENTER: tms <= (step == 3'd0);
              J_SHIFT: begin tms <= last_word && bitn == 5'd31; tdi <= sh[31]; end
              J_EXIT:  tms <= (step == 3'd0);
              default: ;
            endcase
          end else begin
            tck  <= 1'b1;
            half <= 1'b0;
            unique case (state)
              J_RESET: begin step <= step + 3'd1; if (step == 3'd5) begin state <= J_ENTER; step <= '0; end end
              J_ENTER: begin
                step <= step + 3'd1;
                if (step == 3'd2) state <= J_LOAD;
                if (step == 3'd2) step <= '0;
              end
              J_SHIFT: begin
                sh   <= {sh[30:0], 1'b0};
                bitn <= bitn + 5'd1;
                if (bitn == 5'd31) begin
                  if (last_word) begin state <= J_EXIT; step <= '0; end
                  else state <= J_LOAD;
                end
              end
              J_EXIT: begin
                step <= step + 3'd1;
                if (step == 3'd1) begin state <= J_IDLE; done <= 1'b1; end
              end
              default: ;
            endcase
          end
        end
      endcase
    end
  end
endmodule
