// nid: Network Interface Device, the fixed FPGA between line card, switch and RAD.
//
// After power-up the NID simply passes cells through: line card to switch and switch
// to line card (bypass mode). Once the RAD (the reprogrammable application FPGA) is
// programmed, cells are routed through it instead: line-card cells go to the RAD's
// ingress function and the RAD's ingress output goes to the switch; switch cells go to
// the RAD's egress function and its output to the line card (RAD mode). The mode is
// latched per cell at its start-of-cell word, so a mode change never splits a cell.
//
// Cells from the switch with VCI 34 are control cells and never pass on. Their payload
// byte 0 is an opcode: DATA and DATA_LAST carry 11 configuration words (cell words
// 3..13), written to the RAD program FIFO; CONFIRM (bit 0 of word 2 = partial) starts
// programming the RAD from the FIFO. The first complete bitstream (ended by DATA_LAST)
// programs the RAD without a CONFIRM. A full reprogramming returns the NID to bypass
// until the RAD reports DONE; a partial one keeps the RAD in the data path throughout,
// so the RAD keeps processing cells while parts of it are rewritten.
//
// From the document: bypass after boot, control cells on VCI 34 buffered in a FIFO,
// programming after the final byte, a confirmation cell for reprogramming, partial
// reprogramming through the RAD's JTAG pins. The opcodes, the cell layout and the
// choice of the switch side as the control-cell source are this design's own.
module nid import fpx_pkg::*; (
  input  logic        clk,
  input  logic        rst_n,
  // line card
  input  logic        lc_rx_valid, output logic lc_rx_ready, input logic lc_rx_sof, input logic [31:0] lc_rx_data,
  output logic        lc_tx_valid, input  logic lc_tx_ready, output logic lc_tx_sof, output logic [31:0] lc_tx_data,
  // switch
  input  logic        sw_rx_valid, output logic sw_rx_ready, input logic sw_rx_sof, input logic [31:0] sw_rx_data,
  output logic        sw_tx_valid, input  logic sw_tx_ready, output logic sw_tx_sof, output logic [31:0] sw_tx_data,
  // RAD ingress function (to it, and back from it)
  output logic        ri_tx_valid, input  logic ri_tx_ready, output logic ri_tx_sof, output logic [31:0] ri_tx_data,
  input  logic        ri_rx_valid, output logic ri_rx_ready, input logic ri_rx_sof, input logic [31:0] ri_rx_data,
  // RAD egress function (to it, and back from it)
  output logic        re_tx_valid, input  logic re_tx_ready, output logic re_tx_sof, output logic [31:0] re_tx_data,
  input  logic        re_rx_valid, output logic re_rx_ready, input logic re_rx_sof, input logic [31:0] re_rx_data,
  // RAD program FIFO and loader
  output logic        cfg_wr,
  output logic [31:0] cfg_data,
  output logic        prog_start,
  input  logic        prog_busy,
  input  logic        prog_done,   // loader finished shifting the FIFO out
  input  logic        rad_done,    // the RAD's DONE pin
  // status
  output logic        rad_active,
  output logic        rad_configured,
  output logic [15:0] ctl_cells,
  output logic [15:0] prog_count,
  output logic [15:0] prog_errors
);
  // ---------------- ingress: line card -> RAD or bypass ----------------
  logic ing_to_rad, ing_act;          // path of the cell in progress
  logic ing_sel;
  logic bi_valid, bi_ready;           // bypass stream towards the switch

  assign ing_sel     = lc_rx_sof ? rad_active : ing_to_rad;
  assign ri_tx_valid = lc_rx_valid && (lc_rx_sof || ing_act) && ing_sel;
  assign ri_tx_sof   = lc_rx_sof;
  assign ri_tx_data  = lc_rx_data;
  assign bi_valid    = lc_rx_valid && (lc_rx_sof || ing_act) && !ing_sel;
  assign lc_rx_ready = !(lc_rx_sof || ing_act) ? 1'b1 : (ing_sel ? ri_tx_ready : bi_ready);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ing_to_rad <= 1'b0; ing_act <= 1'b0;
    end else if (lc_rx_valid && lc_rx_ready && lc_rx_sof) begin
      ing_to_rad <= rad_active; ing_act <= 1'b1;
    end
  end

  cell_mux2 u_mux_sw (
    .clk, .rst_n,
    .a_valid(ri_rx_valid), .a_ready(ri_rx_ready), .a_sof(ri_rx_sof), .a_data(ri_rx_data),
    .b_valid(bi_valid),    .b_ready(bi_ready),    .b_sof(lc_rx_sof), .b_data(lc_rx_data),
    .y_valid(sw_tx_valid), .y_ready(sw_tx_ready), .y_sof(sw_tx_sof), .y_data(sw_tx_data)
  );

  // ---------------- egress: switch -> control, RAD or bypass ----------------
  typedef enum logic [1:0] {P_CTL, P_RAD, P_BYP} path_e;
  path_e      egr_path, egr_sel;
  logic       egr_act;
  logic       be_valid, be_ready;     // bypass stream towards the line card
  logic [3:0] cw;                     // word index inside a control cell
  logic       egr_take;

  always_comb begin
    if (sw_rx_sof) begin
      if (cell_vci(sw_rx_data) == CONTROL_VCI) egr_sel = P_CTL;
      else if (rad_active)                     egr_sel = P_RAD;
      else                                     egr_sel = P_BYP;
    end else begin
      egr_sel = egr_path;
    end
  end

  assign egr_take    = sw_rx_valid && (sw_rx_sof || egr_act);
  assign re_tx_valid = egr_take && egr_sel == P_RAD;
  assign re_tx_sof   = sw_rx_sof;
  assign re_tx_data  = sw_rx_data;
  assign be_valid    = egr_take && egr_sel == P_BYP;
  always_comb begin
    if (!(sw_rx_sof || egr_act)) sw_rx_ready = 1'b1;
    else unique case (egr_sel)
      P_RAD:   sw_rx_ready = re_tx_ready;
      P_BYP:   sw_rx_ready = be_ready;
      default: sw_rx_ready = 1'b1;
    endcase
  end

  cell_mux2 u_mux_lc (
    .clk, .rst_n,
    .a_valid(re_rx_valid), .a_ready(re_rx_ready), .a_sof(re_rx_sof), .a_data(re_rx_data),
    .b_valid(be_valid),    .b_ready(be_ready),    .b_sof(sw_rx_sof), .b_data(sw_rx_data),
    .y_valid(lc_tx_valid), .y_ready(lc_tx_ready), .y_sof(lc_tx_sof), .y_data(lc_tx_data)
  );

  // ---------------- control cells ----------------
  logic       ctl_word;               // a control-cell word is accepted this cycle
  logic [7:0] ctl_op;
  logic       ctl_partial;
  logic       prog_partial;           // programming in progress is partial
  logic       prog_wait;              // waiting for the loader to finish

  assign ctl_word = egr_take && sw_rx_ready && egr_sel == P_CTL;
  assign cfg_wr   = ctl_word && !sw_rx_sof && cw >= 4'd3 &&
                    (ctl_op == CTL_DATA || ctl_op == CTL_DATA_LAST);
  assign cfg_data = sw_rx_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      egr_path <= P_BYP; egr_act <= 1'b0; cw <= '0;
      ctl_op <= '0; ctl_partial <= 1'b0;
      rad_active <= 1'b0; rad_configured <= 1'b0;
      prog_start <= 1'b0; prog_partial <= 1'b0; prog_wait <= 1'b0;
      ctl_cells <= '0; prog_count <= '0; prog_errors <= '0;
    end else begin
      prog_start <= 1'b0;
      if (egr_take && sw_rx_ready) begin
        if (sw_rx_sof) begin egr_path <= egr_sel; egr_act <= 1'b1; end
      end
      if (ctl_word) begin
        cw <= sw_rx_sof ? 4'd1 : cw + 4'd1;
        if (!sw_rx_sof && cw == 4'd2) begin
          ctl_op      <= sw_rx_data[31:24];
          ctl_partial <= sw_rx_data[0];
        end
        if (!sw_rx_sof && cw == 4'(CELL_WORDS - 1)) begin
          ctl_cells <= ctl_cells + 1'b1;
          if (!prog_busy && !prog_wait &&
              ((ctl_op == CTL_DATA_LAST && !rad_configured) || ctl_op == CTL_CONFIRM)) begin
            automatic logic partial = (ctl_op == CTL_CONFIRM) && ctl_partial && rad_configured;
            prog_start   <= 1'b1;
            prog_wait    <= 1'b1;
            prog_partial <= partial;
            if (!partial) rad_active <= 1'b0;   // full reprogramming: bypass meanwhile
          end
        end
      end
      if (prog_wait && prog_done) begin
        prog_wait  <= 1'b0;
        prog_count <= prog_count + 1'b1;
        if (rad_done) begin
          rad_active     <= 1'b1;
          rad_configured <= 1'b1;
        end else begin
          rad_active  <= prog_partial && rad_active;
          prog_errors <= prog_errors + 1'b1;
        end
      end
    end
  end
endmodule
