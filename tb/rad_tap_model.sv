// rad_tap_model: behavioural model of the RAD FPGA's JTAG test access port, standing
// in for the device's configuration logic (vendor silicon, not part of the design).
// It follows the IEEE 1149.1 TAP state machine on rising TCK, collects every bit
// shifted in Shift-DR (the bit on TDI at each rising edge in that state) into
// 'bits', counts Update-DR passes, and raises 'done' at Update-DR once at least
// one bit was shifted; entering Test-Logic-Reset clears 'done' (a fresh load).
module rad_tap_model (
  input  logic tck,
  input  logic tms,
  input  logic tdi,
  output logic done
);
  typedef enum int {TLR, RTI, SEL_DR, CAP_DR, SH_DR, EX1_DR, PAU_DR, EX2_DR, UPD_DR,
                    SEL_IR, CAP_IR, SH_IR, EX1_IR, PAU_IR, EX2_IR, UPD_IR} tap_e;
  tap_e st = TLR;
  bit   bits [$];
  int   updates = 0;
  int   loads = 0;       // shifted bits since the last Update-DR
  initial done = 0;

  always @(posedge tck) begin
    if (st == SH_DR) begin bits.push_back(tdi); loads++; end
    case (st)
      TLR:    st <= tms ? TLR    : RTI;
      RTI:    st <= tms ? SEL_DR : RTI;
      SEL_DR: st <= tms ? SEL_IR : CAP_DR;
      CAP_DR: st <= tms ? EX1_DR : SH_DR;
      SH_DR:  st <= tms ? EX1_DR : SH_DR;
      EX1_DR: st <= tms ? UPD_DR : PAU_DR;
      PAU_DR: st <= tms ? EX2_DR : PAU_DR;
      EX2_DR: st <= tms ? UPD_DR : SH_DR;
      UPD_DR: st <= tms ? SEL_DR : RTI;
      SEL_IR: st <= tms ? TLR    : CAP_IR;
      CAP_IR: st <= tms ? EX1_IR : SH_IR;
      SH_IR:  st <= tms ? EX1_IR : SH_IR;
      EX1_IR: st <= tms ? UPD_IR : PAU_IR;
      PAU_IR: st <= tms ? EX2_IR : PAU_IR;
      EX2_IR: st <= tms ? UPD_IR : SH_IR;
      UPD_IR: st <= tms ? SEL_DR : RTI;
      default: st <= TLR;
    endcase
  end
  always @(posedge tck) begin
    if (st == UPD_DR) begin updates++; if (loads > 0) done <= 1; loads = 0; end
    if (st == EX1_DR && tms) ;  // next state Update-DR
    if (st == SEL_IR && tms) done <= 0;   // going to Test-Logic-Reset
  end

  // Pop the first n collected bits as 32-bit words, MSB first.
  function automatic logic [31:0] pop_word();
    logic [31:0] w = '0;
    for (int i = 0; i < 32; i++) w = {w[30:0], logic'(bits.pop_front())};
    return w;
  endfunction
endmodule
