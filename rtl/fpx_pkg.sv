// fpx_pkg: constants and small helpers shared by the FPX blocks.
//
// Cells move between blocks as a stream of 32-bit words, one word per clock, each
// stream carrying valid/ready/sof (start of cell) and data. A cell is 56 bytes, the
// smallest unit the switch handles, i.e. CELL_WORDS = 14 words:
//   word 0      ATM header  {GFC[31:28], VPI[27:20], VCI[19:4], PTI[3:1], CLP[0]}
//   word 1      {HEC[31:24], unused[23:8], output-port tag[7:0]} (the tag steers the switch)
//   words 2-13  the 48 payload bytes
// The 56-byte size, the VCI value 34 for control cells and the 18-bit SRAM address
// follow the document; the word layout above is this design's own choice.
package fpx_pkg;

  localparam int unsigned CELL_BYTES  = 56;
  localparam int unsigned CELL_WORDS  = CELL_BYTES / 4;   // 14 words of 32 bits
  localparam int unsigned CELL_DWORDS = CELL_BYTES / 8;   // 7 words of 64 bits (SDRAM)
  localparam logic [15:0] CONTROL_VCI = 16'd34;
  localparam int unsigned SRAM_AW     = 18;               // 8 Mbit / 32 bit = 256K words
  localparam int unsigned SRAM_DW     = 32;

  // Position of the destination IPv4 address inside a cell: payload bytes 16..19,
  // i.e. the IPv4 header starts at the first payload byte (cell word 2 + 4).
  localparam int unsigned IP_DST_WORD = 6;

  // Control-cell opcodes, in payload byte 0 (cell word 2 bits [31:24]).
  typedef enum logic [7:0] {
    CTL_DATA      = 8'h01,  // configuration words in cell words 3..13
    CTL_DATA_LAST = 8'h02,  // same, last cell of a bitstream
    CTL_CONFIRM   = 8'h03   // start programming the RAD from the FIFO
  } ctl_op_e;

  function automatic logic [15:0] cell_vci(input logic [31:0] hdr);
    return hdr[19:4];
  endfunction

  function automatic logic [7:0] cell_tag(input logic [31:0] w1);
    return w1[7:0];
  endfunction

endpackage
