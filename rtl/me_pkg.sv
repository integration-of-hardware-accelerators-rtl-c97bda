// me_pkg: types shared by the sub-blocks of the motion-estimation wrapper.
//
// addr_sel_t selects what the address handler puts on the HIBI output when a
// sub-block sends an address word: nothing (zero), the result return address,
// the current-macroblock SDRAM address, its SDRAM base address (bits below
// the SDRAM offset width masked off, used for port requests) or the reference
// area address plus the offset of the selected vertical slice.
package me_pkg;
  typedef enum logic [2:0] {
    AS_NONE     = 3'd0,
    AS_RESULT   = 3'd1,
    AS_CUR      = 3'd2,
    AS_CUR_BASE = 3'd3,
    AS_REF      = 3'd4
  } addr_sel_t;

  // Word offsets of the three reference-area slices: one macroblock row is
  // 16 pixels = 4 words of 4 pixels.
  localparam logic [31:0] SLICE_OFS [3] = '{32'd0, 32'd4, 32'd8};

  localparam int unsigned MB_WORDS_PER_ROW = 4;   // "macroblock width register"
  localparam int unsigned MB_ROWS          = 16;
  localparam int unsigned REF_ROWS         = 48;
  localparam int unsigned QCIF_WIDTH       = 176; // pixels

  // Four pixels of a 32-bit memory word, leftmost pixel first.  Little endian
  // (the default, as on Nios II) keeps the leftmost pixel in bits 7..0.
  function automatic logic [31:0] word_to_bus(input logic [31:0] w, input bit big_endian);
    // returns the pixels with the leftmost in bits 31..24 (accelerator order)
    return big_endian ? w : {w[7:0], w[15:8], w[23:16], w[31:24]};
  endfunction
  function automatic logic [31:0] bus_to_word(input logic [31:0] b, input bit big_endian);
    return big_endian ? b : {b[7:0], b[15:8], b[23:16], b[31:24]};
  endfunction
endpackage
