// hibi_pkg: types and constants shared by the HIBI bus wrapper, the accelerator
// wrappers, the resource manager and the hardware monitor.
//
// A HIBI word is 32 bits wide with a 3-bit command.  A word travels with an
// address-valid flag (av): an av word carries the target address, the data
// words that follow are the payload.  The command value 0 means "no word on
// the bus"; every agent writes words with CMD_WR.  The address map below is
// this implementation's choice: the top bits select the IP block, the low
// IP_OFS_W bits are free for the target's own use (Resource manager: type,
// release and blocking bits).  The SDRAM controller owns a much larger range
// so that a memory word address is also a HIBI address.
package hibi_pkg;
  localparam int unsigned DATA_W = 32;
  localparam int unsigned COMM_W = 3;

  localparam logic [COMM_W-1:0] CMD_IDLE = 3'd0;
  localparam logic [COMM_W-1:0] CMD_WR   = 3'd2;

  // Offset bits owned by an ordinary IP block (Resource manager layout:
  // base address in bits 31..9, type in 8..2, release bit 1, blocking bit 0).
  localparam int unsigned IP_OFS_W    = 9;
  // Offset bits owned by the SDRAM controller: 16 MB = 4 M words.
  localparam int unsigned SDRAM_OFS_W = 22;

  localparam logic [DATA_W-1:0] SDRAM_BASE = 32'h0000_0000;
  localparam logic [DATA_W-1:0] RM_BASE    = 32'h0100_0000;
  localparam logic [DATA_W-1:0] ME_BASE    = 32'h0100_0200;
  localparam logic [DATA_W-1:0] DQ_BASE    = 32'h0100_0400;
  localparam logic [DATA_W-1:0] MON_BASE   = 32'h0100_0600;
  localparam logic [DATA_W-1:0] CPU_BASE   = 32'h0100_1000;  // CPU k at CPU_BASE + k*0x200

  // Resource types known to the resource manager.
  localparam int unsigned RM_TYPE_DQ = 0;
  localparam int unsigned RM_TYPE_ME = 1;

  // Resource manager address word helpers.
  function automatic logic [DATA_W-1:0] rm_addr(input logic [DATA_W-1:0] rm_base,
                                                input int unsigned typ,
                                                input logic release_bit,
                                                input logic blocking_bit);
    logic [6:0] t;
    t = 7'(typ);
    return {rm_base[DATA_W-1:9], t, release_bit, blocking_bit};
  endfunction

  // One HIBI word with its side information, as held in FIFOs.
  typedef struct packed {
    logic              av;
    logic [COMM_W-1:0] comm;
    logic [DATA_W-1:0] data;
  } hibi_word_t;

  // ME wrapper address offsets (low bits of the ME wrapper's HIBI address).
  localparam logic [IP_OFS_W-1:0] ME_OFS_REQ    = 9'd0;  // 3-word request
  localparam logic [IP_OFS_W-1:0] ME_OFS_LOADER = 9'd1;  // SDRAM replies and pixel data
  localparam logic [IP_OFS_W-1:0] ME_OFS_WIDTH  = 9'd2;  // run-time image width (pixels)

  // Hardware monitor commands (low bits of a command word).
  localparam logic [1:0] MON_CLEAR  = 2'd0;
  localparam logic [1:0] MON_START  = 2'd1;
  localparam logic [1:0] MON_STOP   = 2'd2;
  localparam logic [1:0] MON_REPORT = 2'd3;
endpackage
