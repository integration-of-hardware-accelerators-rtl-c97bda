// Resource manager (RM): mutual exclusion and scheduling of shared
// accelerators for any HIBI agent.
//
// What it does
//   A request or release is a two-word HIBI message.  The address word is
//   {RM base (bits 31..9), 7-bit type (bits 8..2), release bit (1),
//   blocking bit (0)}.  For a request the data word is the return address
//   of the requester; for a release it is the HIBI address of the resource
//   being released.  A granted request is answered with a two-word message
//   (address word = return address, data word = address of the granted
//   accelerator).  A refused request is answered with a zero data word.
//
// How
//   * address decoder: takes the address word and the data word from the
//     receive side of the HIBI wrapper and steers them to a type unit, to
//     the null FIFO, or (release) clears the matching reserve register at
//     once.
//   * type unit (one per type, generate loop): a FIFO of return addresses
//     for waiting requests and a slot unit with one reserve register per
//     accelerator instance.  The unit raises write enable when its FIFO is
//     not empty and a slot is free.
//   * sender: visits the write enables of the type units in turn
//     (round robin); on a grant it reserves the lowest free slot, pops the
//     FIFO and sends the answer.  Only when no type unit is ready it sends
//     a pending zero reply from the null FIFO.
//   A blocking request whose type FIFO is full, a non-blocking request that
//   cannot be served at once (FIFO not empty or no free slot) and a request
//   for an unknown type all go to the null FIFO.
//
// Interface / timing
//   Agent side of one hibi_wrapper (first-word-fall-through receive,
//   write-enable transmit).  One received word per cycle; the reply to a
//   grant leaves two cycles after the data word at the earliest.  When the
//   null FIFO is full the decoder stalls, which back-pressures HIBI.
//
// Document vs own choice
//   Message format, blocks, blocking/non-blocking/null behaviour, immediate
//   release and sender order follow the thesis.  FIFO depths, the per-type
//   slot table layout (MAX_SLOTS with SLOT_COUNT per type) and the choice of
//   the lowest free slot are own choices.  The default configuration is
//   the video encoder: type 0 = one DQ, type 1 = one ME.
module resource_manager
  import hibi_pkg::*;
#(
  parameter int unsigned       NUM_TYPES  = 2,
  parameter int unsigned       MAX_SLOTS  = 1,
  // instances per type and their HIBI addresses, element [t] / [t][s]
  parameter logic [NUM_TYPES-1:0][7:0]                    SLOT_COUNT = {8'd1, 8'd1},
  parameter logic [NUM_TYPES-1:0][MAX_SLOTS-1:0][DATA_W-1:0] RES_ADDR = {ME_BASE, DQ_BASE},
  parameter int unsigned       TYPE_FIFO_DEPTH = 4,
  parameter int unsigned       NULL_FIFO_DEPTH = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  // HIBI receive bundle
  input  logic [COMM_W-1:0] hibi_comm_in,
  input  logic [DATA_W-1:0] hibi_data_in,
  input  logic              hibi_av_in,
  input  logic              hibi_empty_in,
  output logic              hibi_re_out,
  // HIBI transmit bundle
  output logic [COMM_W-1:0] hibi_comm_out,
  output logic [DATA_W-1:0] hibi_data_out,
  output logic              hibi_av_out,
  output logic              hibi_we_out,
  input  logic              hibi_full_in,
  // status
  output logic [NUM_TYPES-1:0] busy_out   // every slot of the type reserved
);

  localparam int unsigned TW = (NUM_TYPES > 1) ? $clog2(NUM_TYPES) : 1;
  localparam int unsigned SW = (MAX_SLOTS > 1) ? $clog2(MAX_SLOTS) : 1;

  // ---------------------------------------------------------------------
  // address decoder
  typedef enum logic {D_ADDR, D_DATA} dec_state_t;
  dec_state_t dstate;
  logic [6:0] d_type;
  logic       d_release, d_blocking;

  logic                 rx_data_word;
  logic [NUM_TYPES-1:0] tf_push, tf_pop, tf_empty, tf_full, we;
  logic [DATA_W-1:0]    tf_q [NUM_TYPES];
  logic                 nf_push, nf_pop, nf_empty, nf_full;
  logic [DATA_W-1:0]    nf_q;
  logic [MAX_SLOTS-1:0] reserved [NUM_TYPES];
  logic [MAX_SLOTS-1:0] free_slot [NUM_TYPES];

  assign rx_data_word = !hibi_empty_in && !hibi_av_in && dstate == D_DATA;
  wire   type_ok = d_type < 7'(NUM_TYPES);
  wire [TW-1:0] t_idx = TW'(d_type);

  always_comb begin
    tf_push = '0;
    nf_push = 1'b0;
    hibi_re_out = 1'b0;
    if (!hibi_empty_in) begin
      if (hibi_av_in || dstate == D_ADDR) begin
        hibi_re_out = 1'b1;              // address word, or stray data word
      end else if (d_release) begin
        hibi_re_out = 1'b1;              // release: always handled at once
      end else if (type_ok && d_blocking && !tf_full[t_idx]) begin
        tf_push[t_idx] = 1'b1;
        hibi_re_out = 1'b1;
      end else if (type_ok && !d_blocking && tf_empty[t_idx] && |free_slot[t_idx]) begin
        tf_push[t_idx] = 1'b1;
        hibi_re_out = 1'b1;
      end else if (!nf_full) begin
        nf_push = 1'b1;
        hibi_re_out = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dstate     <= D_ADDR;
      d_type     <= '0;
      d_release  <= 1'b0;
      d_blocking <= 1'b0;
    end else if (hibi_re_out) begin
      if (hibi_av_in) begin
        dstate     <= D_DATA;
        d_type     <= hibi_data_in[8:2];
        d_release  <= hibi_data_in[1];
        d_blocking <= hibi_data_in[0];
      end else begin
        dstate <= D_ADDR;               // one data word per address word
      end
    end
  end

  // ---------------------------------------------------------------------
  // type units
  for (genvar t = 0; t < NUM_TYPES; t++) begin : g_type_unit
    sync_fifo #(.WIDTH(DATA_W), .DEPTH(TYPE_FIFO_DEPTH)) u_fifo (
      .clk, .rst_n,
      .wr_en(tf_push[t]), .wr_data(hibi_data_in),
      .rd_en(tf_pop[t]), .rd_data(tf_q[t]),
      .empty(tf_empty[t]), .full(tf_full[t]), .count()
    );
    for (genvar s = 0; s < MAX_SLOTS; s++) begin : g_slot
      assign free_slot[t][s] = (s < int'(SLOT_COUNT[t])) && !reserved[t][s];
    end
    assign we[t]        = !tf_empty[t] && |free_slot[t];
    assign busy_out[t]  = !(|free_slot[t]);
  end

  sync_fifo #(.WIDTH(DATA_W), .DEPTH(NULL_FIFO_DEPTH)) u_null_fifo (
    .clk, .rst_n,
    .wr_en(nf_push), .wr_data(hibi_data_in),
    .rd_en(nf_pop), .rd_data(nf_q),
    .empty(nf_empty), .full(nf_full), .count()
  );

  // ---------------------------------------------------------------------
  // sender
  typedef enum logic [1:0] {S_IDLE, S_ADDR, S_DATA} snd_state_t;
  snd_state_t         sstate;
  logic [TW-1:0]      rr;                  // next type to look at first
  logic               grant;
  logic [TW-1:0]      gnt_type;
  logic [SW-1:0]      gnt_slot;
  logic [DATA_W-1:0]  ret_addr, res_addr;

  always_comb begin
    grant  = 1'b0;
    gnt_type = '0;
    for (int k = NUM_TYPES - 1; k >= 0; k--) begin
      int unsigned t;
      t = (int'(rr) + k) % NUM_TYPES;
      if (we[t]) begin
        grant  = 1'b1;
        gnt_type = TW'(t);
      end
    end
    gnt_slot = '0;
    for (int s = MAX_SLOTS - 1; s >= 0; s--)
      if (free_slot[gnt_type][s]) gnt_slot = SW'(s);
  end

  always_comb begin
    tf_pop = '0;
    nf_pop = 1'b0;
    if (sstate == S_IDLE) begin
      if (grant)          tf_pop[gnt_type] = 1'b1;
      else if (!nf_empty) nf_pop = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sstate   <= S_IDLE;
      rr       <= '0;
      ret_addr <= '0;
      res_addr <= '0;
      for (int t = 0; t < NUM_TYPES; t++) reserved[t] <= '0;
    end else begin
      // release clears the reserve register holding the released address
      if (rx_data_word && d_release && type_ok)
        for (int s = 0; s < MAX_SLOTS; s++)
          if (s < int'(SLOT_COUNT[t_idx]) && RES_ADDR[t_idx][s] == hibi_data_in)
            reserved[t_idx][s] <= 1'b0;
      case (sstate)
        S_IDLE: begin
          if (grant) begin
            reserved[gnt_type][gnt_slot] <= 1'b1;
            ret_addr <= tf_q[gnt_type];
            res_addr <= RES_ADDR[gnt_type][gnt_slot];
            rr       <= TW'((int'(gnt_type) + 1) % NUM_TYPES);
            sstate   <= S_ADDR;
          end else if (!nf_empty) begin
            ret_addr <= nf_q;
            res_addr <= '0;
            sstate   <= S_ADDR;
          end
        end
        S_ADDR: if (!hibi_full_in) sstate <= S_DATA;
        S_DATA: if (!hibi_full_in) sstate <= S_IDLE;
        default: sstate <= S_IDLE;
      endcase
    end
  end

  assign hibi_we_out   = sstate != S_IDLE;
  assign hibi_av_out   = sstate == S_ADDR;
  assign hibi_data_out = (sstate == S_ADDR) ? ret_addr : res_addr;
  assign hibi_comm_out = (sstate != S_IDLE) ? CMD_WR : CMD_IDLE;

  // a slot is never granted twice
  a_no_double_grant: assert property (@(posedge clk) disable iff (!rst_n)
    (sstate == S_IDLE && grant) |-> !reserved[gnt_type][gnt_slot]);

endmodule
