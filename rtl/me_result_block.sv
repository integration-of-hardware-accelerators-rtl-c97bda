// me_result_block: result block of the motion-estimation wrapper.  It takes
// the accelerator's results, sends them to the requester's HIBI address and
// owns the arbiter of the wrapper's shared HIBI output.
//
// Sequence.  When the accelerator raises me_new_result and a result address
// is stored, the block raises me_target_ready and captures the SAD word and
// the motion-vector word (each flagged by its own valid).  It then gets the
// HIBI output, has the address handler send the result address and sends the
// SAD (bits 15..0) and the motion vector (x in bits 15..8, y in 7..0).
//
// Permutation unit.  The best-matching macroblock comes as sixteen 128-bit
// words, one 4x4-pixel block each, blocks in row order, pixels of a block in
// row order with the first pixel in bits 127..120.  Sixteen 32-bit registers
// form a 4x4 matrix; four result words (one 16x4-pixel strip of the
// macroblock) fill its four columns, the first quarter of a word in the top
// register.  Reading the matrix row by row gives the strip's four pixel rows,
// four words each, as the CPU wants them.  The block takes four words with
// me_target_ready, sends the sixteen row words, and repeats for the four
// strips (the accelerator only delivers while me_target_ready is high).
// Finally it pulses me_result_loaded, drops the result address and frees
// the output.
//
// Arbiter: the macroblock loader and this block share the HIBI output.  The
// first to ask keeps it until it drops its request; on a tie this block wins.
//
// Follows the document: the result order, the 16-register permutation matrix
// filled by columns and read by rows, the arbiter rule and priority.  Own
// choices: the SAD/motion-vector bit positions, strip-wise flow control with
// me_target_ready, and the byte order of the words sent (BIG_ENDIAN as in
// the loader).  me_repeat_delivery_out is held at 0 on purpose: the
// accelerator offers repeated delivery for a target that failed to take the
// data, and this block raises me_target_ready only when it has room for a
// whole strip, so it never misses a word and never needs to ask.
module me_result_block
  import me_pkg::*;
#(
  parameter bit BIG_ENDIAN = 1'b0
) (
  input  logic         clk,
  input  logic         rst_n,
  // accelerator result side
  input  logic [127:0] me_data_in,
  input  logic         me_new_result_in,
  input  logic         me_valid_sad_in,
  input  logic         me_valid_mv_in,
  input  logic         me_valid_mb_in,
  output logic         me_target_ready_out,
  output logic         me_repeat_delivery_out,
  output logic         me_result_loaded_out,
  // address handler
  input  logic         res_valid_in,
  output logic         pop_res_out,
  output addr_sel_t    sel_out,
  // HIBI output
  output logic [31:0]  tx_data_out,
  output logic         tx_av_out,
  output logic         tx_we_out,
  input  logic         tx_full_in,
  // HIBI access arbitration with the macroblock loader
  input  logic         ld_req_in,
  output logic         ld_gnt_out,
  output logic         busy_out
);
  typedef enum logic [2:0] {RB_IDLE, RB_SM, RB_ADDR, RB_SAD, RB_MV, RB_FILL,
                            RB_DRAIN, RB_DONE} rb_state_t;
  rb_state_t state;
  logic [15:0] sad;
  logic [15:0] mv;
  logic        got_sad, got_mv;
  logic [31:0] perm [4][4];     // [row][column]
  logic [2:0]  fill;
  logic [3:0]  drain;
  logic [1:0]  strip;
  logic        own_req, own_gnt;

  // ---------------- arbiter ----------------
  typedef enum logic [1:0] {OWN_NONE, OWN_RESULT, OWN_LOADER} owner_t;
  owner_t owner;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) owner <= OWN_NONE;
    else unique case (owner)
      OWN_NONE:   if (own_req) owner <= OWN_RESULT;
                  else if (ld_req_in) owner <= OWN_LOADER;
      OWN_RESULT: if (!own_req) owner <= OWN_NONE;
      OWN_LOADER: if (!ld_req_in) owner <= OWN_NONE;
      default:    owner <= OWN_NONE;
    endcase
  end
  assign own_gnt    = (owner == OWN_RESULT);
  assign ld_gnt_out = (owner == OWN_LOADER);

  // ---------------- control unit ----------------
  assign own_req = (state == RB_ADDR) || (state == RB_SAD) || (state == RB_MV) ||
                   (state == RB_FILL) || (state == RB_DRAIN);
  assign me_target_ready_out = ((state == RB_SM) && !(got_sad && got_mv)) ||
                               ((state == RB_FILL) && fill < 3'd4);
  assign me_repeat_delivery_out = 1'b0;

  logic sending;
  always_comb begin
    sending     = 1'b0;
    tx_av_out   = 1'b0;
    tx_data_out = '0;
    sel_out     = AS_NONE;
    unique case (state)
      RB_ADDR:  begin sending = 1'b1; tx_av_out = 1'b1; sel_out = AS_RESULT; end
      RB_SAD:   begin sending = 1'b1; tx_data_out = {16'd0, sad}; end
      RB_MV:    begin sending = 1'b1; tx_data_out = {16'd0, mv}; end
      RB_DRAIN: begin sending = 1'b1; tx_data_out = bus_to_word(perm[drain[3:2]][drain[1:0]], BIG_ENDIAN); end
      default: ;
    endcase
    if (!own_gnt) begin
      sending     = 1'b0;
      tx_av_out   = 1'b0;
      tx_data_out = '0;
      sel_out     = AS_NONE;
    end
    tx_we_out = sending && !tx_full_in;
  end

  assign pop_res_out = (state == RB_DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= RB_IDLE;
      sad     <= '0;
      mv      <= '0;
      got_sad <= 1'b0;
      got_mv  <= 1'b0;
      fill    <= '0;
      drain   <= '0;
      strip   <= '0;
      me_result_loaded_out <= 1'b0;
      for (int r = 0; r < 4; r++)
        for (int c = 0; c < 4; c++) perm[r][c] <= '0;
    end else begin
      me_result_loaded_out <= 1'b0;
      unique case (state)
        RB_IDLE: if (me_new_result_in && res_valid_in && !me_result_loaded_out) begin
          state   <= RB_SM;
          got_sad <= 1'b0;
          got_mv  <= 1'b0;
        end
        RB_SM: begin
          if (me_valid_sad_in) begin sad <= me_data_in[15:0]; got_sad <= 1'b1; end
          if (me_valid_mv_in)  begin mv  <= me_data_in[15:0]; got_mv  <= 1'b1; end
          if (got_sad && got_mv) state <= RB_ADDR;
        end
        RB_ADDR: if (tx_we_out) state <= RB_SAD;
        RB_SAD:  if (tx_we_out) state <= RB_MV;
        RB_MV:   if (tx_we_out) begin state <= RB_FILL; fill <= '0; strip <= '0; end
        RB_FILL: begin
          if (me_valid_mb_in && fill < 3'd4) begin
            for (int q = 0; q < 4; q++) perm[q][fill[1:0]] <= me_data_in[127-32*q -: 32];
            fill <= fill + 1'b1;
          end
          if (fill == 3'd4) begin state <= RB_DRAIN; drain <= '0; end
        end
        RB_DRAIN: if (tx_we_out) begin
          drain <= drain + 1'b1;
          if (drain == 4'd15) begin
            if (strip == 2'd3) state <= RB_DONE;
            else begin
              strip <= strip + 1'b1;
              fill  <= '0;
              state <= RB_FILL;
            end
          end
        end
        RB_DONE: begin
          me_result_loaded_out <= 1'b1;
          state <= RB_IDLE;
        end
        default: state <= RB_IDLE;
      endcase
    end
  end

  assign busy_out = (state != RB_IDLE);

  // The output is never granted to both sub-blocks.
  a_one_owner: assert property (@(posedge clk) disable iff (!rst_n)
                                !(own_gnt && ld_gnt_out));
endmodule
