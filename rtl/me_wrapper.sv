// me_wrapper: connects the motion-estimation accelerator to a HIBI wrapper.
// An initiator sends one three-word request to offset 0 of the wrapper's HIBI
// address: SDRAM address of the current macroblock, SDRAM address of the
// top-left corner of the 48x48 reference area, and the HIBI address for the
// results.  The wrapper fetches the data from the SDRAM controller itself,
// runs the accelerator and sends back to the result address, in one transfer,
// the SAD word, the motion-vector word and the best-matching macroblock as 64
// words in pixel-row order (four pixels per word).  With USE_SELF_REL it sends
// a release to the resource manager as soon as the input has been loaded.
//
// Structure: address handler (stores the request), macroblock loader (SDRAM
// protocol and feeding of the accelerator) and result block (permutation,
// result sending, HIBI output arbiter).  This level reads address words from
// HIBI and routes the data words after them by the address offset: offset 0
// to the address handler, offset 1 (SDRAM replies and pixel data) to the
// macroblock loader, offset 2 (image width in pixels) to the loader's width
// register.  The sub-blocks' outputs are ORed onto the HIBI output; an idle
// sub-block drives zeros.
//
// Follows the document: the three sub-blocks, routing by address offset, the
// ORed output, the generics (data and command widths are fixed at 32 and 3
// by the shared package; ip_addr_width_g is IP_ADDR_W).  The offset values are
// this design's own.
module me_wrapper
  import hibi_pkg::*;
  import me_pkg::*;
#(
  parameter int unsigned       IP_ADDR_W    = SDRAM_OFS_W,
  parameter bit                USE_SELF_REL = 1'b0,
  parameter logic [DATA_W-1:0] OWN_ADDRESS  = ME_BASE,
  parameter logic [DATA_W-1:0] RM_ADDRESS   = {RM_BASE[31:9], 7'(RM_TYPE_ME), 2'b10},
  parameter bit                BIG_ENDIAN   = 1'b0
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
  // accelerator: input data
  output logic [127:0]      me_data_out,
  output logic              me_valid_ref_data_out,
  output logic              me_valid_cur_data_out,
  input  logic              me_new_ref_area_in,
  input  logic              me_new_cur_mb_in,
  input  logic              me_ref_area_stored_in,
  input  logic              me_cur_mb_stored_in,
  // accelerator: results
  input  logic [127:0]      me_data_in,
  input  logic              me_new_result_in,
  input  logic              me_valid_sad_in,
  input  logic              me_valid_mv_in,
  input  logic              me_valid_mb_in,
  output logic              me_target_ready_out,
  output logic              me_repeat_delivery_out,
  output logic              me_result_loaded_out,
  // activity and statistics
  output logic              busy_out,
  output logic              acc_busy_out,
  output logic [15:0]       port_retries_out
);
  logic [IP_OFS_W-1:0] route;
  logic rx_word, ah_valid, ld_valid, cfg_valid, drop;
  logic ah_re, ld_re;

  assign rx_word   = !hibi_empty_in && !hibi_av_in;
  assign ah_valid  = rx_word && route == ME_OFS_REQ;
  assign ld_valid  = rx_word && route == ME_OFS_LOADER;
  assign cfg_valid = rx_word && route == ME_OFS_WIDTH;
  assign drop      = rx_word && !(route inside {ME_OFS_REQ, ME_OFS_LOADER, ME_OFS_WIDTH});
  assign hibi_re_out = (!hibi_empty_in && hibi_av_in) || ah_re || ld_re || drop;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) route <= ME_OFS_REQ;
    else if (!hibi_empty_in && hibi_av_in) route <= hibi_data_in[IP_OFS_W-1:0];
  end

  logic        req_valid, res_valid, pop_req, pop_res;
  addr_sel_t   sel_ld, sel_rb;
  logic [1:0]  slice;
  logic [31:0] ah_addr, ld_data, rb_data;
  logic        ld_av, ld_we, rb_av, rb_we, ld_req, ld_gnt;
  logic        ah_busy, ld_busy, rb_busy;

  me_addr_handler #(.IP_ADDR_W(IP_ADDR_W)) u_addr_handler (
    .clk, .rst_n,
    .rx_data_in(hibi_data_in), .rx_valid_in(ah_valid), .rx_re_out(ah_re),
    .req_valid_out(req_valid), .res_valid_out(res_valid),
    .pop_req_in(pop_req), .pop_res_in(pop_res),
    .sel_ld_in(sel_ld), .slice_in(slice), .sel_rb_in(sel_rb),
    .addr_out(ah_addr), .busy_out(ah_busy));

  me_mb_loader #(.USE_SELF_REL(USE_SELF_REL), .OWN_ADDRESS(OWN_ADDRESS),
                 .RM_ADDRESS(RM_ADDRESS), .BIG_ENDIAN(BIG_ENDIAN)) u_mb_loader (
    .clk, .rst_n,
    .rx_data_in(hibi_data_in), .rx_valid_in(ld_valid), .cfg_valid_in(cfg_valid),
    .rx_re_out(ld_re),
    .tx_data_out(ld_data), .tx_av_out(ld_av), .tx_we_out(ld_we), .tx_full_in(hibi_full_in),
    .out_req_out(ld_req), .out_gnt_in(ld_gnt),
    .req_valid_in(req_valid), .pop_req_out(pop_req), .sel_out(sel_ld), .slice_out(slice),
    .me_data_out, .me_valid_cur_out(me_valid_cur_data_out),
    .me_valid_ref_out(me_valid_ref_data_out),
    .me_new_cur_mb_in, .me_new_ref_area_in, .me_cur_mb_stored_in, .me_ref_area_stored_in,
    .busy_out(ld_busy), .port_retries_out);

  me_result_block #(.BIG_ENDIAN(BIG_ENDIAN)) u_result_block (
    .clk, .rst_n,
    .me_data_in, .me_new_result_in, .me_valid_sad_in, .me_valid_mv_in, .me_valid_mb_in,
    .me_target_ready_out, .me_repeat_delivery_out, .me_result_loaded_out,
    .res_valid_in(res_valid), .pop_res_out(pop_res), .sel_out(sel_rb),
    .tx_data_out(rb_data), .tx_av_out(rb_av), .tx_we_out(rb_we), .tx_full_in(hibi_full_in),
    .ld_req_in(ld_req), .ld_gnt_out(ld_gnt), .busy_out(rb_busy));

  assign hibi_data_out = ah_addr | ld_data | rb_data;
  assign hibi_av_out   = ld_av | rb_av;
  assign hibi_we_out   = ld_we | rb_we;
  assign hibi_comm_out = CMD_WR;

  // accelerator busy: from the first input row to the end of its results
  logic acc_busy;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) acc_busy <= 1'b0;
    else if (me_valid_cur_data_out) acc_busy <= 1'b1;
    else if (me_result_loaded_out) acc_busy <= 1'b0;
  end
  assign acc_busy_out = acc_busy;
  assign busy_out     = ah_busy || ld_busy || rb_busy;

  logic unused;
  assign unused = ^hibi_comm_in;
endmodule
