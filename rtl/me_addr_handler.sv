// me_addr_handler: address handler sub-block of the motion-estimation wrapper.
//
// A request to the ME wrapper is three data words: the SDRAM address of the
// current macroblock, the SDRAM address of the top-left corner of the 48x48
// reference area, and the HIBI address the results go to.  A small state
// machine (wait HIBI input -> read macroblock address -> read reference area
// address -> read result address -> wait) stores them in three FIFOs, so a
// second request can wait while the first is served.
//
// The other two sub-blocks send address words through this block: they name
// what they want with sel_*_in and this block drives the value onto addr_out,
// which is ORed into the HIBI output (zero when nothing is selected).  The
// reference area address is added with 0, 4 or 8 words to point at one of the
// three 16-pixel-wide vertical slices; the base address extractor masks off
// the low IP_ADDR_W bits of the current macroblock address, giving the HIBI
// base address of the SDRAM controller for a read-port request.
// pop_req_in drops the two SDRAM addresses (fetch done), pop_res_in the result
// address (results sent).  All outputs are combinational from the FIFO heads.
//
// Follows the document: the three FIFOs, the slice adder with 0/4/8, the base
// address extractor, the zero output and the state machine.  FIFO depth is an
// own choice.
module me_addr_handler
  import me_pkg::*;
#(
  parameter int unsigned IP_ADDR_W  = 22,   // ip_addr_width_g (SDRAM offset bits)
  parameter int unsigned FIFO_DEPTH = 2
) (
  input  logic        clk,
  input  logic        rst_n,
  // data words from HIBI routed to this block
  input  logic [31:0] rx_data_in,
  input  logic        rx_valid_in,
  output logic        rx_re_out,
  // status and control from the other sub-blocks
  output logic        req_valid_out,   // SDRAM addresses of a request are waiting
  output logic        res_valid_out,   // a result return address is waiting
  input  logic        pop_req_in,
  input  logic        pop_res_in,
  input  addr_sel_t   sel_ld_in,       // from the macroblock loader
  input  logic [1:0]  slice_in,        // reference slice 0..2
  input  addr_sel_t   sel_rb_in,       // from the result block
  output logic [31:0] addr_out,
  output logic        busy_out
);
  typedef enum logic [1:0] {WAIT_INPUT, READ_MB, READ_REF, READ_RES} ah_state_t;
  ah_state_t state;

  logic [31:0] cur_head, ref_head, res_head;
  logic cur_empty, ref_empty, res_empty, cur_full, ref_full, res_full;
  logic push_cur, push_ref, push_res;

  assign push_cur = (state == READ_MB)  && rx_valid_in && !cur_full;
  assign push_ref = (state == READ_REF) && rx_valid_in && !ref_full;
  assign push_res = (state == READ_RES) && rx_valid_in && !res_full;
  assign rx_re_out = push_cur || push_ref || push_res;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= WAIT_INPUT;
    else unique case (state)
      WAIT_INPUT: if (rx_valid_in) state <= READ_MB;
      READ_MB:    if (push_cur)    state <= READ_REF;
      READ_REF:   if (push_ref)    state <= READ_RES;
      READ_RES:   if (push_res)    state <= WAIT_INPUT;
      default:    state <= WAIT_INPUT;
    endcase
  end

  sync_fifo #(.WIDTH(32), .DEPTH(FIFO_DEPTH)) u_cur_fifo (
    .clk, .rst_n, .wr_en(push_cur), .wr_data(rx_data_in), .rd_en(pop_req_in),
    .rd_data(cur_head), .empty(cur_empty), .full(cur_full), .count());
  sync_fifo #(.WIDTH(32), .DEPTH(FIFO_DEPTH)) u_ref_fifo (
    .clk, .rst_n, .wr_en(push_ref), .wr_data(rx_data_in), .rd_en(pop_req_in),
    .rd_data(ref_head), .empty(ref_empty), .full(ref_full), .count());
  sync_fifo #(.WIDTH(32), .DEPTH(FIFO_DEPTH)) u_res_fifo (
    .clk, .rst_n, .wr_en(push_res), .wr_data(rx_data_in), .rd_en(pop_res_in),
    .rd_data(res_head), .empty(res_empty), .full(res_full), .count());

  // a request counts once all three of its words are stored
  assign req_valid_out = !cur_empty && !ref_empty && !res_empty;
  assign res_valid_out = !res_empty;
  assign busy_out      = (state != WAIT_INPUT) || !cur_empty || !res_empty;

  function automatic logic [31:0] pick(input addr_sel_t sel, input logic [1:0] slice);
    unique case (sel)
      AS_RESULT:   return res_head;
      AS_CUR:      return cur_head;
      AS_CUR_BASE: return (cur_head >> IP_ADDR_W) << IP_ADDR_W;
      AS_REF:      return ref_head + SLICE_OFS[(slice > 2'd2) ? 2'd2 : slice];
      default:     return 32'd0;
    endcase
  endfunction

  assign addr_out = pick(sel_ld_in, slice_in) | pick(sel_rb_in, 2'd0);
endmodule
