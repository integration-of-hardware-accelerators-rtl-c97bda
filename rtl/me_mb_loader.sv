// me_mb_loader: macroblock loader sub-block of the motion-estimation wrapper,
// a small DMA controller that fetches the accelerator's input from SDRAM.
//
// Main control unit (wait for requests -> fetch current macroblock -> fetch
// reference area -> activate release signal -> wait): it starts when the
// address handler holds a request and the accelerator asks for a current
// macroblock.  It fetches the 16x16 current macroblock, then, when the
// accelerator asks for the reference area, the three 16-pixel-wide, 48-row
// slices of the 48x48 search area, leaving each state only when the
// accelerator has confirmed the data with *_stored.  Then it drops the SDRAM
// addresses from the address handler and, with USE_SELF_REL, has the HIBI
// access unit send a release to the resource manager.
//
// HIBI access unit, one fetch of a rectangle:
//   1. port request: address word = SDRAM controller base address (from the
//      address handler's base extractor), data word = return address
//      (OWN_ADDRESS with the loader offset);
//   2. the reply is a read-port address, or zero when no port is free, in
//      which case the request is repeated;
//   3. port configuration: address word = port, then source address, width
//      in words (4), height in rows (16 or 48) and height offset = image
//      width in words minus the read width;
//   4. width*height data words follow; every four words (16 pixels, one row)
//      are packed into one 128-bit accelerator word and written with
//      me_valid_cur_out or me_valid_ref_out.
// The unit asks the result block's arbiter for the HIBI output (out_req_out)
// and sends only while out_gnt_in is high.  The image width (pixels) is 176
// (QCIF) after reset and may be changed at run time by a data word sent to
// the wrapper's width offset (cfg_valid_in).
//
// Pixel order: a memory word holds four pixels; BIG_ENDIAN selects whether the
// leftmost pixel is in the high or the low byte.  On the 128-bit bus the
// leftmost pixel occupies bits 127..120.
//
// Follows the document: both state machines' states, the fetch order, the
// port request with retry, the configuration parameters and the height
// offset, the run-time width, the 128-bit packing and the self-release.  The
// exact SDRAM controller message format (return address in the port request,
// height as its own word) and the bus bit order are this design's own.
module me_mb_loader
  import hibi_pkg::*;
  import me_pkg::*;
#(
  parameter bit                USE_SELF_REL = 1'b0,
  parameter logic [DATA_W-1:0] OWN_ADDRESS  = ME_BASE,
  parameter logic [DATA_W-1:0] RM_ADDRESS   = {RM_BASE[31:9], 7'(RM_TYPE_ME), 2'b10},
  parameter bit                BIG_ENDIAN   = 1'b0
) (
  input  logic         clk,
  input  logic         rst_n,
  // HIBI input routed to the loader
  input  logic [31:0]  rx_data_in,
  input  logic         rx_valid_in,    // word for the loader offset
  input  logic         cfg_valid_in,   // word for the image width offset
  output logic         rx_re_out,
  // HIBI output (ORed with the other sub-blocks)
  output logic [31:0]  tx_data_out,
  output logic         tx_av_out,
  output logic         tx_we_out,
  input  logic         tx_full_in,
  output logic         out_req_out,
  input  logic         out_gnt_in,
  // address handler control
  input  logic         req_valid_in,
  output logic         pop_req_out,
  output addr_sel_t    sel_out,
  output logic [1:0]   slice_out,
  // accelerator input side
  output logic [127:0] me_data_out,
  output logic         me_valid_cur_out,
  output logic         me_valid_ref_out,
  input  logic         me_new_cur_mb_in,
  input  logic         me_new_ref_area_in,
  input  logic         me_cur_mb_stored_in,
  input  logic         me_ref_area_stored_in,
  // status
  output logic         busy_out,
  output logic [15:0]  port_retries_out
);
  // ---------------- main control unit ----------------
  typedef enum logic [2:0] {M_WAIT, M_FETCH_CUR, M_FETCH_REF, M_RELEASE} m_state_t;
  m_state_t m_state;
  logic       fetch, fetch_done, rel_req, rel_done;
  logic [1:0] slice;
  logic       stored;

  // ---------------- HIBI access unit ----------------
  typedef enum logic [3:0] {H_IDLE, H_REQ_ADDR, H_REQ_DATA, H_WAIT_PORT, H_CFG_ADDR,
                            H_CFG_SRC, H_CFG_W, H_CFG_H, H_CFG_OFS, H_DATA,
                            H_REL_ADDR, H_REL_DATA} h_state_t;
  h_state_t h_state;
  logic [31:0]  port_reg;
  logic [15:0]  img_width;      // pixels
  logic [1:0]   wcnt;
  logic [5:0]   rows;
  logic [95:0]  row_buf;
  logic         sending;

  assign fetch = ((m_state == M_FETCH_CUR) && me_new_cur_mb_in && !stored) ||
                 ((m_state == M_FETCH_REF) && me_new_ref_area_in && !stored);
  assign rel_req = (m_state == M_RELEASE) && USE_SELF_REL;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m_state <= M_WAIT;
      slice   <= '0;
      stored  <= 1'b0;
    end else begin
      unique case (m_state)
        M_WAIT: if (req_valid_in && me_new_cur_mb_in) begin
          m_state <= M_FETCH_CUR;
          stored  <= 1'b0;
        end
        M_FETCH_CUR: begin
          if (fetch_done) stored <= 1'b1;
          if (stored && me_cur_mb_stored_in) begin
            m_state <= M_FETCH_REF;
            stored  <= 1'b0;
            slice   <= '0;
          end
        end
        M_FETCH_REF: begin
          if (fetch_done) begin
            if (slice == 2'd2) stored <= 1'b1;
            else slice <= slice + 1'b1;
          end
          if (stored && me_ref_area_stored_in) begin
            m_state <= M_RELEASE;
            stored  <= 1'b0;
          end
        end
        M_RELEASE: if (!USE_SELF_REL || rel_done) m_state <= M_WAIT;
        default: m_state <= M_WAIT;
      endcase
    end
  end
  assign pop_req_out = (m_state == M_RELEASE) && (!USE_SELF_REL || rel_done);

  // ---------------- HIBI access unit ----------------
  logic rx_take;
  logic [15:0] width_words;
  assign width_words = img_width >> 2;

  always_comb begin
    sending     = 1'b0;
    tx_av_out   = 1'b0;
    tx_data_out = '0;
    sel_out     = AS_NONE;
    unique case (h_state)
      H_REQ_ADDR: begin sending = 1'b1; tx_av_out = 1'b1; sel_out = AS_CUR_BASE; end
      H_REQ_DATA: begin sending = 1'b1; tx_data_out = OWN_ADDRESS | 32'(ME_OFS_LOADER); end
      H_CFG_ADDR: begin sending = 1'b1; tx_av_out = 1'b1; tx_data_out = port_reg; end
      H_CFG_SRC:  begin
                    sending = 1'b1;
                    sel_out = (m_state == M_FETCH_CUR) ? AS_CUR : AS_REF;
                  end
      H_CFG_W:    begin sending = 1'b1; tx_data_out = 32'(MB_WORDS_PER_ROW); end
      H_CFG_H:    begin
                    sending = 1'b1;
                    tx_data_out = (m_state == M_FETCH_CUR) ? 32'(MB_ROWS) : 32'(REF_ROWS);
                  end
      H_CFG_OFS:  begin sending = 1'b1; tx_data_out = 32'(width_words) - 32'(MB_WORDS_PER_ROW); end
      H_REL_ADDR: begin sending = 1'b1; tx_av_out = 1'b1; tx_data_out = RM_ADDRESS; end
      H_REL_DATA: begin sending = 1'b1; tx_data_out = OWN_ADDRESS; end
      default: ;
    endcase
    if (!out_gnt_in) begin
      tx_av_out   = 1'b0;
      tx_data_out = '0;
      sel_out     = AS_NONE;
    end
    tx_we_out = sending && out_gnt_in && !tx_full_in;
  end
  assign out_req_out = sending;
  assign slice_out   = slice;

  assign rx_take   = ((h_state == H_WAIT_PORT) || (h_state == H_DATA)) && rx_valid_in;
  assign rx_re_out = rx_take || cfg_valid_in;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      h_state          <= H_IDLE;
      port_reg         <= '0;
      img_width        <= 16'(QCIF_WIDTH);
      wcnt             <= '0;
      rows             <= '0;
      row_buf          <= '0;
      me_data_out      <= '0;
      me_valid_cur_out <= 1'b0;
      me_valid_ref_out <= 1'b0;
      fetch_done       <= 1'b0;
      rel_done         <= 1'b0;
      port_retries_out <= '0;
    end else begin
      me_valid_cur_out <= 1'b0;
      me_valid_ref_out <= 1'b0;
      fetch_done       <= 1'b0;
      rel_done         <= 1'b0;
      if (cfg_valid_in) img_width <= rx_data_in[15:0];
      unique case (h_state)
        H_IDLE: if (rel_req && !rel_done) h_state <= H_REL_ADDR;
                else if (fetch && !fetch_done) h_state <= H_REQ_ADDR;
        H_REQ_ADDR: if (tx_we_out) h_state <= H_REQ_DATA;
        H_REQ_DATA: if (tx_we_out) h_state <= H_WAIT_PORT;
        H_WAIT_PORT: if (rx_take) begin
          if (rx_data_in == '0) begin
            h_state          <= H_REQ_ADDR;     // no free port: ask again
            port_retries_out <= port_retries_out + 1'b1;
          end else begin
            port_reg <= rx_data_in;
            h_state  <= H_CFG_ADDR;
          end
        end
        H_CFG_ADDR: if (tx_we_out) h_state <= H_CFG_SRC;
        H_CFG_SRC:  if (tx_we_out) h_state <= H_CFG_W;
        H_CFG_W:    if (tx_we_out) h_state <= H_CFG_H;
        H_CFG_H:    if (tx_we_out) h_state <= H_CFG_OFS;
        H_CFG_OFS:  if (tx_we_out) begin
                      h_state <= H_DATA;
                      wcnt    <= '0;
                      rows    <= '0;
                    end
        H_DATA: if (rx_take) begin
          wcnt <= wcnt + 1'b1;
          if (wcnt == 2'd3) begin
            me_data_out <= {row_buf, word_to_bus(rx_data_in, BIG_ENDIAN)};
            if (m_state == M_FETCH_CUR) me_valid_cur_out <= 1'b1;
            else                        me_valid_ref_out <= 1'b1;
            rows <= rows + 1'b1;
            if (rows == ((m_state == M_FETCH_CUR) ? 6'(MB_ROWS - 1) : 6'(REF_ROWS - 1))) begin
              h_state    <= H_IDLE;
              fetch_done <= 1'b1;
            end
          end else begin
            row_buf <= {row_buf[63:0], word_to_bus(rx_data_in, BIG_ENDIAN)};
          end
        end
        H_REL_ADDR: if (tx_we_out) h_state <= H_REL_DATA;
        H_REL_DATA: if (tx_we_out) begin
                      h_state  <= H_IDLE;
                      rel_done <= 1'b1;
                    end
        default: h_state <= H_IDLE;
      endcase
    end
  end

  assign busy_out = (m_state != M_WAIT) || (h_state != H_IDLE);
endmodule
