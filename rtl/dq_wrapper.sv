// dq_wrapper: connects the DCT-Q-IQ-IDCT (DQ) accelerator to a HIBI wrapper so
// that any HIBI agent can run it on a whole macroblock.
//
// Operation.  An initiator sends three configuration words and then the 384
// samples of one macroblock (six 8x8 blocks, four luminance then two
// chrominance, 64 samples each, row by row), one sample in the low DCT_W bits
// of each HIBI word.  Address words from HIBI are dropped, so the data may
// arrive in any number of transfers.  The configuration words are:
//   1. HIBI address for the quantized results,
//   2. HIBI address for the IDCT (reconstructed) results,
//   3. control word: bits 4..0 quantization parameter QP, bit 5 intra flag.
// The two addresses go to small FIFOs and the control word to the
// quantization-parameter register, so the next macroblock can be loaded while
// the results of the previous one are still being sent.
//
// Input control unit: a state machine (wait input -> store quantized-result
// address -> store IDCT-result address -> store control word -> forward to
// DQ).  In the forward state a sample is passed to the accelerator whenever
// one is waiting; a column of eight is started only while the accelerator
// shows dct_ready4column.  One cycle after the 64th sample of a block the
// wrapper pulses loadQP with QP, the intra flag and chroma (blocks 4 and 5),
// well inside the 30-cycle limit the accelerator allows.
//
// Result control unit: results are collected in two 64-entry TX FIFOs.  The
// wrapper asks the accelerator for eight values at a time with a one-cycle
// *_ready4column pulse when a FIFO has room for eight and no column is in
// flight.  Per 8x8 block it sends the quantized-result address and the 64
// quantized values, then the IDCT-result address and the 64 IDCT values, all
// sign-extended to 32 bits.  After the sixth quantized block it sends one more
// word to the quantized-result address: the zero checker's flags, bit b set
// when block b has only zero coefficients.
//
// Self-release (USE_SELF_REL=1): as soon as all 384 samples are in the
// accelerator the result control unit sends a release to the resource manager
// (address RM_ADDRESS, data OWN_ADDRESS) ahead of any result word, so the next
// initiator can start loading while these results are still on their way.
//
// Follows the document: the three configuration words and their order, the
// per-block QP forwarding, the two FIFOs and two control units, the zero
// checker and its last word, self-release, the generics and their defaults.
// Own choices: the control-word bit layout, one sample per HIBI word, the
// block-interleaved result order, the FIFO depths and the zero-flag encoding.
module dq_wrapper
  import hibi_pkg::*;
#(
  parameter int unsigned       DATA_W_G     = 32,  // data_width_g
  parameter int unsigned       COMM_W_G     = 3,   // comm_width_g
  parameter int unsigned       DCT_W        = 9,   // dct_width_g
  parameter int unsigned       QUANT_W      = 8,   // quant_width_g
  parameter int unsigned       IDCT_W       = 9,   // idct_width_g
  parameter bit                USE_SELF_REL = 1'b0,
  parameter logic [DATA_W-1:0] OWN_ADDRESS  = DQ_BASE,
  parameter logic [DATA_W-1:0] RM_ADDRESS   = {RM_BASE[31:9], 7'(RM_TYPE_DQ), 2'b10}
) (
  input  logic                clk,
  input  logic                rst_n,
  // HIBI receive bundle
  input  logic [COMM_W_G-1:0] hibi_comm_in,
  input  logic [DATA_W_G-1:0] hibi_data_in,
  input  logic                hibi_av_in,
  input  logic                hibi_empty_in,
  output logic                hibi_re_out,
  // HIBI transmit bundle
  output logic [COMM_W_G-1:0] hibi_comm_out,
  output logic [DATA_W_G-1:0] hibi_data_out,
  output logic                hibi_av_out,
  output logic                hibi_we_out,
  input  logic                hibi_full_in,
  // initial data output to DQ
  output logic [DCT_W-1:0]    data_dct_out,
  output logic                wr_dct_out,
  input  logic                dct_ready4column_in,
  // quantization parameter output
  output logic [4:0]          qp_out,
  output logic                intra_out,
  output logic                chroma_out,
  output logic                loadqp_out,
  // quantized result input
  input  logic [QUANT_W-1:0]  data_quant_in,
  input  logic                wr_quant_in,
  output logic                quant_ready4column_out,
  // IDCT result input
  input  logic [IDCT_W-1:0]   data_idct_in,
  input  logic                wr_idct_in,
  output logic                idct_ready4column_out,
  // activity, for the hardware monitor
  output logic                busy_out,
  output logic                acc_busy_out
);
  localparam int unsigned BLOCKS  = 6;
  localparam int unsigned SAMPLES = 64;
  localparam int unsigned RES_FIFO_DEPTH = 64;

  // ---------------- input control unit ----------------
  typedef enum logic [2:0] {IC_WAIT, IC_IADDR, IC_CTRL, IC_FWD} ic_state_t;
  ic_state_t ic_state;
  logic [8:0] in_cnt;          // samples forwarded in this macroblock
  logic [2:0] col_cnt;         // samples of the current column
  logic [5:0] qp_reg;
  logic       qp_pending;
  logic [2:0] qp_blk;
  logic       rx_data, rx_addr, take;
  logic       qa_full, ia_full, qa_empty, ia_empty, qa_pop;
  logic [DATA_W_G-1:0] qa_head, ia_head;
  logic       rel_set;

  assign rx_addr = !hibi_empty_in && hibi_av_in;
  assign rx_data = !hibi_empty_in && !hibi_av_in;

  always_comb begin
    take = 1'b0;
    unique case (ic_state)
      IC_WAIT:  take = rx_data && !qa_full;
      IC_IADDR: take = rx_data && !ia_full;
      IC_CTRL:  take = rx_data;
      IC_FWD:   take = rx_data && (col_cnt != 0 || dct_ready4column_in);
      default:  take = 1'b0;
    endcase
  end
  assign hibi_re_out = rx_addr || take;

  sync_fifo #(.WIDTH(DATA_W_G), .DEPTH(2)) u_qaddr_fifo (
    .clk, .rst_n, .wr_en(ic_state == IC_WAIT && take), .wr_data(hibi_data_in),
    .rd_en(qa_pop), .rd_data(qa_head), .empty(qa_empty), .full(qa_full), .count());
  sync_fifo #(.WIDTH(DATA_W_G), .DEPTH(2)) u_iaddr_fifo (
    .clk, .rst_n, .wr_en(ic_state == IC_IADDR && take), .wr_data(hibi_data_in),
    .rd_en(qa_pop), .rd_data(ia_head), .empty(ia_empty), .full(ia_full), .count());

  assign rel_set = (ic_state == IC_FWD) && take && (in_cnt == 9'(BLOCKS*SAMPLES - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ic_state     <= IC_WAIT;
      in_cnt       <= '0;
      col_cnt      <= '0;
      qp_reg       <= '0;
      qp_pending   <= 1'b0;
      qp_blk       <= '0;
      data_dct_out <= '0;
      wr_dct_out   <= 1'b0;
      loadqp_out   <= 1'b0;
      qp_out       <= '0;
      intra_out    <= 1'b0;
      chroma_out   <= 1'b0;
    end else begin
      wr_dct_out <= 1'b0;
      loadqp_out <= 1'b0;
      if (qp_pending) begin
        qp_pending <= 1'b0;
        loadqp_out <= 1'b1;
        qp_out     <= qp_reg[4:0];
        intra_out  <= qp_reg[5];
        chroma_out <= (qp_blk >= 3'd4);
      end
      unique case (ic_state)
        IC_WAIT:  if (take) ic_state <= IC_IADDR;
        IC_IADDR: if (take) ic_state <= IC_CTRL;
        IC_CTRL:  if (take) begin
                    qp_reg   <= hibi_data_in[5:0];
                    in_cnt   <= '0;
                    col_cnt  <= '0;
                    ic_state <= IC_FWD;
                  end
        IC_FWD:   if (take) begin
                    data_dct_out <= hibi_data_in[DCT_W-1:0];
                    wr_dct_out   <= 1'b1;
                    col_cnt      <= col_cnt + 1'b1;
                    in_cnt       <= in_cnt + 1'b1;
                    if (in_cnt[5:0] == 6'(SAMPLES - 1)) begin
                      qp_pending <= 1'b1;
                      qp_blk     <= 3'(in_cnt >> 6);
                    end
                    if (in_cnt == 9'(BLOCKS*SAMPLES - 1)) ic_state <= IC_WAIT;
                  end
        default:  ic_state <= IC_WAIT;
      endcase
    end
  end

  // ---------------- result buffers and column requests ----------------
  logic [QUANT_W-1:0] q_head;
  logic [IDCT_W-1:0]  i_head;
  logic q_empty, i_empty, q_pop, i_pop;
  logic [$clog2(RES_FIFO_DEPTH+1)-1:0] q_count, i_count;
  logic [3:0] q_inflight, i_inflight;

  sync_fifo #(.WIDTH(QUANT_W), .DEPTH(RES_FIFO_DEPTH)) u_quant_fifo (
    .clk, .rst_n, .wr_en(wr_quant_in), .wr_data(data_quant_in),
    .rd_en(q_pop), .rd_data(q_head), .empty(q_empty), .full(), .count(q_count));
  sync_fifo #(.WIDTH(IDCT_W), .DEPTH(RES_FIFO_DEPTH)) u_idct_fifo (
    .clk, .rst_n, .wr_en(wr_idct_in), .wr_data(data_idct_in),
    .rd_en(i_pop), .rd_data(i_head), .empty(i_empty), .full(), .count(i_count));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      quant_ready4column_out <= 1'b0;
      idct_ready4column_out  <= 1'b0;
      q_inflight <= '0;
      i_inflight <= '0;
    end else begin
      quant_ready4column_out <= 1'b0;
      idct_ready4column_out  <= 1'b0;
      if (quant_ready4column_out)
        q_inflight <= 4'd8 - 4'(wr_quant_in);
      else begin
        if (wr_quant_in) q_inflight <= q_inflight - 1'b1;
        if (q_inflight == 0 && !wr_quant_in && q_count <= 7'(RES_FIFO_DEPTH - 8))
          quant_ready4column_out <= 1'b1;
      end
      if (idct_ready4column_out)
        i_inflight <= 4'd8 - 4'(wr_idct_in);
      else begin
        if (wr_idct_in) i_inflight <= i_inflight - 1'b1;
        if (i_inflight == 0 && !wr_idct_in && i_count <= 7'(RES_FIFO_DEPTH - 8))
          idct_ready4column_out <= 1'b1;
      end
    end
  end

  // ---------------- zero checker ----------------
  logic [8:0] zq_cnt;
  logic       blk_zero;
  logic [BLOCKS-1:0] zero_vec;
  logic       zf_push, zf_pop, zf_empty;
  logic [BLOCKS-1:0] zf_head, zf_in;

  assign zf_push = wr_quant_in && (zq_cnt == 9'(BLOCKS*SAMPLES - 1));
  always_comb begin
    zf_in = zero_vec;
    zf_in[BLOCKS-1] = blk_zero && (data_quant_in == '0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      zq_cnt   <= '0;
      blk_zero <= 1'b1;
      zero_vec <= '0;
    end else if (wr_quant_in) begin
      if (zq_cnt[5:0] == 6'(SAMPLES - 1)) begin
        zero_vec[zq_cnt[8:6]] <= blk_zero && (data_quant_in == '0);
        blk_zero <= 1'b1;
      end else begin
        blk_zero <= blk_zero && (data_quant_in == '0);
      end
      zq_cnt <= (zq_cnt == 9'(BLOCKS*SAMPLES - 1)) ? '0 : zq_cnt + 1'b1;
    end
  end

  sync_fifo #(.WIDTH(BLOCKS), .DEPTH(2)) u_zero_fifo (
    .clk, .rst_n, .wr_en(zf_push), .wr_data(zf_in),
    .rd_en(zf_pop), .rd_data(zf_head), .empty(zf_empty), .full(), .count());

  // ---------------- result control unit ----------------
  typedef enum logic [2:0] {R_IDLE, R_REL_ADDR, R_REL_DATA, R_Q_ADDR, R_Q_DATA,
                            R_ZERO, R_I_ADDR, R_I_DATA} r_state_t;
  r_state_t r_state;
  logic [5:0] r_cnt;
  logic [2:0] r_blk;
  logic       rel_pending;
  logic       send;

  always_comb begin
    hibi_comm_out = CMD_WR;
    hibi_av_out   = 1'b0;
    hibi_data_out = '0;
    send  = 1'b0;
    q_pop = 1'b0;
    i_pop = 1'b0;
    zf_pop = 1'b0;
    unique case (r_state)
      R_REL_ADDR: begin send = 1'b1; hibi_av_out = 1'b1; hibi_data_out = RM_ADDRESS; end
      R_REL_DATA: begin send = 1'b1; hibi_data_out = OWN_ADDRESS; end
      R_Q_ADDR:   begin send = 1'b1; hibi_av_out = 1'b1; hibi_data_out = qa_head; end
      R_Q_DATA:   begin
                    send = !q_empty;
                    hibi_data_out = DATA_W_G'(signed'(q_head));
                    q_pop = send && !hibi_full_in;
                  end
      R_ZERO:     begin
                    send = !zf_empty;
                    hibi_data_out = DATA_W_G'(zf_head);
                    zf_pop = send && !hibi_full_in;
                  end
      R_I_ADDR:   begin send = 1'b1; hibi_av_out = 1'b1; hibi_data_out = ia_head; end
      R_I_DATA:   begin
                    send = !i_empty;
                    hibi_data_out = DATA_W_G'(signed'(i_head));
                    i_pop = send && !hibi_full_in;
                  end
      default: ;
    endcase
    hibi_we_out = send && !hibi_full_in;
  end

  assign qa_pop = (r_state == R_I_DATA) && i_pop && r_cnt == 6'(SAMPLES - 1)
                  && r_blk == 3'(BLOCKS - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_state     <= R_IDLE;
      r_cnt       <= '0;
      r_blk       <= '0;
      rel_pending <= 1'b0;
    end else begin
      if (rel_set && USE_SELF_REL) rel_pending <= 1'b1;
      unique case (r_state)
        R_IDLE:
          if (rel_pending) r_state <= R_REL_ADDR;
          else if (!q_empty && !qa_empty) r_state <= R_Q_ADDR;
        R_REL_ADDR: if (hibi_we_out) r_state <= R_REL_DATA;
        R_REL_DATA: if (hibi_we_out) begin
                      r_state <= R_IDLE;
                      rel_pending <= 1'b0;
                    end
        R_Q_ADDR: if (hibi_we_out) begin r_state <= R_Q_DATA; r_cnt <= '0; end
        R_Q_DATA: if (hibi_we_out) begin
                    r_cnt <= r_cnt + 1'b1;
                    if (r_cnt == 6'(SAMPLES - 1))
                      r_state <= (r_blk == 3'(BLOCKS - 1)) ? R_ZERO : R_I_ADDR;
                  end
        R_ZERO:   if (hibi_we_out) r_state <= R_I_ADDR;
        R_I_ADDR: if (hibi_we_out) begin r_state <= R_I_DATA; r_cnt <= '0; end
        R_I_DATA: if (hibi_we_out) begin
                    r_cnt <= r_cnt + 1'b1;
                    if (r_cnt == 6'(SAMPLES - 1)) begin
                      if (r_blk == 3'(BLOCKS - 1)) begin
                        r_state <= R_IDLE;
                        r_blk   <= '0;
                      end else begin
                        r_blk   <= r_blk + 1'b1;
                        // a pending self-release goes out between blocks
                        r_state <= rel_pending ? R_REL_ADDR : R_Q_ADDR;
                      end
                    end
                  end
        default: r_state <= R_IDLE;
      endcase
      // returning from a mid-macroblock release resumes with the next block
      if (r_state == R_REL_DATA && hibi_we_out && r_blk != 0) r_state <= R_Q_ADDR;
    end
  end

  // ---------------- activity ----------------
  logic [15:0] fed_ops, done_ops;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fed_ops  <= '0;
      done_ops <= '0;
    end else begin
      if (rel_set) fed_ops <= fed_ops + 1'b1;
      if (qa_pop)  done_ops <= done_ops + 1'b1;
    end
  end
  assign busy_out     = (ic_state != IC_WAIT) || (r_state != R_IDLE) || !qa_empty;
  assign acc_busy_out = (ic_state == IC_FWD) || (fed_ops != done_ops);

  // The control unit never sends an address from an empty address FIFO.
  a_qaddr: assert property (@(posedge clk) disable iff (!rst_n)
                            (r_state == R_Q_ADDR) |-> !qa_empty);
endmodule
