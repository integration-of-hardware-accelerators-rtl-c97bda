// dq_accel_model: behavioural stand-in for the DCT-Q-IQ-IDCT accelerator, with
// the accelerator's port list.  It is not the accelerator: the transform is
// the identity, so the "quantized" output of a sample s is the H.263-style
// quantization of s itself and the "IDCT" output is its rescaling:
//   q = sign(s) * |s| / (2*QP)                 (intra)
//   q = sign(s) * max(|s| - QP/2, 0) / (2*QP)  (inter)
//   r = sign(q) * (2*QP*|q| + QP)  for q != 0, else 0, clipped to 9 bits
// This is enough to test a wrapper: values, order, per-block parameters and
// the zero checker are all visible in the results.
// Handshakes: dct_ready4column_out is high while a column of eight may start;
// it drops at the first sample of the column and rises again after the
// eighth.  loadQP_in must come within 30 cycles after a block's last sample,
// otherwise an error is counted.  Each *_ready4column_in pulse grants eight
// result values, which are written one per cycle when available.  With
// STALL=1 the model withholds dct_ready4column_out at random.
// The port names and the order of the handshakes follow the accelerator's
// described interface; its cycle timing and the identity transform are this
// model's own simplifications, not the real core.
module dq_accel_model #(
  parameter bit STALL = 1'b0
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [8:0] data_dct_in,
  input  logic       wr_dct_in,
  output logic       dct_ready4column_out,
  input  logic [4:0] QP_in,
  input  logic       intra_in,
  input  logic       chroma_in,
  input  logic       loadQP_in,
  output logic [7:0] data_quant_out,
  output logic       wr_quant_out,
  input  logic       quant_ready4column_in,
  output logic [8:0] data_idct_out,
  output logic       wr_idct_out,
  input  logic       idct_ready4column_in,
  output int         errors,
  output int         blocks_done,
  output int         chroma_blocks,
  output int         intra_blocks
);
  logic signed [8:0] blk [64];
  int in_cnt, col_cnt, wait_qp;
  logic stall;
  logic [7:0] qq [$];
  logic [8:0] iq [$];
  int qcred, icred;

  function automatic logic signed [7:0] quant(input logic signed [8:0] s, input int qp, input bit intra);
    int a, q;
    a = (s < 0) ? -s : s;
    if (intra) q = a / (2*qp);
    else       q = (a - qp/2 > 0) ? (a - qp/2) / (2*qp) : 0;
    if (q > 127) q = 127;
    return (s < 0) ? 8'(-q) : 8'(q);
  endfunction

  function automatic logic signed [8:0] rescale(input logic signed [7:0] q, input int qp);
    int a, r;
    a = (q < 0) ? -q : q;
    r = (a == 0) ? 0 : 2*qp*a + qp;
    if (r > 255) r = 255;
    return (q < 0) ? 9'(-r) : 9'(r);
  endfunction

  assign dct_ready4column_out = rst_n && col_cnt == 0 && in_cnt < 64 && wait_qp < 0 && !stall;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_cnt <= 0; col_cnt <= 0; wait_qp <= -1; stall <= 1'b0;
      errors <= 0; blocks_done <= 0; chroma_blocks <= 0; intra_blocks <= 0;
      qcred <= 0; icred <= 0;
      wr_quant_out <= 1'b0; wr_idct_out <= 1'b0;
      data_quant_out <= '0; data_idct_out <= '0;
      qq.delete(); iq.delete();
    end else begin
      stall <= STALL ? ($urandom_range(0, 3) == 0) : 1'b0;
      if (wr_dct_in) begin
        if (in_cnt >= 64 || wait_qp >= 0) errors <= errors + 1;
        else begin
          blk[in_cnt] <= data_dct_in;
          in_cnt  <= in_cnt + 1;
          col_cnt <= (col_cnt == 7) ? 0 : col_cnt + 1;
          if (in_cnt == 63) wait_qp <= 0;
        end
      end
      if (wait_qp >= 0 && !loadQP_in) begin
        wait_qp <= wait_qp + 1;
        if (wait_qp == 30) errors <= errors + 1;
      end
      if (loadQP_in) begin
        if (wait_qp < 0 || QP_in == 0) errors <= errors + 1;
        else begin
          for (int i = 0; i < 64; i++) begin
            qq.push_back(quant(blk[i], int'(QP_in), intra_in));
            iq.push_back(rescale(quant(blk[i], int'(QP_in), intra_in), int'(QP_in)));
          end
          blocks_done <= blocks_done + 1;
          if (chroma_in) chroma_blocks <= chroma_blocks + 1;
          if (intra_in)  intra_blocks <= intra_blocks + 1;
        end
        wait_qp <= -1;
        in_cnt  <= 0;
      end
      // results
      wr_quant_out <= 1'b0;
      wr_idct_out  <= 1'b0;
      begin
        int qc, ic;
        qc = qcred + (quant_ready4column_in ? 8 : 0);
        ic = icred + (idct_ready4column_in ? 8 : 0);
        if (qc > 0 && qq.size() > 0) begin
          data_quant_out <= qq.pop_front();
          wr_quant_out   <= 1'b1;
          qc--;
        end
        if (ic > 0 && iq.size() > 0 && iq.size() > qq.size()) begin
          data_idct_out <= iq.pop_front();
          wr_idct_out   <= 1'b1;
          ic--;
        end
        qcred <= qc;
        icred <= ic;
      end
    end
  end
endmodule
