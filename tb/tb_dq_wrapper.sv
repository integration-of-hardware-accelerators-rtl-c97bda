// tb_dq_wrapper: self-checking test of the DQ wrapper with the behavioural DQ
// accelerator model.  The HIBI side is driven directly: a queue of words
// stands in for the RX FIFO (empty at random) and the TX side is captured with
// full asserted at random.  Three macroblocks are sent: intra with QP 14,
// inter with QP 5 and one whose small samples quantize to zero in some blocks.
// The expected stream (addresses, 64 quantized and 64 IDCT values per block,
// the zero-check word after the sixth quantized block, one self-release per
// macroblock) is computed here from the same formulas as the model.
// The message format tested is this design's own reading of the wrapper's
// described operation; the expected values are computed here independently
// of the RTL.
module tb_dq_wrapper;
  import hibi_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam logic [31:0] RMADDR = {RM_BASE[31:9], 7'(RM_TYPE_DQ), 2'b10};
  localparam int NMB = 3;

  logic [2:0]  rx_comm, tx_comm;
  logic [31:0] rx_data, tx_data;
  logic        rx_av, rx_empty, rx_re, tx_av, tx_we, tx_full;
  logic [8:0]  d_dct, d_idct; logic wr_dct, rdy_dct;
  logic [4:0]  qp; logic intra, chroma, loadqp;
  logic [7:0]  d_q; logic wr_q, rdy_q, wr_i, rdy_i;
  logic        busy, acc_busy;
  int merr, mblk, mchroma, mintra;

  dq_wrapper #(.USE_SELF_REL(1'b1)) dut (
    .clk, .rst_n,
    .hibi_comm_in(rx_comm), .hibi_data_in(rx_data), .hibi_av_in(rx_av),
    .hibi_empty_in(rx_empty), .hibi_re_out(rx_re),
    .hibi_comm_out(tx_comm), .hibi_data_out(tx_data), .hibi_av_out(tx_av),
    .hibi_we_out(tx_we), .hibi_full_in(tx_full),
    .data_dct_out(d_dct), .wr_dct_out(wr_dct), .dct_ready4column_in(rdy_dct),
    .qp_out(qp), .intra_out(intra), .chroma_out(chroma), .loadqp_out(loadqp),
    .data_quant_in(d_q), .wr_quant_in(wr_q), .quant_ready4column_out(rdy_q),
    .data_idct_in(d_idct), .wr_idct_in(wr_i), .idct_ready4column_out(rdy_i),
    .busy_out(busy), .acc_busy_out(acc_busy));

  dq_accel_model #(.STALL(1'b1)) acc (
    .clk, .rst_n, .data_dct_in(d_dct), .wr_dct_in(wr_dct), .dct_ready4column_out(rdy_dct),
    .QP_in(qp), .intra_in(intra), .chroma_in(chroma), .loadQP_in(loadqp),
    .data_quant_out(d_q), .wr_quant_out(wr_q), .quant_ready4column_in(rdy_q),
    .data_idct_out(d_idct), .wr_idct_out(wr_i), .idct_ready4column_in(rdy_i),
    .errors(merr), .blocks_done(mblk), .chroma_blocks(mchroma), .intra_blocks(mintra));

  // ---- stimulus queue standing in for the RX FIFO ----
  logic [32:0] inq [$];   // {av, data}
  logic gap;
  assign rx_empty = (inq.size() == 0) || gap;
  assign rx_av    = (inq.size() != 0) ? inq[0][32] : 1'b0;
  assign rx_data  = (inq.size() != 0) ? inq[0][31:0] : '0;
  assign rx_comm  = CMD_WR;
  always @(posedge clk) begin
    gap     <= ($urandom_range(0, 7) == 0);
    tx_full <= ($urandom_range(0, 5) == 0);
    if (rx_re && !rx_empty) void'(inq.pop_front());
  end

  // ---- reference model ----
  function automatic logic signed [7:0] quant(input logic signed [8:0] s, input int q, input bit intra_m);
    int a, v;
    a = (s < 0) ? -s : s;
    if (intra_m) v = a / (2*q);
    else         v = (a - q/2 > 0) ? (a - q/2) / (2*q) : 0;
    if (v > 127) v = 127;
    return (s < 0) ? 8'(-v) : 8'(v);
  endfunction
  function automatic logic signed [8:0] rescale(input logic signed [7:0] v, input int q);
    int a, r;
    a = (v < 0) ? -v : v;
    r = (a == 0) ? 0 : 2*q*a + q;
    if (r > 255) r = 255;
    return (v < 0) ? 9'(-r) : 9'(r);
  endfunction

  logic [32:0] expq [$];
  int checks = 0, failures = 0;
  int releases = 0, zero_words_nonzero = 0;
  longint t_first_in, t_last_out;

  task automatic build_mb(input int m, input logic [31:0] qa, input logic [31:0] ia,
                          input int q, input bit intra_m, input int amp);
    logic signed [8:0] s [384];
    logic [5:0] zflags;
    inq.push_back({1'b1, DQ_BASE});
    inq.push_back({1'b0, qa});
    inq.push_back({1'b0, ia});
    inq.push_back({1'b0, 26'd0, intra_m, 5'(q)});
    for (int i = 0; i < 384; i++) begin
      int v;
      v = $urandom_range(0, 2*amp) - amp;
      if (m == 2 && (i / 64) % 2 == 1) v = v * 40;   // odd blocks large, even ones quantize to 0
      if (v > 255) v = 255;
      if (v < -255) v = -255;
      s[i] = 9'(v);
      if (i % 50 == 7) inq.push_back({1'b1, DQ_BASE | 32'(i % 3)});  // transfer restarts
      inq.push_back({1'b0, 23'd0, s[i]});
    end
    zflags = '1;
    for (int b = 0; b < 6; b++) begin
      expq.push_back({1'b1, qa});
      for (int i = 0; i < 64; i++) begin
        logic signed [7:0] v;
        v = quant(s[b*64+i], q, intra_m);
        if (v != 0) zflags[b] = 1'b0;
        expq.push_back({1'b0, 32'(signed'(v))});
      end
      if (b == 5) expq.push_back({1'b0, 26'd0, zflags});
      expq.push_back({1'b1, ia});
      for (int i = 0; i < 64; i++)
        expq.push_back({1'b0, 32'(signed'(rescale(quant(s[b*64+i], q, intra_m), q)))});
    end
  endtask

  // ---- output checking ----
  logic rel_next;
  always @(posedge clk) begin
    if (rst_n && tx_we) begin
      t_last_out <= $time;
      if (tx_av && tx_data == RMADDR) rel_next <= 1'b1;
      else if (rel_next) begin
        rel_next <= 1'b0;
        releases <= releases + 1;
        checks++;
        if (tx_data != DQ_BASE) begin
          failures++;
          $display("FAIL release data %h", tx_data);
        end
      end else begin
        checks++;
        if (expq.size() == 0) begin
          failures++;
          $display("FAIL unexpected word av=%b %h", tx_av, tx_data);
        end else begin
          logic [32:0] e;
          e = expq.pop_front();
          if (e != {tx_av, tx_data}) begin
            failures++;
            if (failures < 10) $display("FAIL got av=%b %h exp av=%b %h", tx_av, tx_data, e[32], e[31:0]);
          end
          if (!e[32] && e[31:6] == 0 && e[5:0] != 0 && e[5:0] != 6'h3f) zero_words_nonzero++;
        end
      end
    end
  end

  initial begin
    rel_next = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    build_mb(0, 32'h0100_1001, 32'h0100_1002, 14, 1'b1, 200);
    build_mb(1, 32'h0100_1201, 32'h0100_1202, 5, 1'b0, 120);
    build_mb(2, 32'h0100_1401, 32'h0100_1402, 20, 1'b1, 3);
    wait (expq.size() == 0 && !busy);
    repeat (20) @(posedge clk);
    checks++; if (merr != 0) begin failures++; $display("FAIL model protocol errors %0d", merr); end
    checks++; if (mblk != 6*NMB) begin failures++; $display("FAIL blocks %0d", mblk); end
    checks++; if (mchroma != 2*NMB) begin failures++; $display("FAIL chroma blocks %0d", mchroma); end
    checks++; if (mintra != 12) begin failures++; $display("FAIL intra blocks %0d", mintra); end
    checks++; if (releases != NMB) begin failures++; $display("FAIL releases %0d", releases); end
    checks++; if (zero_words_nonzero == 0) begin failures++; $display("FAIL no mixed zero-check word"); end
    checks++; if (acc_busy) begin failures++; $display("FAIL accelerator still busy"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL watchdog, %0d words still expected", expq.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
