// tb_video_encoder_soc: end-to-end test of the accelerated video encoder
// interconnect at its default size (master + two slave CPU ports, SDRAM
// controller port, RM, ME wrapper, hardware monitor, DQ wrapper).
//
// Stand-ins: cpu_bfm on every CPU port, sdram_ctrl_model (refuses the first
// read-port request, frame memory), me_accel_model and dq_accel_model on the
// accelerator ports.
//
// Scenario (the accelerated per-macroblock flow of the thesis):
//   master  : clears and starts the monitor; while slave 1 holds the ME it
//             makes a non-blocking ME request (expects the zero reply);
//             at the end stops the monitor and asks for a report.
//   slave k : blocking ME request to the RM (slave 2 has to wait in the RM
//             queue), ME request for one QCIF macroblock, checks SAD, motion
//             vector and the 64 best-match words against a full search
//             computed here, releases the ME; then a non-blocking DQ request
//             (blocking retry if refused), one macroblock to the DQ (slave 1
//             intra QP 14, slave 2 inter QP 5 with some all-zero blocks),
//             checks the 2 x 384 results and the zero-check word, releases
//             the DQ.
// Mechanism counters (each must be non-zero): RM grants, blocking waits,
// null replies, releases, SDRAM port retries, ME operations, DQ blocks,
// chroma blocks, intra and inter blocks, mixed zero-check words, HIBI
// arbitration contention, monitor reports.  The monitor counters must equal
// the busy cycles counted here.
module tb_video_encoder_soc;
  import hibi_pkg::*;
  logic clk = 0, rst_n = 0;
  always #10 clk = ~clk;   // 50 MHz

  localparam int NS = 2;           // slaves, as the DUT default
  localparam int NC = NS + 1;
  localparam logic [31:0] FRAME = 32'h0001_0000;
  localparam logic [31:0] REFF  = 32'h0002_0000;
  localparam int WW = 176 / 4;     // QCIF row in words

  logic [NC-1:0][2:0]  c_comm_w, c_comm_r;
  logic [NC-1:0][31:0] c_data_w, c_data_r;
  logic [NC-1:0]       c_av_w, c_we, c_full, c_av_r, c_empty, c_re;
  logic [2:0]  s_comm_w, s_comm_r; logic [31:0] s_data_w, s_data_r;
  logic        s_av_w, s_we, s_full, s_av_r, s_empty, s_re;

  logic [8:0] d_dct, d_idct; logic wr_dct, rdy_dct;
  logic [4:0] qp; logic intra, chroma, loadqp;
  logic [7:0] d_q; logic wr_q, rdy_q, wr_i, rdy_i;
  logic [127:0] me_d_to_acc, me_d_from_acc;
  logic v_ref, v_cur, new_ref, new_cur, ref_st, cur_st, new_res, v_sad, v_mv, v_mb;
  logic t_rdy, rep, loaded;
  logic [1:0] rm_busy; logic mon_running; logic [15:0] retries;

  video_encoder_soc dut (
    .clk, .rst_n,
    .cpu_comm_in(c_comm_w), .cpu_data_in(c_data_w), .cpu_av_in(c_av_w), .cpu_we_in(c_we),
    .cpu_full_out(c_full), .cpu_comm_out(c_comm_r), .cpu_data_out(c_data_r),
    .cpu_av_out(c_av_r), .cpu_empty_out(c_empty), .cpu_re_in(c_re),
    .sdram_comm_in(s_comm_w), .sdram_data_in(s_data_w), .sdram_av_in(s_av_w),
    .sdram_we_in(s_we), .sdram_full_out(s_full), .sdram_comm_out(s_comm_r),
    .sdram_data_out(s_data_r), .sdram_av_out(s_av_r), .sdram_empty_out(s_empty),
    .sdram_re_in(s_re),
    .dq_data_dct_out(d_dct), .dq_wr_dct_out(wr_dct), .dq_dct_ready4column_in(rdy_dct),
    .dq_qp_out(qp), .dq_intra_out(intra), .dq_chroma_out(chroma), .dq_loadqp_out(loadqp),
    .dq_data_quant_in(d_q), .dq_wr_quant_in(wr_q), .dq_quant_ready4column_out(rdy_q),
    .dq_data_idct_in(d_idct), .dq_wr_idct_in(wr_i), .dq_idct_ready4column_out(rdy_i),
    .me_data_out(me_d_to_acc), .me_valid_ref_data_out(v_ref), .me_valid_cur_data_out(v_cur),
    .me_new_ref_area_in(new_ref), .me_new_cur_mb_in(new_cur),
    .me_ref_area_stored_in(ref_st), .me_cur_mb_stored_in(cur_st),
    .me_data_in(me_d_from_acc), .me_new_result_in(new_res), .me_valid_sad_in(v_sad),
    .me_valid_mv_in(v_mv), .me_valid_mb_in(v_mb), .me_target_ready_out(t_rdy),
    .me_repeat_delivery_out(rep), .me_result_loaded_out(loaded),
    .rm_busy_out(rm_busy), .monitor_running_out(mon_running), .me_port_retries_out(retries));

  int refusals, reads, ops, merr, dq_err, dq_blk, dq_chroma, dq_intra;

  sdram_ctrl_model #(.REFUSE(1)) u_sdram (.clk, .rst_n,
    .agent_comm_out(s_comm_w), .agent_data_out(s_data_w), .agent_av_out(s_av_w),
    .agent_we_out(s_we), .agent_full_in(s_full),
    .agent_comm_in(s_comm_r), .agent_data_in(s_data_r), .agent_av_in(s_av_r),
    .agent_empty_in(s_empty), .agent_re_out(s_re),
    .refusals(refusals), .reads_served(reads));

  me_accel_model u_me (.clk, .rst_n,
    .me_data_in(me_d_to_acc), .ctrl_valid_ref_data_in(v_ref), .ctrl_valid_cur_data_in(v_cur),
    .ctrl_new_ref_area_out(new_ref), .ctrl_new_cur_mb_out(new_cur),
    .ctrl_ref_area_stored_out(ref_st), .ctrl_cur_mb_stored_out(cur_st),
    .me_data_out(me_d_from_acc), .ctrl_new_result_out(new_res), .ctrl_valid_sad_out(v_sad),
    .ctrl_valid_mv_out(v_mv), .ctrl_valid_mb_out(v_mb), .ctrl_target_ready_in(t_rdy),
    .ctrl_repeat_delivery_in(rep), .ctrl_result_loaded_in(loaded),
    .ops_done(ops), .errors(merr));

  dq_accel_model #(.STALL(1'b1)) u_dq (.clk, .rst_n,
    .data_dct_in(d_dct), .wr_dct_in(wr_dct), .dct_ready4column_out(rdy_dct),
    .QP_in(qp), .intra_in(intra), .chroma_in(chroma), .loadQP_in(loadqp),
    .data_quant_out(d_q), .wr_quant_out(wr_q), .quant_ready4column_in(rdy_q),
    .data_idct_out(d_idct), .wr_idct_out(wr_i), .idct_ready4column_in(rdy_i),
    .errors(dq_err), .blocks_done(dq_blk), .chroma_blocks(dq_chroma), .intra_blocks(dq_intra));

  // ---------------- shared reference functions ----------------
  function automatic logic [7:0] pix(input int x, input int y);
    return u_sdram.mem_pixel(FRAME + 32'(y * WW + x / 4), x % 4);
  endfunction
  function automatic logic [7:0] rpix(input int x, input int y);
    return pix(x + 2, y + 3);    // reference = current frame moved by (2,3)
  endfunction
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

  int checks = 0, failures = 0;
  int n_grant = 0, n_block_wait = 0, n_null = 0, n_release = 0, n_mixed_zero = 0;
  int n_me_ok = 0, n_dq_ok = 0, n_report = 0, n_contention = 0, n_bus_full = 0;
  int cyc = 0;
  int busy_cnt [4] = '{0, 0, 0, 0};
  logic me_holder_active = 0;   // slave 1 holds the ME

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 12) $display("FAIL %s", what);
    end
  endtask

  // ---------------- per-CPU behaviour ----------------
  for (genvar k = 0; k < NC; k++) begin : g_cpu
    cpu_bfm u_bfm (.clk, .rst_n,
      .agent_comm_out(c_comm_w[k]), .agent_data_out(c_data_w[k]), .agent_av_out(c_av_w[k]),
      .agent_we_out(c_we[k]), .agent_full_in(c_full[k]),
      .agent_comm_in(c_comm_r[k]), .agent_data_in(c_data_r[k]), .agent_av_in(c_av_r[k]),
      .agent_empty_in(c_empty[k]), .agent_re_out(c_re[k]));
  end

  function automatic logic [31:0] my(input int k);
    return CPU_BASE + 32'(k) * 32'h200;
  endfunction
  task automatic bput(input int k, input logic av, input logic [31:0] d);
    case (k)
      0: g_cpu[0].u_bfm.put(av, d);
      1: g_cpu[1].u_bfm.put(av, d);
      default: g_cpu[2].u_bfm.put(av, d);
    endcase
  endtask
  // next data word received by CPU k and the address it was sent to
  task automatic next_word(input int k, output logic [31:0] a, output logic [31:0] d);
    case (k)
      0: g_cpu[0].u_bfm.take_word(a, d);
      1: g_cpu[1].u_bfm.take_word(a, d);
      default: g_cpu[2].u_bfm.take_word(a, d);
    endcase
  endtask

  task automatic rm_request(input int k, input int typ, input bit blocking, output logic [31:0] res);
    logic [31:0] a;
    int t0;
    t0 = cyc;
    bput(k, 1'b1, rm_addr(RM_BASE, typ, 1'b0, blocking));
    bput(k, 1'b0, my(k));
    next_word(k, a, res);
    check(a == my(k), "RM reply address");
    if (res != 0) n_grant++;
    else n_null++;
    if (blocking && cyc - t0 > 200) n_block_wait++;
  endtask

  task automatic rm_release(input int k, input int typ, input logic [31:0] res);
    bput(k, 1'b1, rm_addr(RM_BASE, typ, 1'b1, 1'b0));
    bput(k, 1'b0, res);
  endtask

  task automatic me_op(input int k, input int cx, input int cy);
    int best, bx, by;
    logic [31:0] a, d;
    bput(k, 1'b1, ME_BASE | 32'(ME_OFS_REQ));
    bput(k, 1'b0, FRAME + 32'(cy * WW + cx / 4));
    bput(k, 1'b0, REFF + 32'((cy - 16) * WW + (cx - 16) / 4));
    bput(k, 1'b0, my(k) | 32'h10);
    best = 1 << 30; bx = 0; by = 0;
    for (int y = 0; y <= 32; y++)
      for (int x = 0; x <= 32; x++) begin
        int s;
        s = 0;
        for (int r = 0; r < 16; r++)
          for (int c = 0; c < 16; c++) begin
            int df;
            df = int'(rpix(cx - 16 + x + c, cy - 16 + y + r)) - int'(pix(cx + c, cy + r));
            s += (df < 0) ? -df : df;
          end
        if (s < best) begin best = s; bx = x; by = y; end
      end
    next_word(k, a, d);
    check(a == (my(k) | 32'h10) && d == 32'(best), $sformatf("ME SAD %0d exp %0d", d, best));
    next_word(k, a, d);
    check(d == {16'd0, 8'(bx - 16), 8'(by - 16)}, $sformatf("ME MV %h", d));
    for (int r = 0; r < 16; r++)
      for (int w = 0; w < 4; w++) begin
        logic [31:0] e;
        for (int j = 0; j < 4; j++)
          e[8*j +: 8] = rpix(cx - 16 + bx + 4*w + j, cy - 16 + by + r);
        next_word(k, a, d);
        check(d == e, $sformatf("ME best-match row %0d word %0d", r, w));
      end
    n_me_ok++;
  endtask

  task automatic dq_op(input int k, input int q, input bit intra_m, input bit mixed);
    logic signed [8:0] s [384];
    logic [5:0] zflags;
    logic [31:0] a, d;
    bput(k, 1'b1, DQ_BASE);
    bput(k, 1'b0, my(k) | 32'h20);
    bput(k, 1'b0, my(k) | 32'h30);
    bput(k, 1'b0, {26'd0, intra_m, 5'(q)});
    for (int i = 0; i < 384; i++) begin
      int v;
      v = mixed ? (((i / 64) % 2 == 1) ? $urandom_range(0, 400) - 200 : $urandom_range(0, 4) - 2)
                : $urandom_range(0, 500) - 250;
      s[i] = 9'(v);
      bput(k, 1'b0, 32'(signed'(s[i])));
    end
    zflags = '1;
    for (int b = 0; b < 6; b++) begin
      for (int i = 0; i < 64; i++) begin
        logic signed [7:0] v;
        v = quant(s[b*64+i], q, intra_m);
        if (v != 0) zflags[b] = 1'b0;
        next_word(k, a, d);
        check(a == (my(k) | 32'h20) && d == 32'(signed'(v)), $sformatf("DQ quant blk %0d i %0d", b, i));
      end
      if (b == 5) begin
        next_word(k, a, d);
        check(d == {26'd0, zflags}, $sformatf("DQ zero word %h exp %h", d, zflags));
        if (zflags != 0 && zflags != '1) n_mixed_zero++;
      end
      for (int i = 0; i < 64; i++) begin
        next_word(k, a, d);
        check(a == (my(k) | 32'h30) &&
              d == 32'(signed'(rescale(quant(s[b*64+i], q, intra_m), q))),
              $sformatf("DQ idct blk %0d i %0d", b, i));
      end
    end
    n_dq_ok++;
  endtask

  task automatic slave_run(input int k, input int cx, input int cy, input int q, input bit intra_m,
                           input bit mixed);
    logic [31:0] res;
    rm_request(k, RM_TYPE_ME, 1'b1, res);
    check(res == ME_BASE, "ME grant address");
    if (k == 1) me_holder_active = 1;
    me_op(k, cx, cy);
    if (k == 1) me_holder_active = 0;
    rm_release(k, RM_TYPE_ME, res);
    n_release++;
    rm_request(k, RM_TYPE_DQ, 1'b0, res);
    if (res == 0) rm_request(k, RM_TYPE_DQ, 1'b1, res);
    check(res == DQ_BASE, "DQ grant address");
    dq_op(k, q, intra_m, mixed);
    rm_release(k, RM_TYPE_DQ, res);
    n_release++;
  endtask

  // ---------------- observation ----------------
  logic [NC+4:0] tx_ne;
  for (genvar i = 0; i < NC + 5; i++) begin : g_obs
    assign tx_ne[i] = !dut.g_hibi[i].u_hibi.tx_empty;
  end
  always @(posedge clk) begin
    if (rst_n) begin
      int n;
      cyc <= cyc + 1;
      n = 0;
      n = $countones(tx_ne);
      if (n >= 2) n_contention <= n_contention + 1;
      if (dut.bus_full) n_bus_full <= n_bus_full + 1;
      if (mon_running) begin
        if (dut.dq_busy)     busy_cnt[0] <= busy_cnt[0] + 1;
        if (dut.dq_acc_busy) busy_cnt[1] <= busy_cnt[1] + 1;
        if (dut.me_busy)     busy_cnt[2] <= busy_cnt[2] + 1;
        if (dut.me_acc_busy) busy_cnt[3] <= busy_cnt[3] + 1;
      end
    end
  end

  // ---------------- main ----------------
  int t_me0;
  initial begin
    logic [31:0] a, d, res;
    // reference frame around the two macroblocks
    for (int y = 0; y < 144; y++)
      for (int wx = 0; wx < WW; wx++)
        u_sdram.mem[REFF + 32'(y * WW + wx)] = {rpix(4*wx + 3, y), rpix(4*wx + 2, y),
                                                rpix(4*wx + 1, y), rpix(4*wx, y)};
    repeat (3) @(posedge clk);
    rst_n = 1;
    bput(0, 1'b1, MON_BASE);
    bput(0, 1'b0, 32'(MON_CLEAR));
    bput(0, 1'b0, 32'(MON_START));
    wait (mon_running);
    fork
      slave_run(1, 32, 32, 14, 1'b1, 1'b0);
      begin
        repeat (20) @(posedge clk);   // slave 1 asks first
        slave_run(2, 96, 80, 5, 1'b0, 1'b1);
      end
      begin
        wait (me_holder_active);
        rm_request(0, RM_TYPE_ME, 1'b0, res);
        check(res == 0, "non-blocking request for a held ME must get zero");
      end
    join
    repeat (50) @(posedge clk);
    bput(0, 1'b1, MON_BASE);
    bput(0, 1'b0, 32'(MON_STOP));
    bput(0, 1'b0, 32'(MON_REPORT));
    bput(0, 1'b0, CPU_BASE | 32'h40);
    for (int i = 0; i < 4; i++) begin
      next_word(0, a, d);
      check(a == (CPU_BASE | 32'h40) && d == 32'(busy_cnt[i]),
            $sformatf("monitor counter %0d = %0d, counted %0d", i, d, busy_cnt[i]));
      if (d == 0) check(0, $sformatf("monitor counter %0d is zero", i));
    end
    n_report++;
    $display("monitor: DQ wrapper %0d, DQ %0d, ME wrapper %0d, ME %0d cycles",
             busy_cnt[0], busy_cnt[1], busy_cnt[2], busy_cnt[3]);

    check(merr == 0, "ME model protocol errors");
    check(dq_err == 0, "DQ model protocol errors");
    check(rm_busy == 2'b00, "RM still has reserved accelerators");
    // mechanisms
    check(n_grant >= 4, $sformatf("RM grants %0d", n_grant));
    check(n_block_wait >= 1, "no blocking request waited in the RM queue");
    check(n_null >= 1, "no RM null reply");
    check(n_release == 4, "releases");
    check(retries > 0 && refusals > 0, "no SDRAM port retry");
    check(ops == 2 && n_me_ok == 2, "ME operations");
    check(n_dq_ok == 2 && dq_blk == 12, $sformatf("DQ blocks %0d", dq_blk));
    check(dq_chroma == 4, $sformatf("DQ chroma blocks %0d", dq_chroma));
    check(dq_intra == 6, $sformatf("DQ intra blocks %0d (inter must be 6)", dq_intra));
    check(n_mixed_zero >= 1, "no macroblock with both zero and non-zero blocks");
    check(n_contention > 0, "no HIBI arbitration contention");
    check(n_report == 1, "monitor report");
    $display("mechanisms: grants %0d blocking-waits %0d nulls %0d releases %0d port-retries %0d",
             n_grant, n_block_wait, n_null, n_release, retries);
    $display("            ME ops %0d DQ blocks %0d chroma %0d intra %0d mixed-zero %0d contention-cycles %0d bus-full-cycles %0d reports %0d",
             ops, dq_blk, dq_chroma, dq_intra, n_mixed_zero, n_contention, n_bus_full, n_report);
    $display("total %0d cycles", cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
