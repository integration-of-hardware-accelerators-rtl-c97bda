// me_wrapper_bench: one complete test set-up for the motion-estimation
// wrapper, instantiated by tb_me_wrapper.  A three-agent HIBI segment joins a
// CPU stand-in, the SDRAM controller model and the ME wrapper with the
// accelerator model (the structure of a wrapper testbench: stimulus/checker,
// SDRAM model and wrapper, each behind a HIBI wrapper).  The CPU sends two
// requests; the second after changing the image width from QCIF (176) to CIF
// (352) at run time.  For each, the bench works out from the frame-memory
// formula the SAD, motion vector and best match of a full search and
// compares the 66 result words, and checks that the wrapper released itself
// to the resource manager address once per request and that the refused
// SDRAM port request was repeated.  BIG_ENDIAN sets the byte order of the
// wrapper and of the memory model together; SINGLE puts the SDRAM model in
// single data mode (one word per transfer, irregular gaps).  Interface:
// clk and rst_n in; checks, failures and done out, done rising once the
// whole sequence has been checked.
// The set-up mirrors the wrapper testbench structure and the test cases of
// the original design's verification (SDRAM protocol, single data mode,
// endianness, self-release); the data pattern and reference are its own.
module me_wrapper_bench #(
  parameter bit BIG_ENDIAN = 1'b0,
  parameter bit SINGLE     = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output logic done
);
  import hibi_pkg::*;

  localparam int N = 3;
  localparam logic [31:0] CPU_ADDR = CPU_BASE;
  localparam logic [31:0] RM_ADDR  = CPU_BASE | 32'h1F0;   // release lands at the CPU here
  localparam logic [31:0] FRAME    = 32'h0001_0000;
  localparam logic [31:0] REFF     = 32'h0002_0000;  // reference frame

  // agent-side signals, index 0 CPU, 1 SDRAM, 2 ME wrapper
  logic [2:0]  a_comm_w [N], a_comm_r [N];
  logic [31:0] a_data_w [N], a_data_r [N];
  logic        a_av_w [N], a_we [N], a_full [N], a_av_r [N], a_empty [N], a_re [N];
  // bus
  logic [2:0]  b_comm [N]; logic [31:0] b_data [N];
  logic        b_av [N], b_lock [N], b_full [N];
  logic [2:0]  bus_comm; logic [31:0] bus_data; logic bus_av, bus_lock, bus_full;
  always_comb begin
    bus_comm = '0; bus_data = '0; bus_av = 0; bus_lock = 0; bus_full = 0;
    for (int i = 0; i < N; i++) begin
      bus_comm |= b_comm[i]; bus_data |= b_data[i]; bus_av |= b_av[i];
      bus_lock |= b_lock[i]; bus_full |= b_full[i];
    end
  end

  localparam logic [31:0] BASES [N] = '{CPU_BASE, SDRAM_BASE, ME_BASE};
  localparam int          OFSW  [N] = '{IP_OFS_W, SDRAM_OFS_W, IP_OFS_W};
  for (genvar i = 0; i < N; i++) begin : g_hw
    hibi_wrapper #(.N_AGENTS(N), .ID(i), .ADDR_BASE(BASES[i]), .ADDR_OFS_W(OFSW[i])) u_hw (
      .clk, .rst_n,
      .agent_comm_in(a_comm_w[i]), .agent_data_in(a_data_w[i]), .agent_av_in(a_av_w[i]),
      .agent_we_in(a_we[i]), .agent_full_out(a_full[i]),
      .agent_comm_out(a_comm_r[i]), .agent_data_out(a_data_r[i]), .agent_av_out(a_av_r[i]),
      .agent_empty_out(a_empty[i]), .agent_re_in(a_re[i]),
      .bus_comm_out(b_comm[i]), .bus_data_out(b_data[i]), .bus_av_out(b_av[i]),
      .bus_lock_out(b_lock[i]), .bus_full_out(b_full[i]),
      .bus_comm_in(bus_comm), .bus_data_in(bus_data), .bus_av_in(bus_av),
      .bus_lock_in(bus_lock), .bus_full_in(bus_full));
  end

  cpu_bfm u_cpu (.clk, .rst_n,
    .agent_comm_out(a_comm_w[0]), .agent_data_out(a_data_w[0]), .agent_av_out(a_av_w[0]),
    .agent_we_out(a_we[0]), .agent_full_in(a_full[0]),
    .agent_comm_in(a_comm_r[0]), .agent_data_in(a_data_r[0]), .agent_av_in(a_av_r[0]),
    .agent_empty_in(a_empty[0]), .agent_re_out(a_re[0]));

  int refusals, reads;
  sdram_ctrl_model #(.REFUSE(1), .SINGLE(SINGLE), .BIG_ENDIAN(BIG_ENDIAN)) u_sdram (.clk, .rst_n,
    .agent_comm_out(a_comm_w[1]), .agent_data_out(a_data_w[1]), .agent_av_out(a_av_w[1]),
    .agent_we_out(a_we[1]), .agent_full_in(a_full[1]),
    .agent_comm_in(a_comm_r[1]), .agent_data_in(a_data_r[1]), .agent_av_in(a_av_r[1]),
    .agent_empty_in(a_empty[1]), .agent_re_out(a_re[1]),
    .refusals(refusals), .reads_served(reads));

  logic [127:0] me_d_to_acc, me_d_from_acc;
  logic v_ref, v_cur, new_ref, new_cur, ref_st, cur_st, new_res, v_sad, v_mv, v_mb;
  logic t_rdy, rep, loaded, busy, acc_busy;
  logic [15:0] retries;
  int ops, merr;

  me_wrapper #(.USE_SELF_REL(1'b1), .RM_ADDRESS(RM_ADDR), .BIG_ENDIAN(BIG_ENDIAN)) dut (
    .clk, .rst_n,
    .hibi_comm_in(a_comm_r[2]), .hibi_data_in(a_data_r[2]), .hibi_av_in(a_av_r[2]),
    .hibi_empty_in(a_empty[2]), .hibi_re_out(a_re[2]),
    .hibi_comm_out(a_comm_w[2]), .hibi_data_out(a_data_w[2]), .hibi_av_out(a_av_w[2]),
    .hibi_we_out(a_we[2]), .hibi_full_in(a_full[2]),
    .me_data_out(me_d_to_acc), .me_valid_ref_data_out(v_ref), .me_valid_cur_data_out(v_cur),
    .me_new_ref_area_in(new_ref), .me_new_cur_mb_in(new_cur),
    .me_ref_area_stored_in(ref_st), .me_cur_mb_stored_in(cur_st),
    .me_data_in(me_d_from_acc), .me_new_result_in(new_res), .me_valid_sad_in(v_sad),
    .me_valid_mv_in(v_mv), .me_valid_mb_in(v_mb), .me_target_ready_out(t_rdy),
    .me_repeat_delivery_out(rep), .me_result_loaded_out(loaded),
    .busy_out(busy), .acc_busy_out(acc_busy), .port_retries_out(retries));

  me_accel_model u_acc (.clk, .rst_n,
    .me_data_in(me_d_to_acc), .ctrl_valid_ref_data_in(v_ref), .ctrl_valid_cur_data_in(v_cur),
    .ctrl_new_ref_area_out(new_ref), .ctrl_new_cur_mb_out(new_cur),
    .ctrl_ref_area_stored_out(ref_st), .ctrl_cur_mb_stored_out(cur_st),
    .me_data_out(me_d_from_acc), .ctrl_new_result_out(new_res), .ctrl_valid_sad_out(v_sad),
    .ctrl_valid_mv_out(v_mv), .ctrl_valid_mb_out(v_mb), .ctrl_target_ready_in(t_rdy),
    .ctrl_repeat_delivery_in(rep), .ctrl_result_loaded_in(loaded),
    .ops_done(ops), .errors(merr));

  // ---- reference ----
  function automatic logic [7:0] mem_pixel(input logic [31:0] a, input int j);
    logic [31:0] h;
    h = a * 32'd2654435761 + 32'(j) * 32'd40503;
    return h[23:16] ^ 8'(a[7:0] * 3 + j);
  endfunction
  function automatic logic [7:0] pix(input int ww, input int x, input int y);
    return mem_pixel(FRAME + 32'(y * ww + x / 4), x % 4);
  endfunction
  // The reference frame is the current frame moved by (3,-2) pixels except
  // near the top-left, so that the best match is known to be off-centre.
  function automatic logic [7:0] rpix(input int ww, input int x, input int y);
    return pix(ww, x + 3, y - 2);
  endfunction

  int releases = 0;
  logic [31:0] last_av = '0;

  task automatic next_word(output logic [31:0] d);
    forever begin
      while (u_cpu.rxq.size() == 0) @(posedge clk);
      if (u_cpu.rxq[0][32]) last_av = u_cpu.rxq[0][31:0];
      else if (last_av == RM_ADDR) begin
        releases++;
        checks++;
        if (u_cpu.rxq[0][31:0] != ME_BASE) failures++;
      end else begin
        d = u_cpu.rxq[0][31:0];
        void'(u_cpu.rxq.pop_front());
        return;
      end
      void'(u_cpu.rxq.pop_front());
    end
  endtask

  task automatic run_me(input int ww, input int cx, input int cy);
    int best, bx, by;
    logic [31:0] d;
    for (int y = cy - 16; y < cy + 32; y++)
      for (int wx = (cx - 16) / 4; wx < (cx + 32) / 4; wx++)
        u_sdram.mem[REFF + 32'(y * ww + wx)] = {rpix(ww, 4*wx + 3, y), rpix(ww, 4*wx + 2, y),
                                                rpix(ww, 4*wx + 1, y), rpix(ww, 4*wx, y)};
    u_cpu.put(1'b1, ME_BASE);
    u_cpu.put(1'b0, FRAME + 32'(cy * ww + cx / 4));
    u_cpu.put(1'b0, REFF + 32'((cy - 16) * ww + (cx - 16) / 4));
    u_cpu.put(1'b0, CPU_ADDR | 32'h5);
    best = 1 << 30; bx = 0; by = 0;
    for (int y = 0; y <= 32; y++)
      for (int x = 0; x <= 32; x++) begin
        int s;
        s = 0;
        for (int r = 0; r < 16; r++)
          for (int c = 0; c < 16; c++) begin
            int df;
            df = int'(rpix(ww, cx - 16 + x + c, cy - 16 + y + r)) - int'(pix(ww, cx + c, cy + r));
            s += (df < 0) ? -df : df;
          end
        if (s < best) begin best = s; bx = x; by = y; end
      end
    next_word(d); checks++;
    if (d != 32'(best)) begin failures++; $display("FAIL SAD %0d exp %0d", d, best); end
    next_word(d); checks++;
    if (d != {16'd0, 8'(bx - 16), 8'(by - 16)}) begin failures++; $display("FAIL MV %h", d); end
    for (int r = 0; r < 16; r++)
      for (int w = 0; w < 4; w++) begin
        logic [31:0] e;
        for (int j = 0; j < 4; j++)
          e[8*j +: 8] = rpix(ww, cx - 16 + bx + 4*w + j, cy - 16 + by + r);
        if (BIG_ENDIAN) e = {e[7:0], e[15:8], e[23:16], e[31:24]};
        next_word(d); checks++;
        if (d != e) begin
          failures++;
          if (failures < 8) $display("FAIL MB row %0d word %0d: %h exp %h", r, w, d, e);
        end
      end
  endtask

  int t0, t1;
  initial begin
    checks = 0; failures = 0; done = 1'b0;
    while (!rst_n) @(posedge clk);
    @(posedge clk);
    t0 = int'($time);
    run_me(176 / 4, 48, 32);
    t1 = int'($time);
    $display("ME operation, QCIF, big endian %0d, single data %0d: %0d cycles", BIG_ENDIAN, SINGLE, (t1 - t0) / 10);
    // run-time image width change to CIF
    u_cpu.put(1'b1, ME_BASE | 32'(ME_OFS_WIDTH));
    u_cpu.put(1'b0, 32'd352);
    run_me(352 / 4, 64, 16);
    repeat (50) @(posedge clk);
    checks++; if (merr != 0) begin failures++; $display("FAIL accelerator model errors %0d", merr); end
    checks++; if (ops != 2) begin failures++; $display("FAIL ops %0d", ops); end
    checks++; if (retries == 0) begin failures++; $display("FAIL no port retry"); end
    checks++; if (releases != 2) begin failures++; $display("FAIL releases %0d", releases); end
    checks++; if (busy || acc_busy) begin failures++; $display("FAIL still busy"); end
    // input 160 words of 128 bits needs at least 4*160 bus words at one per cycle
    checks++; if ((t1 - t0) / 10 < 640) begin failures++; $display("FAIL too fast"); end
    done = 1'b1;
  end
endmodule
