// tb_hibi_wrapper: self-checking test of the HIBI wrapper on a four-agent
// segment (OR-combined bus, as in the top level).  Every agent sends random
// length transfers (an address word followed by 1..12 data words) to random
// other agents while reading its receive FIFO at random, so that receivers
// fill up and transfers are split and resumed.  A data word carries
// {source, destination, sequence number}; each receiver checks that it gets
// only its own words, from every source in order, with none lost or doubled.
// Also checked: one wrapper drives the bus at a time (assertion in the
// wrapper), and an uncontended 8-word transfer with a ready receiver takes at
// most 10 bus cycles (one word per clock plus the address word).
// The rules checked (address first, distributed decoding, no lost or
// doubled words) follow the described HIBI segment; the cycle bound is this
// design's own round-robin timing.
module tb_hibi_wrapper;
  import hibi_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int N = 4;
  localparam int MSGS = 60;

  logic [2:0]  a_comm_w [N], a_comm_r [N];
  logic [31:0] a_data_w [N], a_data_r [N];
  logic        a_av_w [N], a_we [N], a_full [N], a_av_r [N], a_empty [N], a_re [N];
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

  function automatic logic [31:0] base(input int i);
    return CPU_BASE + 32'(i) * 32'h200;
  endfunction

  int checks = 0, failures = 0;
  int sent [N], recvd [N];
  int next_seq [N][N];
  int full_cycles = 0;
  logic fast_rx = 1'b0;

  for (genvar i = 0; i < N; i++) begin : g_ag
    hibi_wrapper #(.N_AGENTS(N), .ID(i), .ADDR_BASE(base(i))) u_hw (
      .clk, .rst_n,
      .agent_comm_in(a_comm_w[i]), .agent_data_in(a_data_w[i]), .agent_av_in(a_av_w[i]),
      .agent_we_in(a_we[i]), .agent_full_out(a_full[i]),
      .agent_comm_out(a_comm_r[i]), .agent_data_out(a_data_r[i]), .agent_av_out(a_av_r[i]),
      .agent_empty_out(a_empty[i]), .agent_re_in(a_re[i]),
      .bus_comm_out(b_comm[i]), .bus_data_out(b_data[i]), .bus_av_out(b_av[i]),
      .bus_lock_out(b_lock[i]), .bus_full_out(b_full[i]),
      .bus_comm_in(bus_comm), .bus_data_in(bus_data), .bus_av_in(bus_av),
      .bus_lock_in(bus_lock), .bus_full_in(bus_full));

    // transmit: registered outputs follow a queue of words
    logic [32:0] txq [$];
    assign a_comm_w[i] = CMD_WR;
    always @(posedge clk) begin
      a_we[i]     <= 1'b0;
      a_av_w[i]   <= 1'b0;
      a_data_w[i] <= '0;
      if (rst_n) begin
        int n;
        n = (a_we[i] && !a_full[i]) ? 1 : 0;
        if (txq.size() > n) begin
          a_we[i]     <= 1'b1;
          a_av_w[i]   <= txq[n][32];
          a_data_w[i] <= txq[n][31:0];
        end
        if (n == 1) void'(txq.pop_front());
      end
    end

    // receive: random read enable, checking every data word
    logic rd;
    always @(posedge clk) rd <= fast_rx || ($urandom_range(0, 2) == 0);
    assign a_re[i] = rst_n && rd && !a_empty[i];
    always @(posedge clk) begin
      if (a_re[i] && !a_av_r[i]) begin
        int src, dst, seq;
        src = int'(a_data_r[i][31:28]);
        dst = int'(a_data_r[i][27:24]);
        seq = int'(a_data_r[i][23:0]);
        checks++;
        if (dst != i || src >= N || seq != next_seq[src][i]) begin
          failures++;
          if (failures < 10)
            $display("FAIL agent %0d got src %0d dst %0d seq %0d (expected seq %0d)",
                     i, src, dst, seq, src < N ? next_seq[src][i] : -1);
        end
        if (src < N) next_seq[src][i] = seq + 1;
        recvd[i]++;
      end
    end
  end

  always @(posedge clk) if (bus_full) full_cycles++;

  int seq [N][N];
  task automatic send_msg(input int s, input int d, input int len);
    if (s == 0) g_ag[0].txq.push_back({1'b1, base(d) | 32'($urandom_range(0, 511))});
    if (s == 1) g_ag[1].txq.push_back({1'b1, base(d) | 32'($urandom_range(0, 511))});
    if (s == 2) g_ag[2].txq.push_back({1'b1, base(d) | 32'($urandom_range(0, 511))});
    if (s == 3) g_ag[3].txq.push_back({1'b1, base(d) | 32'($urandom_range(0, 511))});
    for (int k = 0; k < len; k++) begin
      logic [32:0] w;
      w = {1'b0, 4'(s), 4'(d), 24'(seq[s][d])};
      seq[s][d]++;
      case (s)
        0: g_ag[0].txq.push_back(w);
        1: g_ag[1].txq.push_back(w);
        2: g_ag[2].txq.push_back(w);
        default: g_ag[3].txq.push_back(w);
      endcase
      sent[s]++;
    end
  endtask

  int total_sent, total_recvd, t0, t1;
  initial begin
    for (int i = 0; i < N; i++) begin
      sent[i] = 0; recvd[i] = 0;
      for (int j = 0; j < N; j++) begin seq[i][j] = 0; next_seq[i][j] = 0; end
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int m = 0; m < MSGS; m++)
      for (int s = 0; s < N; s++) begin
        int d;
        d = (s + $urandom_range(1, N - 1)) % N;
        send_msg(s, d, $urandom_range(1, 12));
      end
    forever begin
      total_sent = 0; total_recvd = 0;
      for (int i = 0; i < N; i++) begin total_sent += sent[i]; total_recvd += recvd[i]; end
      if (total_sent == total_recvd) break;
      @(posedge clk);
    end
    checks++;
    if (full_cycles == 0) begin failures++; $display("FAIL receivers never full"); end
    // uncontended transfer, ready receiver
    fast_rx = 1'b1;
    repeat (20) @(posedge clk);
    send_msg(1, 2, 8);
    @(posedge clk);
    while (!bus_av) @(posedge clk);
    t0 = $time;
    while (bus_comm != CMD_IDLE) @(posedge clk);
    t1 = $time;
    checks++;
    if ((t1 - t0) / 10 > 10) begin
      failures++;
      $display("FAIL 8-word transfer took %0d bus cycles", (t1 - t0) / 10);
    end
    repeat (20) @(posedge clk);
    $display("words %0d, receiver-full cycles %0d, 8-word transfer %0d cycles",
             total_sent + 8, full_cycles, (t1 - t0) / 10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
