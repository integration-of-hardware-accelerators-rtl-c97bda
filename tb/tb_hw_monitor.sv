// tb_hw_monitor: self-checking test of the hardware monitor.  Four random
// activity signals are counted here whenever the monitor should be running;
// the test sends clear / start / stop / report commands through a queue that
// stands in for the HIBI receive FIFO and compares every reported counter
// with its own count.  Checks also that counting pauses between stop and
// start, that clear zeroes the counters, that the report goes to the return
// address given, and that a report with HIBI never full takes NUM_SIG + 1
// transmit cycles.
// The commands checked (clear, start, stop, report) are the ones the
// original design lists; their encoding and the report format are this
// design's own.
module tb_hw_monitor;
  import hibi_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int NS = 4;
  logic [2:0]  rx_comm, tx_comm;
  logic [31:0] rx_data, tx_data;
  logic        rx_av, rx_empty, rx_re, tx_av, tx_we, tx_full, running;
  logic [NS-1:0] mon;

  hw_monitor #(.NUM_SIG(NS)) dut (
    .clk, .rst_n, .mon_in(mon),
    .hibi_comm_in(rx_comm), .hibi_data_in(rx_data), .hibi_av_in(rx_av),
    .hibi_empty_in(rx_empty), .hibi_re_out(rx_re),
    .hibi_comm_out(tx_comm), .hibi_data_out(tx_data), .hibi_av_out(tx_av),
    .hibi_we_out(tx_we), .hibi_full_in(tx_full), .running_out(running));

  logic [32:0] inq [$];
  assign rx_empty = inq.size() == 0;
  assign rx_av    = (inq.size() != 0) ? inq[0][32] : 1'b0;
  assign rx_data  = (inq.size() != 0) ? inq[0][31:0] : '0;
  assign rx_comm  = CMD_WR;

  int exp_cnt [NS];
  logic [32:0] outq [$];
  int checks = 0, failures = 0, we_cycles = 0;
  logic random_full = 1'b1;
  always @(posedge clk) begin
    mon     <= NS'($urandom);
    tx_full <= random_full && ($urandom_range(0, 2) == 0);
    if (rst_n && rx_re && !rx_empty) void'(inq.pop_front());
    if (rst_n && running)
      for (int i = 0; i < NS; i++) if (mon[i]) exp_cnt[i] <= exp_cnt[i] + 1;
    if (tx_we) we_cycles <= we_cycles + 1;
    if (rst_n && tx_we && !tx_full) outq.push_back({tx_av, tx_data});
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic cmd(input logic [1:0] c);
    inq.push_back({1'b1, MON_BASE});
    inq.push_back({1'b0, 30'd0, c});
    while (inq.size() != 0) @(posedge clk);
    @(posedge clk);
  endtask

  task automatic report(input logic [31:0] ret, input bit expect_zero);
    int snap [NS];
    inq.push_back({1'b1, MON_BASE});
    inq.push_back({1'b0, 30'd0, MON_REPORT});
    inq.push_back({1'b0, ret});
    while (inq.size() != 0) @(posedge clk);
    snap = exp_cnt;   // the monitor samples in the cycle it takes the address
    while (outq.size() < NS + 1) @(posedge clk);
    check(outq[0] == {1'b1, ret}, $sformatf("report address %h", outq[0][31:0]));
    for (int i = 0; i < NS; i++) begin
      check(outq[i+1] == {1'b0, 32'(snap[i])},
            $sformatf("counter %0d = %0d expected %0d", i, outq[i+1][31:0], snap[i]));
      if (expect_zero) check(snap[i] == 0, "counter not cleared");
      else check(snap[i] > 0, "counter never counted");
    end
    outq.delete();
  endtask

  initial begin
    for (int i = 0; i < NS; i++) exp_cnt[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    cmd(MON_CLEAR);
    cmd(MON_START);
    repeat (300) @(posedge clk);
    cmd(MON_STOP);
    repeat (5) @(posedge clk);
    report(32'h0100_1000, 1'b0);
    // stopped: nothing more is counted
    repeat (100) @(posedge clk);
    report(32'h0100_1200, 1'b0);
    cmd(MON_START);
    repeat (200) @(posedge clk);
    cmd(MON_STOP);
    repeat (5) @(posedge clk);
    report(32'h0100_1000, 1'b0);
    cmd(MON_CLEAR);
    for (int i = 0; i < NS; i++) exp_cnt[i] = 0;
    report(32'h0100_1400, 1'b1);
    // report length with HIBI never full
    random_full = 1'b0;
    cmd(MON_START);
    repeat (50) @(posedge clk);
    cmd(MON_STOP);
    we_cycles = 0;
    report(32'h0100_1000, 1'b0);
    check(we_cycles == NS + 1, $sformatf("report took %0d cycles", we_cycles));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
