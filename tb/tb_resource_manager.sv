// tb_resource_manager: self-checking test of the resource manager with two
// types, type 0 having two instances and type 1 one instance.  The HIBI
// receive side is a queue (empty at random), the transmit side is captured
// with full asserted at random.  Covered: grants to free slots, blocking
// requests queued until a release and then served in arrival order, a
// non-blocking request refused (zero reply) when nothing is free, a request
// for an unknown type refused, a blocking request refused when the type
// FIFO is full, release of a slot that is then granted again, and the reply
// latency of a grant (address word at most 4 cycles after the request data
// word was taken, with HIBI not full).
// Blocking, non-blocking, release and the zero reply follow the described
// resource manager; the message bit layout and the refusal of unknown types
// or a full queue are this design's own.
module tb_resource_manager;
  import hibi_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam logic [31:0] A0 = 32'h0100_0400, A1 = 32'h0100_0800, B0 = 32'h0100_0200;

  logic [2:0]  rx_comm, tx_comm;
  logic [31:0] rx_data, tx_data;
  logic        rx_av, rx_empty, rx_re, tx_av, tx_we, tx_full;
  logic [1:0]  busy;

  resource_manager #(
    .NUM_TYPES(2), .MAX_SLOTS(2), .SLOT_COUNT({8'd1, 8'd2}),
    .RES_ADDR({32'h0, B0, A1, A0}), .TYPE_FIFO_DEPTH(4), .NULL_FIFO_DEPTH(4)
  ) dut (
    .clk, .rst_n,
    .hibi_comm_in(rx_comm), .hibi_data_in(rx_data), .hibi_av_in(rx_av),
    .hibi_empty_in(rx_empty), .hibi_re_out(rx_re),
    .hibi_comm_out(tx_comm), .hibi_data_out(tx_data), .hibi_av_out(tx_av),
    .hibi_we_out(tx_we), .hibi_full_in(tx_full),
    .busy_out(busy));

  logic [32:0] inq [$];
  logic gap, random_full = 1'b1;
  assign rx_empty = (inq.size() == 0) || gap;
  assign rx_av    = (inq.size() != 0) ? inq[0][32] : 1'b0;
  assign rx_data  = (inq.size() != 0) ? inq[0][31:0] : '0;
  assign rx_comm  = CMD_WR;

  logic [31:0] replies [$];   // {return address, value} pairs, flattened
  int checks = 0, failures = 0, cyc = 0, last_take = 0, max_latency = 0;
  logic [31:0] pend_addr = '0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    gap     <= ($urandom_range(0, 4) == 0);
    tx_full <= random_full && ($urandom_range(0, 3) == 0);
    if (rst_n && rx_re && !rx_empty) begin
      void'(inq.pop_front());
      if (!rx_av) last_take <= cyc;
    end
    if (rst_n && tx_we && !tx_full) begin
      if (tx_av) begin
        pend_addr <= tx_data;
        if (!random_full && cyc - last_take > max_latency) max_latency <= cyc - last_take;
      end else begin
        replies.push_back(pend_addr);
        replies.push_back(tx_data);
      end
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic send(input int typ, input bit rel, input bit blk, input logic [31:0] d);
    inq.push_back({1'b1, rm_addr(RM_BASE, typ, rel, blk)});
    inq.push_back({1'b0, d});
  endtask

  task automatic expect_reply(input logic [31:0] ret, input logic [31:0] val);
    int n;
    n = 0;
    while (replies.size() < 2 && n < 200) begin @(posedge clk); n++; end
    if (replies.size() < 2) begin
      check(0, $sformatf("no reply for %h (expected %h)", ret, val));
      return;
    end
    check(replies[0] == ret && replies[1] == val,
          $sformatf("reply %h:%h expected %h:%h", replies[0], replies[1], ret, val));
    void'(replies.pop_front());
    void'(replies.pop_front());
  endtask

  task automatic expect_quiet(input int n);
    repeat (n) @(posedge clk);
    check(replies.size() == 0, $sformatf("unexpected reply %h", (replies.size() != 0) ? replies[0] : 32'h0));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // two instances of type 0
    send(0, 0, 1, 32'h0100_1000); expect_reply(32'h0100_1000, A0);
    send(0, 0, 0, 32'h0100_1200); expect_reply(32'h0100_1200, A1);
    check(busy == 2'b01, "type 0 busy");
    // blocking request waits, non-blocking is refused, unknown type refused
    send(0, 0, 1, 32'h0100_1400); expect_quiet(40);
    send(0, 0, 0, 32'h0100_1600); expect_reply(32'h0100_1600, 32'h0);
    send(9, 0, 1, 32'h0100_1800); expect_reply(32'h0100_1800, 32'h0);
    // release of A1 serves the waiting request
    send(0, 1, 0, A1);            expect_reply(32'h0100_1400, A1);
    // type 1: grant, then fill the 4-deep FIFO, the fifth is refused
    send(1, 0, 0, 32'h0100_2000); expect_reply(32'h0100_2000, B0);
    for (int i = 1; i <= 5; i++) send(1, 0, 1, 32'h0100_2000 + 32'(i));
    expect_reply(32'h0100_2005, 32'h0);
    expect_quiet(20);
    // releases hand the accelerator out in arrival order
    for (int i = 1; i <= 4; i++) begin
      send(1, 1, 0, B0);
      expect_reply(32'h0100_2000 + 32'(i), B0);
    end
    // a release for type 0 does not touch type 1
    send(0, 1, 0, A0); expect_quiet(20);
    check(busy == 2'b10, $sformatf("busy %b after releases", busy));
    send(1, 1, 0, B0); send(0, 1, 0, A1);
    expect_quiet(20);
    check(busy == 2'b00, "all free at the end");
    // latency with HIBI never full
    random_full = 1'b0;
    repeat (5) @(posedge clk);
    max_latency = 0;
    send(0, 0, 0, 32'h0100_3000); expect_reply(32'h0100_3000, A0);
    check(max_latency <= 4 && max_latency > 0, $sformatf("grant latency %0d cycles", max_latency));
    $display("grant latency %0d cycles", max_latency);
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
