// cpu_bfm: bus-functional stand-in for a processor's HIBI agent port (the
// DMA engine that connects a CPU to HIBI).  put() queues a word for sending;
// every word received, address words included, is appended to rxq, which a
// testbench inspects and pops with take_data().
// The HIBI agent interface it drives follows the wrapper's FIFO interface as
// the original design describes it; the queue-based behaviour is this
// bench's own.
module cpu_bfm
  import hibi_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  output logic [2:0]  agent_comm_out,
  output logic [31:0] agent_data_out,
  output logic        agent_av_out,
  output logic        agent_we_out,
  input  logic        agent_full_in,
  input  logic [2:0]  agent_comm_in,
  input  logic [31:0] agent_data_in,
  input  logic        agent_av_in,
  input  logic        agent_empty_in,
  output logic        agent_re_out
);
  logic [32:0] txq [$];
  logic [32:0] rxq [$];

  assign agent_comm_out = CMD_WR;
  // outputs follow the queue head, sampled every clock edge
  always @(posedge clk) begin
    agent_we_out   <= 1'b0;
    agent_av_out   <= 1'b0;
    agent_data_out <= '0;
    if (rst_n) begin
      int n;
      n = (agent_we_out && !agent_full_in) ? 1 : 0;
      if (txq.size() > n) begin
        agent_we_out   <= 1'b1;
        agent_av_out   <= txq[n][32];
        agent_data_out <= txq[n][31:0];
      end
      if (n == 1) void'(txq.pop_front());
    end
  end
  assign agent_re_out   = rst_n && !agent_empty_in;

  always @(posedge clk) begin
    if (rst_n) begin
      if (!agent_empty_in) rxq.push_back({agent_av_in, agent_data_in});
    end
  end

  task automatic put(input logic av, input logic [31:0] d);
    txq.push_back({av, d});
  endtask

  // Wait for the next data word (address words are skipped) and return it.
  task automatic take_data(output logic [31:0] d);
    forever begin
      while (rxq.size() == 0) @(posedge clk);
      if (rxq[0][32]) void'(rxq.pop_front());
      else begin
        d = rxq[0][31:0];
        void'(rxq.pop_front());
        return;
      end
    end
  endtask

  // Wait for the next data word; also return the address word it followed.
  logic [31:0] last_av = '0;
  task automatic take_word(output logic [31:0] a, output logic [31:0] d);
    forever begin
      while (rxq.size() == 0) @(posedge clk);
      if (rxq[0][32]) begin
        last_av = rxq[0][31:0];
        void'(rxq.pop_front());
      end else begin
        a = last_av;
        d = rxq[0][31:0];
        void'(rxq.pop_front());
        return;
      end
    end
  endtask

  wire unused = ^agent_comm_in;
endmodule
