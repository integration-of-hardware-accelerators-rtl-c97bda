// sdram_ctrl_model: behavioural stand-in for the SDRAM controller as a HIBI
// agent, with a frame memory.  Unless a testbench has written it (mem[a]),
// memory word at address a holds four pixels mem_pixel(a, j), j = 0..3, leftmost in bits 7..0 (little endian),
// from a fixed formula so that a testbench can compute any expected pixel.
// Read-port protocol (the same as the ME wrapper's loader uses):
//   port request: address word = SDRAM base, data word = return address;
//     reply to the return address: port address PORT_BASE+p, or 0 when all
//     NPORTS ports are busy (the first REFUSE requests are refused anyway);
//   configuration: address word = port, data words = source address, width
//     (words), height (rows), height offset (words skipped between rows);
//   then width*height words are sent to the return address and the port is
//     freed.  Only one port streams at a time.
// SINGLE = 1 is the single data mode: every data word goes as its own
// transfer (address word + one data word) with random idle cycles between,
// so that the receiver sees irregular, one-word deliveries.  BIG_ENDIAN = 1
// stores the four pixels of a word leftmost in bits 31..24, as a big-endian
// processor would; mem[] is always written in the little-endian layout.
// The original design names the port request, the retry on a refused port
// and the configuration parameters; the exact message words and the memory
// formula are this model's own.
module sdram_ctrl_model
  import hibi_pkg::*;
#(
  parameter int NPORTS = 2,
  parameter int REFUSE = 1,
  parameter logic [31:0] PORT_BASE = 32'h003F_FF00,
  parameter bit          SINGLE     = 1'b0,
  parameter bit          BIG_ENDIAN = 1'b0
) (
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
  output logic        agent_re_out,
  output int          refusals,
  output int          reads_served
);
  function automatic logic [7:0] mem_pixel(input logic [31:0] a, input int j);
    logic [31:0] h;
    h = a * 32'd2654435761 + 32'(j) * 32'd40503;
    return h[23:16] ^ 8'(a[7:0] * 3 + j);
  endfunction
  function automatic logic [31:0] mem_word(input logic [31:0] a);
    return {mem_pixel(a, 3), mem_pixel(a, 2), mem_pixel(a, 1), mem_pixel(a, 0)};
  endfunction

  // words written by a testbench override the formula
  logic [31:0] mem [logic [31:0]];
  function automatic logic [31:0] rd(input logic [31:0] a);
    logic [31:0] w;
    w = mem.exists(a) ? mem[a] : mem_word(a);
    return BIG_ENDIAN ? {w[7:0], w[15:8], w[23:16], w[31:24]} : w;
  endfunction

  logic [32:0] txq [$];
  logic [31:0] cur_addr;
  int          cfg_idx, refuse_left;
  logic [31:0] port_ret [NPORTS];
  bit          port_busy [NPORTS];
  int          cfg_port;
  logic [31:0] cfg [4];
  int          pending_reqs;

  assign agent_comm_out = CMD_WR;
  // outputs follow the queue head, sampled every clock edge
  always @(posedge clk) begin
    agent_we_out   <= 1'b0;
    agent_av_out   <= 1'b0;
    agent_data_out <= '0;
    if (rst_n) begin
      int n;
      n = (agent_we_out && !agent_full_in) ? 1 : 0;
      if (txq.size() > n && !(SINGLE && txq[n][32] && $urandom_range(0, 2) == 0)) begin
        agent_we_out   <= 1'b1;
        agent_av_out   <= txq[n][32];
        agent_data_out <= txq[n][31:0];
      end
      if (n == 1) void'(txq.pop_front());
    end
  end
  assign agent_re_out   = rst_n && !agent_empty_in;

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      txq.delete(); cfg_idx <= 0; refuse_left <= REFUSE; refusals <= 0; reads_served <= 0;
      for (int p = 0; p < NPORTS; p++) port_busy[p] = 0;
    end else begin
      if (!agent_empty_in) begin
        if (agent_av_in) begin
          cur_addr <= agent_data_in;
          cfg_idx  <= 0;
        end else if (cur_addr == SDRAM_BASE) begin
          int p;
          p = -1;
          for (int i = NPORTS - 1; i >= 0; i--) if (!port_busy[i]) p = i;
          txq.push_back({1'b1, agent_data_in});
          if (p < 0 || refuse_left > 0) begin
            txq.push_back({1'b0, 32'd0});
            refusals <= refusals + 1;
            if (refuse_left > 0) refuse_left <= refuse_left - 1;
          end else begin
            port_busy[p] = 1;
            port_ret[p]  = agent_data_in;
            txq.push_back({1'b0, PORT_BASE + 32'(p)});
          end
        end else if (cur_addr >= PORT_BASE && cur_addr < PORT_BASE + NPORTS) begin
          cfg[cfg_idx] = agent_data_in;
          cfg_idx <= cfg_idx + 1;
          if (cfg_idx == 3) begin
            int p;
            p = int'(cur_addr - PORT_BASE);
            txq.push_back({1'b1, port_ret[p]});
            for (int r = 0; r < int'(cfg[2]); r++)
              for (int c = 0; c < int'(cfg[1]); c++) begin
                if (SINGLE && (r != 0 || c != 0)) txq.push_back({1'b1, port_ret[p]});
                txq.push_back({1'b0, rd(cfg[0] + 32'(r) * (cfg[1] + cfg[3]) + 32'(c))});
              end
            port_busy[p] = 0;
            reads_served <= reads_served + 1;
          end
        end
      end
    end
  end
endmodule
