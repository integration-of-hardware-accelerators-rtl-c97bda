// hibi_wrapper: attaches one IP block (agent) to a HIBI bus segment.
//
// Agent side: a transmit bundle (comm/data/av/we in, full out) writing a TX
// FIFO and a receive bundle (comm/data/av/empty out, re in) reading a
// first-word-fall-through RX FIFO.  The agent is always the master: it writes
// an address word (av=1) followed by data words, and it reads what arrives,
// address words included, so that it can use the low address bits.
//
// Bus side: every wrapper drives bus_*_out and all of them are ORed into the
// bus_*_in seen by every wrapper, so an idle wrapper drives zeros.  A word is
// on the bus when bus_comm is not CMD_IDLE.
//
// Arbitration is distributed round robin: every wrapper keeps the same turn
// counter, which advances each cycle in which no wrapper holds bus_lock.  The
// wrapper whose ID equals the turn, and which has something to send, takes the
// bus in the next cycle and holds bus_lock while it sends one transfer (one
// address and its data words, one word per cycle).  It gives the bus up when
// its TX FIFO runs dry, when the next word is a new address, or when the
// target reports full; it then re-arbitrates and, if it was in the middle of a
// transfer, repeats the address word first.
//
// Address decoding is distributed: a wrapper accepts an address word whose
// bits above ADDR_OFS_W equal those of ADDR_BASE and the data words that
// follow it.  If its RX FIFO is full it raises bus_full_out in the same cycle;
// the word is then not taken and the sender retries later.
//
// The document gives the bundles, the OR-resolved bus, address-first
// transfers, distributed address decoding and round-robin arbitration; the
// cycle-level protocol, the FIFO depths and the retry on full are this
// implementation's choices.
module hibi_wrapper
  import hibi_pkg::*;
#(
  parameter int unsigned        N_AGENTS   = 4,
  parameter int unsigned        ID         = 0,
  parameter logic [DATA_W-1:0]  ADDR_BASE  = 32'h0100_0000,
  parameter int unsigned        ADDR_OFS_W = IP_OFS_W,
  parameter int unsigned        TX_DEPTH   = 8,
  parameter int unsigned        RX_DEPTH   = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  // agent transmit bundle
  input  logic [COMM_W-1:0] agent_comm_in,
  input  logic [DATA_W-1:0] agent_data_in,
  input  logic              agent_av_in,
  input  logic              agent_we_in,
  output logic              agent_full_out,
  // agent receive bundle
  output logic [COMM_W-1:0] agent_comm_out,
  output logic [DATA_W-1:0] agent_data_out,
  output logic              agent_av_out,
  output logic              agent_empty_out,
  input  logic              agent_re_in,
  // HIBI bundle
  output logic [COMM_W-1:0] bus_comm_out,
  output logic [DATA_W-1:0] bus_data_out,
  output logic              bus_av_out,
  output logic              bus_lock_out,
  output logic              bus_full_out,
  input  logic [COMM_W-1:0] bus_comm_in,
  input  logic [DATA_W-1:0] bus_data_in,
  input  logic              bus_av_in,
  input  logic              bus_lock_in,
  input  logic              bus_full_in
);
  localparam int unsigned TW = (N_AGENTS > 1) ? $clog2(N_AGENTS) : 1;

  // ---------------- transmit side ----------------
  hibi_word_t tx_head;
  logic       tx_empty, tx_full, tx_pop;
  logic [$clog2(TX_DEPTH+1)-1:0] tx_count;

  sync_fifo #(.WIDTH($bits(hibi_word_t)), .DEPTH(TX_DEPTH)) u_tx_fifo (
    .clk, .rst_n,
    .wr_en(agent_we_in), .wr_data({agent_av_in, agent_comm_in, agent_data_in}),
    .rd_en(tx_pop), .rd_data(tx_head), .empty(tx_empty), .full(tx_full),
    .count(tx_count)
  );
  assign agent_full_out = tx_full;

  logic [TW-1:0]     turn;
  logic              owner, first, need_addr;
  logic [DATA_W-1:0] cur_addr;
  logic [COMM_W-1:0] cur_comm;
  logic              drive_word;   // a word is on our bus outputs this cycle
  logic              accepted;

  always_comb begin
    drive_word   = 1'b0;
    bus_comm_out = CMD_IDLE;
    bus_data_out = '0;
    bus_av_out   = 1'b0;
    if (owner) begin
      if (need_addr) begin
        drive_word   = 1'b1;
        bus_comm_out = cur_comm;
        bus_data_out = cur_addr;
        bus_av_out   = 1'b1;
      end else if (!tx_empty && (first || !tx_head.av)) begin
        drive_word   = 1'b1;
        bus_comm_out = tx_head.comm;
        bus_data_out = tx_head.data;
        bus_av_out   = tx_head.av;
      end
    end
  end
  assign bus_lock_out = owner;
  assign accepted     = drive_word && !bus_full_in;
  assign tx_pop       = accepted && !need_addr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      turn      <= '0;
      owner     <= 1'b0;
      first     <= 1'b0;
      need_addr <= 1'b0;
      cur_addr  <= '0;
      cur_comm  <= CMD_WR;
    end else begin
      if (!bus_lock_in)
        turn <= (turn == TW'(N_AGENTS - 1)) ? '0 : turn + 1'b1;
      if (!owner) begin
        if (!bus_lock_in && turn == TW'(ID) && !tx_empty) begin
          owner     <= 1'b1;
          first     <= 1'b1;
          need_addr <= !tx_head.av;
        end
      end else if (!drive_word || bus_full_in) begin
        // transfer ended, or target full: give the bus away
        owner <= 1'b0;
        first <= 1'b0;
      end else begin
        first <= 1'b0;
        if (need_addr) begin
          need_addr <= 1'b0;
        end else if (tx_head.av) begin
          cur_addr <= tx_head.data;
          cur_comm <= tx_head.comm;
        end
      end
    end
  end

  // ---------------- receive side ----------------
  logic bus_valid, addr_match, selected, addressed, rx_full, rx_empty;
  hibi_word_t rx_head;
  logic [$clog2(RX_DEPTH+1)-1:0] rx_count;

  assign bus_valid  = (bus_comm_in != CMD_IDLE);
  assign addr_match = (bus_data_in >> ADDR_OFS_W) == (ADDR_BASE >> ADDR_OFS_W);
  assign addressed  = bus_valid && (bus_av_in ? addr_match : selected);
  assign bus_full_out = addressed && rx_full;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) selected <= 1'b0;
    else if (bus_valid && bus_av_in) selected <= addr_match;
  end

  sync_fifo #(.WIDTH($bits(hibi_word_t)), .DEPTH(RX_DEPTH)) u_rx_fifo (
    .clk, .rst_n,
    .wr_en(addressed && !rx_full), .wr_data({bus_av_in, bus_comm_in, bus_data_in}),
    .rd_en(agent_re_in), .rd_data(rx_head), .empty(rx_empty), .full(rx_full),
    .count(rx_count)
  );
  assign agent_comm_out  = rx_head.comm;
  assign agent_data_out  = rx_head.data;
  assign agent_av_out    = rx_head.av;
  assign agent_empty_out = rx_empty;

  // Only the owner may drive a word.
  a_drive_owner: assert property (@(posedge clk) disable iff (!rst_n)
                                  drive_word |-> owner);
endmodule
