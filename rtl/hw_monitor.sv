// Hardware monitor: counts for how many clock cycles each observed signal
// is active, controlled and read over HIBI.
//
// What it does
//   NUM_SIG signals, chosen at design time (in the video encoder: busy of
//   the DQ wrapper, busy of the DQ accelerator, busy of the ME wrapper,
//   busy of the ME accelerator), each drive one CNT_W-bit counter.  While
//   counting is started, counter i increments in every cycle in which
//   mon_in[i] is 1.
//
// Commands (data words sent to the monitor's HIBI address)
//   bits 1..0 = MON_CLEAR  : zero all counters
//               MON_START  : start counting
//               MON_STOP   : stop counting
//               MON_REPORT : the next data word is a return address; the
//                            monitor sends that address followed by the
//                            NUM_SIG counter values (counter 0 first),
//                            sampled in the cycle the return address arrives.
//
// Interface / timing
//   Agent side of one hibi_wrapper.  One command word per cycle; a report
//   needs NUM_SIG + 1 transmit cycles when HIBI is not full.  Counters
//   saturate at all ones.
//
// Document vs own choice
//   Counting active cycles, the four commands and replying over HIBI follow
//   the thesis.  The command encoding, the return-address word, the
//   snapshot on report and saturation are own choices.
module hw_monitor
  import hibi_pkg::*;
#(
  parameter int unsigned NUM_SIG = 4,
  parameter int unsigned CNT_W   = 32
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [NUM_SIG-1:0] mon_in,
  // HIBI receive bundle
  input  logic [COMM_W-1:0]  hibi_comm_in,
  input  logic [DATA_W-1:0]  hibi_data_in,
  input  logic               hibi_av_in,
  input  logic               hibi_empty_in,
  output logic               hibi_re_out,
  // HIBI transmit bundle
  output logic [COMM_W-1:0]  hibi_comm_out,
  output logic [DATA_W-1:0]  hibi_data_out,
  output logic               hibi_av_out,
  output logic               hibi_we_out,
  input  logic               hibi_full_in,
  output logic               running_out
);

  localparam int unsigned IW = (NUM_SIG > 1) ? $clog2(NUM_SIG) : 1;

  typedef enum logic [1:0] {M_CMD, M_RET, M_SEND_ADDR, M_SEND_DATA} mon_state_t;
  mon_state_t state;

  logic [CNT_W-1:0]  cnt  [NUM_SIG];
  logic [CNT_W-1:0]  snap [NUM_SIG];
  logic [DATA_W-1:0] ret_addr;
  logic [IW-1:0]     idx;
  logic              running;

  wire rx_word = !hibi_empty_in && !hibi_av_in;
  assign hibi_re_out = !hibi_empty_in && (hibi_av_in || state == M_CMD || state == M_RET);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= M_CMD;
      running  <= 1'b0;
      ret_addr <= '0;
      idx      <= '0;
      for (int i = 0; i < NUM_SIG; i++) begin
        cnt[i]  <= '0;
        snap[i] <= '0;
      end
    end else begin
      for (int i = 0; i < NUM_SIG; i++)
        if (running && mon_in[i] && cnt[i] != '1) cnt[i] <= cnt[i] + 1'b1;
      case (state)
        M_CMD: if (rx_word) begin
          case (hibi_data_in[1:0])
            MON_CLEAR:  for (int i = 0; i < NUM_SIG; i++) cnt[i] <= '0;
            MON_START:  running <= 1'b1;
            MON_STOP:   running <= 1'b0;
            MON_REPORT: state <= M_RET;
            default: ;
          endcase
        end
        M_RET: if (rx_word) begin
          ret_addr <= hibi_data_in;
          for (int i = 0; i < NUM_SIG; i++) snap[i] <= cnt[i];
          state <= M_SEND_ADDR;
        end
        M_SEND_ADDR: if (!hibi_full_in) begin
          idx   <= '0;
          state <= M_SEND_DATA;
        end
        M_SEND_DATA: if (!hibi_full_in) begin
          if (idx == IW'(NUM_SIG - 1)) state <= M_CMD;
          else idx <= idx + 1'b1;
        end
        default: state <= M_CMD;
      endcase
    end
  end

  assign running_out   = running;
  assign hibi_we_out   = state == M_SEND_ADDR || state == M_SEND_DATA;
  assign hibi_av_out   = state == M_SEND_ADDR;
  assign hibi_comm_out = hibi_we_out ? CMD_WR : CMD_IDLE;
  assign hibi_data_out = (state == M_SEND_ADDR) ? ret_addr : DATA_W'(snap[idx]);

endmodule
