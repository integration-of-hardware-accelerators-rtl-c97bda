// video_encoder_soc: the hardware-accelerated multiprocessor video encoder
// interconnect: HIBI segment, resource manager, hardware monitor, DCT-Q-IDCT
// wrapper and motion-estimation wrapper.
//
// What it contains
//   One HIBI segment with NUM_CPUS + 5 agents, each behind a hibi_wrapper:
//     agent 0                  master CPU port        (external)
//     agents 1 .. NUM_SLAVES   slave CPU ports        (external)
//     agent NUM_CPUS           SDRAM controller port  (external, 22-bit offset)
//     agent NUM_CPUS+1         resource_manager
//     agent NUM_CPUS+2         me_wrapper  -> ME accelerator ports (external)
//     agent NUM_CPUS+3         hw_monitor
//     agent NUM_CPUS+4         dq_wrapper  -> DQ accelerator ports (external)
//   The bus is the OR of all wrapper bus outputs (an idle wrapper drives
//   zeros).  The processors (Nios II with their DMA, timers and memories),
//   the SDRAM controller and both accelerators are not part of this design;
//   their HIBI agent ports and accelerator ports are top-level ports.
//   The hardware monitor observes, in this order, busy of the DQ wrapper,
//   busy of the DQ accelerator, busy of the ME wrapper and busy of the ME
//   accelerator.
//
// Address map (hibi_pkg): SDRAM 0x0000_0000 (16 MB), RM 0x0100_0000,
//   ME 0x0100_0200, DQ 0x0100_0400, monitor 0x0100_0600, CPU k at
//   0x0100_1000 + k*0x200 (master k = 0).  Each IP owns a 512-word window.
//
// Timing: one clock (50 MHz in the thesis system), active-low asynchronous
//   reset.  External agent ports have the same timing as the agent side of
//   hibi_wrapper: first-word-fall-through receive (data valid while
//   *_empty_out is 0, taken with *_re_in), and *_we_in words accepted in any
//   cycle in which *_full_out is 0.
//
// Document vs own choice
//   The set of blocks and their connection follow the thesis's block diagram;
//   two slave processors is the measured accelerated configuration.  The
//   wrappers use CPU release (USE_SELF_REL = 0, the generic default); the
//   address map and agent numbering are own choices.
module video_encoder_soc
  import hibi_pkg::*;
#(
  parameter int unsigned NUM_SLAVES   = 2,
  parameter bit          USE_SELF_REL = 1'b0,
  parameter int unsigned TX_DEPTH     = 8,
  parameter int unsigned RX_DEPTH     = 8
) (
  input  logic clk,
  input  logic rst_n,
  // CPU HIBI agent ports, index 0 = master
  input  logic [NUM_SLAVES:0][COMM_W-1:0] cpu_comm_in,
  input  logic [NUM_SLAVES:0][DATA_W-1:0] cpu_data_in,
  input  logic [NUM_SLAVES:0]             cpu_av_in,
  input  logic [NUM_SLAVES:0]             cpu_we_in,
  output logic [NUM_SLAVES:0]             cpu_full_out,
  output logic [NUM_SLAVES:0][COMM_W-1:0] cpu_comm_out,
  output logic [NUM_SLAVES:0][DATA_W-1:0] cpu_data_out,
  output logic [NUM_SLAVES:0]             cpu_av_out,
  output logic [NUM_SLAVES:0]             cpu_empty_out,
  input  logic [NUM_SLAVES:0]             cpu_re_in,
  // SDRAM controller HIBI agent port
  input  logic [COMM_W-1:0] sdram_comm_in,
  input  logic [DATA_W-1:0] sdram_data_in,
  input  logic              sdram_av_in,
  input  logic              sdram_we_in,
  output logic              sdram_full_out,
  output logic [COMM_W-1:0] sdram_comm_out,
  output logic [DATA_W-1:0] sdram_data_out,
  output logic              sdram_av_out,
  output logic              sdram_empty_out,
  input  logic              sdram_re_in,
  // DCT-Q-IDCT accelerator
  output logic [8:0]        dq_data_dct_out,
  output logic              dq_wr_dct_out,
  input  logic              dq_dct_ready4column_in,
  output logic [4:0]        dq_qp_out,
  output logic              dq_intra_out,
  output logic              dq_chroma_out,
  output logic              dq_loadqp_out,
  input  logic [7:0]        dq_data_quant_in,
  input  logic              dq_wr_quant_in,
  output logic              dq_quant_ready4column_out,
  input  logic [8:0]        dq_data_idct_in,
  input  logic              dq_wr_idct_in,
  output logic              dq_idct_ready4column_out,
  // motion-estimation accelerator
  output logic [127:0]      me_data_out,
  output logic              me_valid_ref_data_out,
  output logic              me_valid_cur_data_out,
  input  logic              me_new_ref_area_in,
  input  logic              me_new_cur_mb_in,
  input  logic              me_ref_area_stored_in,
  input  logic              me_cur_mb_stored_in,
  input  logic [127:0]      me_data_in,
  input  logic              me_new_result_in,
  input  logic              me_valid_sad_in,
  input  logic              me_valid_mv_in,
  input  logic              me_valid_mb_in,
  output logic              me_target_ready_out,
  output logic              me_repeat_delivery_out,
  output logic              me_result_loaded_out,
  // status
  output logic [1:0]        rm_busy_out,
  output logic              monitor_running_out,
  output logic [15:0]       me_port_retries_out
);

  localparam int unsigned NUM_CPUS = NUM_SLAVES + 1;
  localparam int unsigned A_SDRAM  = NUM_CPUS;
  localparam int unsigned A_RM     = NUM_CPUS + 1;
  localparam int unsigned A_ME     = NUM_CPUS + 2;
  localparam int unsigned A_MON    = NUM_CPUS + 3;
  localparam int unsigned A_DQ     = NUM_CPUS + 4;
  localparam int unsigned N        = NUM_CPUS + 5;

  // agent-side signals of every hibi_wrapper
  logic [N-1:0][COMM_W-1:0] w_comm, r_comm;
  logic [N-1:0][DATA_W-1:0] w_data, r_data;
  logic [N-1:0]             w_av, w_we, w_full, r_av, r_empty, r_re;

  // bus
  logic [N-1:0][COMM_W-1:0] b_comm;
  logic [N-1:0][DATA_W-1:0] b_data;
  logic [N-1:0]             b_av, b_lock, b_full;
  logic [COMM_W-1:0] bus_comm;
  logic [DATA_W-1:0] bus_data;
  logic              bus_av, bus_lock, bus_full;

  always_comb begin
    bus_comm = '0;
    bus_data = '0;
    bus_av   = 1'b0;
    bus_lock = 1'b0;
    bus_full = 1'b0;
    for (int i = 0; i < N; i++) begin
      bus_comm |= b_comm[i];
      bus_data |= b_data[i];
      bus_av   |= b_av[i];
      bus_lock |= b_lock[i];
      bus_full |= b_full[i];
    end
  end

  function automatic logic [DATA_W-1:0] agent_base(input int unsigned i);
    if (i < NUM_CPUS)  return CPU_BASE + DATA_W'(i) * 32'h200;
    if (i == A_SDRAM)  return SDRAM_BASE;
    if (i == A_RM)     return RM_BASE;
    if (i == A_ME)     return ME_BASE;
    if (i == A_MON)    return MON_BASE;
    return DQ_BASE;
  endfunction

  for (genvar i = 0; i < N; i++) begin : g_hibi
    hibi_wrapper #(
      .N_AGENTS  (N),
      .ID        (i),
      .ADDR_BASE (agent_base(i)),
      .ADDR_OFS_W(i == A_SDRAM ? SDRAM_OFS_W : IP_OFS_W),
      .TX_DEPTH  (TX_DEPTH),
      .RX_DEPTH  (RX_DEPTH)
    ) u_hibi (
      .clk, .rst_n,
      .agent_comm_in (w_comm[i]), .agent_data_in(w_data[i]), .agent_av_in(w_av[i]),
      .agent_we_in   (w_we[i]),   .agent_full_out(w_full[i]),
      .agent_comm_out(r_comm[i]), .agent_data_out(r_data[i]), .agent_av_out(r_av[i]),
      .agent_empty_out(r_empty[i]), .agent_re_in(r_re[i]),
      .bus_comm_out(b_comm[i]), .bus_data_out(b_data[i]), .bus_av_out(b_av[i]),
      .bus_lock_out(b_lock[i]), .bus_full_out(b_full[i]),
      .bus_comm_in(bus_comm), .bus_data_in(bus_data), .bus_av_in(bus_av),
      .bus_lock_in(bus_lock), .bus_full_in(bus_full)
    );
  end

  // external agents: processors and SDRAM controller
  for (genvar k = 0; k < NUM_CPUS; k++) begin : g_cpu
    assign w_comm[k]        = cpu_comm_in[k];
    assign w_data[k]        = cpu_data_in[k];
    assign w_av[k]          = cpu_av_in[k];
    assign w_we[k]          = cpu_we_in[k];
    assign cpu_full_out[k]  = w_full[k];
    assign cpu_comm_out[k]  = r_comm[k];
    assign cpu_data_out[k]  = r_data[k];
    assign cpu_av_out[k]    = r_av[k];
    assign cpu_empty_out[k] = r_empty[k];
    assign r_re[k]          = cpu_re_in[k];
  end

  assign w_comm[A_SDRAM]  = sdram_comm_in;
  assign w_data[A_SDRAM]  = sdram_data_in;
  assign w_av[A_SDRAM]    = sdram_av_in;
  assign w_we[A_SDRAM]    = sdram_we_in;
  assign sdram_full_out   = w_full[A_SDRAM];
  assign sdram_comm_out   = r_comm[A_SDRAM];
  assign sdram_data_out   = r_data[A_SDRAM];
  assign sdram_av_out     = r_av[A_SDRAM];
  assign sdram_empty_out  = r_empty[A_SDRAM];
  assign r_re[A_SDRAM]    = sdram_re_in;

  // resource manager: type 0 = DQ, type 1 = ME
  resource_manager u_rm (
    .clk, .rst_n,
    .hibi_comm_in(r_comm[A_RM]), .hibi_data_in(r_data[A_RM]), .hibi_av_in(r_av[A_RM]),
    .hibi_empty_in(r_empty[A_RM]), .hibi_re_out(r_re[A_RM]),
    .hibi_comm_out(w_comm[A_RM]), .hibi_data_out(w_data[A_RM]), .hibi_av_out(w_av[A_RM]),
    .hibi_we_out(w_we[A_RM]), .hibi_full_in(w_full[A_RM]),
    .busy_out(rm_busy_out)
  );

  logic me_busy, me_acc_busy, dq_busy, dq_acc_busy;

  me_wrapper #(
    .USE_SELF_REL(USE_SELF_REL),
    .OWN_ADDRESS (ME_BASE),
    .RM_ADDRESS  (rm_addr(RM_BASE, RM_TYPE_ME, 1'b1, 1'b0))
  ) u_me_wrapper (
    .clk, .rst_n,
    .hibi_comm_in(r_comm[A_ME]), .hibi_data_in(r_data[A_ME]), .hibi_av_in(r_av[A_ME]),
    .hibi_empty_in(r_empty[A_ME]), .hibi_re_out(r_re[A_ME]),
    .hibi_comm_out(w_comm[A_ME]), .hibi_data_out(w_data[A_ME]), .hibi_av_out(w_av[A_ME]),
    .hibi_we_out(w_we[A_ME]), .hibi_full_in(w_full[A_ME]),
    .me_data_out, .me_valid_ref_data_out, .me_valid_cur_data_out,
    .me_new_ref_area_in, .me_new_cur_mb_in, .me_ref_area_stored_in, .me_cur_mb_stored_in,
    .me_data_in, .me_new_result_in, .me_valid_sad_in, .me_valid_mv_in, .me_valid_mb_in,
    .me_target_ready_out, .me_repeat_delivery_out, .me_result_loaded_out,
    .busy_out(me_busy), .acc_busy_out(me_acc_busy), .port_retries_out(me_port_retries_out)
  );

  hw_monitor #(.NUM_SIG(4)) u_monitor (
    .clk, .rst_n,
    .mon_in({me_acc_busy, me_busy, dq_acc_busy, dq_busy}),
    .hibi_comm_in(r_comm[A_MON]), .hibi_data_in(r_data[A_MON]), .hibi_av_in(r_av[A_MON]),
    .hibi_empty_in(r_empty[A_MON]), .hibi_re_out(r_re[A_MON]),
    .hibi_comm_out(w_comm[A_MON]), .hibi_data_out(w_data[A_MON]), .hibi_av_out(w_av[A_MON]),
    .hibi_we_out(w_we[A_MON]), .hibi_full_in(w_full[A_MON]),
    .running_out(monitor_running_out)
  );

  dq_wrapper #(
    .USE_SELF_REL(USE_SELF_REL),
    .OWN_ADDRESS (DQ_BASE),
    .RM_ADDRESS  (rm_addr(RM_BASE, RM_TYPE_DQ, 1'b1, 1'b0))
  ) u_dq_wrapper (
    .clk, .rst_n,
    .hibi_comm_in(r_comm[A_DQ]), .hibi_data_in(r_data[A_DQ]), .hibi_av_in(r_av[A_DQ]),
    .hibi_empty_in(r_empty[A_DQ]), .hibi_re_out(r_re[A_DQ]),
    .hibi_comm_out(w_comm[A_DQ]), .hibi_data_out(w_data[A_DQ]), .hibi_av_out(w_av[A_DQ]),
    .hibi_we_out(w_we[A_DQ]), .hibi_full_in(w_full[A_DQ]),
    .data_dct_out(dq_data_dct_out), .wr_dct_out(dq_wr_dct_out),
    .dct_ready4column_in(dq_dct_ready4column_in),
    .qp_out(dq_qp_out), .intra_out(dq_intra_out), .chroma_out(dq_chroma_out),
    .loadqp_out(dq_loadqp_out),
    .data_quant_in(dq_data_quant_in), .wr_quant_in(dq_wr_quant_in),
    .quant_ready4column_out(dq_quant_ready4column_out),
    .data_idct_in(dq_data_idct_in), .wr_idct_in(dq_wr_idct_in),
    .idct_ready4column_out(dq_idct_ready4column_out),
    .busy_out(dq_busy), .acc_busy_out(dq_acc_busy)
  );

endmodule
