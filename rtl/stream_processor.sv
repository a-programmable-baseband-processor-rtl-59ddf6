// stream_processor: programmable stream processor for baseband processing.
//
// A baseband receiver is a chain of kernels (correlation updates, matrix
// products, matched filter, interference cancellation, Viterbi decoding) that
// are almost all multiply-accumulate work and highly data parallel. This
// processor runs them as SIMD kernels on NUM_CLUSTERS = 8 VLIW clusters, each
// with three adders and three multipliers, fed with streams from a banked
// stream register file (SRF). A host processor posts stream commands to the
// stream controller: loads and stores between the four SDRAM channels and
// the SRF (with strided patterns that rearrange data between kernels),
// kernel launches on the microcontroller, and transfers between the SRF and
// the network port.
//
//   host cmd -> stream_controller -+-> streaming_memory_system <-> SDRAM x4
//                                  +-> microcontroller -> alu_cluster x8
//                                  +-> network_interface <-> network
//   all three data movers share the stream_register_file, one at a time
//
// Interface: host command queue (cmd_valid/cmd_ready/cmd), microcode write
// port, four SDRAM request/acknowledge channels, network valid/ready ports in
// and out, and status counters. Timing is that of the units: see their files.
// The block structure, the eight clusters and the 3+3 unit mix follow the
// design; everything below the block level is this design's own choice.
module stream_processor
  import sbp_pkg::*;
(
  input  logic                         clk,
  input  logic                         rst_n,
  // host processor
  input  logic                         cmd_valid,
  output logic                         cmd_ready,
  input  cmd_t                         cmd,
  output logic                         idle,
  input  logic                         ucode_we,
  input  pc_t                          ucode_addr,
  input  instr_t                       ucode_wdata,
  // SDRAM channels
  output logic      [MEM_CHANNELS-1:0] mem_req,
  output logic      [MEM_CHANNELS-1:0] mem_we,
  output mem_addr_t [MEM_CHANNELS-1:0] mem_addr,
  output word_t     [MEM_CHANNELS-1:0] mem_wdata,
  input  logic      [MEM_CHANNELS-1:0] mem_ack,
  input  word_t     [MEM_CHANNELS-1:0] mem_rdata,
  // network
  output logic                         net_out_valid,
  input  logic                         net_out_ready,
  output word_t                        net_out_data,
  input  logic                         net_in_valid,
  output logic                         net_in_ready,
  input  word_t                        net_in_data,
  // status
  output logic [31:0]                  cmds_done,
  output logic [31:0]                  stall_cycles,
  output logic [31:0]                  kernel_cycles,
  output logic [31:0]                  queue_full_cycles,
  output logic [31:0]                  mem_wait_cycles,
  output logic [31:0]                  net_backpressure_cycles,
  output logic [31:0]                  perf_cycles,
  output logic [31:0]                  perf_add_ops,
  output logic [31:0]                  perf_mul_ops
);
  // stream controller <-> units
  logic                    mem_start, mem_done, mem_busy;
  xfer_t                   mem_xfer;
  logic                    kern_start, kern_done, kern_busy;
  pc_t                     kern_pc;
  srf_addr_t [NUM_IN-1:0]  kern_in_base;
  srf_addr_t [NUM_OUT-1:0] kern_out_base;
  logic                    net_start, net_done, net_busy, net_send;
  srf_addr_t               net_srf_addr;
  logic [31:0]             net_len;
  logic [1:0]              owner;

  // SRF
  srf_req_t                 srf_req, mem_srf_req, net_srf_req, kern_srf_req;
  word_t [NUM_CLUSTERS-1:0] srf_rdata;

  // clusters
  logic                     issue;
  instr_t                   instr;
  word_t [NUM_CLUSTERS-1:0] cl_out;
  logic                     k_rd_en, k_rd_lane, k_wr_en;
  srf_addr_t                k_rd_addr, k_wr_addr;

  stream_controller u_sc (
    .clk, .rst_n,
    .cmd_valid, .cmd_ready, .cmd, .idle,
    .mem_start, .mem_xfer, .mem_done,
    .kern_start, .kern_pc, .kern_in_base, .kern_out_base, .kern_done,
    .net_start, .net_send, .net_srf_addr, .net_len, .net_done,
    .owner,
    .cmds_done, .stall_cycles, .kernel_cycles, .queue_full_cycles
  );

  streaming_memory_system u_mem (
    .clk, .rst_n,
    .start (mem_start), .xfer (mem_xfer), .busy (mem_busy), .done (mem_done),
    .srf_req (mem_srf_req), .srf_rdata (srf_rdata[0]),
    .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_ack, .mem_rdata,
    .mem_wait_cycles
  );

  network_interface u_net (
    .clk, .rst_n,
    .start (net_start), .send (net_send), .srf_addr (net_srf_addr), .len (net_len),
    .busy (net_busy), .done (net_done),
    .srf_req (net_srf_req), .srf_rdata (srf_rdata[0]),
    .net_out_valid, .net_out_ready, .net_out_data,
    .net_in_valid, .net_in_ready, .net_in_data,
    .backpressure_cycles (net_backpressure_cycles)
  );

  microcontroller u_uc (
    .clk, .rst_n,
    .ucode_we, .ucode_addr, .ucode_wdata,
    .start (kern_start), .start_pc (kern_pc),
    .in_base (kern_in_base), .out_base (kern_out_base),
    .busy (kern_busy), .done (kern_done),
    .issue, .instr,
    .srf_rd_en (k_rd_en), .srf_rd_lane (k_rd_lane), .srf_rd_addr (k_rd_addr),
    .srf_wr_en (k_wr_en), .srf_wr_addr (k_wr_addr),
    .perf_cycles, .perf_add_ops, .perf_mul_ops
  );

  for (genvar c = 0; c < NUM_CLUSTERS; c++) begin : g_cl
    alu_cluster #(.CID(c)) u_cl (
      .clk, .rst_n,
      .issue, .instr,
      .srf_rdata (srf_rdata[c]),
      .out_data  (cl_out[c]),
      .add_busy (), .mul_busy ()
    );
  end

  always_comb begin
    kern_srf_req         = '0;
    kern_srf_req.rd_en   = k_rd_en;
    kern_srf_req.rd_lane = k_rd_lane;
    kern_srf_req.rd_addr = k_rd_addr;
    kern_srf_req.wr_en   = k_wr_en;
    kern_srf_req.wr_lane = 1'b1;
    kern_srf_req.wr_addr = k_wr_addr;
    kern_srf_req.wdata   = cl_out;
    unique case (owner)
      2'd1:    srf_req = mem_srf_req;
      2'd2:    srf_req = kern_srf_req;
      2'd3:    srf_req = net_srf_req;
      default: srf_req = '0;
    endcase
  end

  stream_register_file u_srf (
    .clk, .req (srf_req), .rdata (srf_rdata)
  );

  a_one_busy: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0({mem_busy, kern_busy, net_busy}))
    else $error("two data movers active at once");
endmodule
