// stream_register_file: the banked on-chip stream store (SRF).
//
// The SRF sits between the clusters, the streaming memory system and the
// network interface and keeps the streams a kernel works on, so that data a
// kernel sequence reuses does not go back to external memory. It is split
// into NUM_CLUSTERS banks, one per cluster lane: element e lives in bank
// e % NUM_CLUSTERS, row e / NUM_CLUSTERS. A lane access touches one row of
// every bank at once (one word per cluster); an element access touches one
// bank. Each bank has one read and one write port per cycle.
//
// Interface: one request bundle (srf_req_t) from whichever client currently
// owns the SRF. Timing: reads are synchronous, rdata is valid the cycle after
// rd_en; an element read returns the word on every lane (broadcast). A read
// and a write of the same word in one cycle returns the old word.
// The bank count follows the cluster count; the depth (SRF_ROWS) and the
// port arrangement are this design's own choices.
module stream_register_file
  import sbp_pkg::*;
#(
  parameter int unsigned ROWS = SRF_ROWS
)(
  input  logic                     clk,
  input  srf_req_t                 req,
  output word_t [NUM_CLUSTERS-1:0] rdata
);
  localparam int unsigned LW = $clog2(NUM_CLUSTERS);
  localparam int unsigned RW = $clog2(ROWS);

  word_t                    bank_q [NUM_CLUSTERS];
  logic                     rd_lane_q;
  logic [LW-1:0]            rd_sel_q;

  logic [RW-1:0] rd_row, wr_row;
  logic [LW-1:0] rd_sel, wr_sel;
  assign rd_row = RW'(req.rd_addr >> LW);
  assign rd_sel = req.rd_addr[LW-1:0];
  assign wr_row = RW'(req.wr_addr >> LW);
  assign wr_sel = req.wr_addr[LW-1:0];

  for (genvar c = 0; c < NUM_CLUSTERS; c++) begin : g_bank
    word_t mem [ROWS];
    logic  we;
    word_t wd;
    assign we = req.wr_en && (req.wr_lane || wr_sel == LW'(c));
    assign wd = req.wr_lane ? req.wdata[c] : req.wdata[0];
    always_ff @(posedge clk) begin
      if (we) mem[wr_row] <= wd;
      if (req.rd_en) bank_q[c] <= mem[rd_row];
    end
  end

  always_ff @(posedge clk) begin
    if (req.rd_en) begin
      rd_lane_q <= req.rd_lane;
      rd_sel_q  <= rd_sel;
    end
  end

  always_comb begin
    for (int c = 0; c < NUM_CLUSTERS; c++)
      rdata[c] = rd_lane_q ? bank_q[c] : bank_q[rd_sel_q];
  end
endmodule
