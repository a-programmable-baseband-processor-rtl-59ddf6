// tb_stream_register_file: random lane and element writes and reads against
// a flat array model of the SRF element space. Reads are checked one cycle
// after the request, lane reads on every lane, element reads for broadcast on
// every lane; same-cycle read and write of one word must return the old one.
module tb_stream_register_file;
  import sbp_pkg::*;
  localparam int unsigned ROWS = 64;
  localparam int unsigned ELEMS = ROWS * NUM_CLUSTERS;
  logic clk = 0;
  srf_req_t req;
  word_t [NUM_CLUSTERS-1:0] rdata;
  int checks = 0, failures = 0;

  stream_register_file #(.ROWS(ROWS)) dut (.clk, .req, .rdata);

  always #5 clk = ~clk;

  word_t model [ELEMS];
  word_t expq [NUM_CLUSTERS];
  bit    exp_valid = 0;

  initial begin
    req = '0;
    // initialise every word with lane writes
    for (int r = 0; r < int'(ROWS); r++) begin
      @(negedge clk);
      req = '0;
      req.wr_en = 1; req.wr_lane = 1; req.wr_addr = srf_addr_t'(r * NUM_CLUSTERS);
      for (int c = 0; c < NUM_CLUSTERS; c++) begin
        req.wdata[c] = word_t'($urandom);
        model[r*NUM_CLUSTERS + c] = req.wdata[c];
      end
    end
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      if (exp_valid) begin
        for (int c = 0; c < NUM_CLUSTERS; c++) begin
          checks++;
          if (rdata[c] !== expq[c]) begin
            failures++;
            if (failures < 10) $display("FAIL lane %0d got %h exp %h", c, rdata[c], expq[c]);
          end
        end
      end
      req = '0;
      exp_valid = 0;
      if ($urandom_range(2, 0) != 0) begin
        int e;
        req.rd_en = 1;
        req.rd_lane = $urandom_range(1, 0);
        e = $urandom_range(ELEMS - 1, 0);
        if (req.rd_lane) e = e - e % NUM_CLUSTERS;
        req.rd_addr = srf_addr_t'(e);
        for (int c = 0; c < NUM_CLUSTERS; c++)
          expq[c] = req.rd_lane ? model[e + c] : model[e];
        exp_valid = 1;
      end
      if ($urandom_range(1, 0) != 0) begin
        int e;
        req.wr_en = 1;
        req.wr_lane = $urandom_range(1, 0);
        e = (n % 4 == 0 && req.rd_en) ? int'(req.rd_addr) : $urandom_range(ELEMS - 1, 0);
        if (req.wr_lane) e = e - e % NUM_CLUSTERS;
        req.wr_addr = srf_addr_t'(e);
        for (int c = 0; c < NUM_CLUSTERS; c++) req.wdata[c] = word_t'($urandom);
        if (req.wr_lane) for (int c = 0; c < NUM_CLUSTERS; c++) model[e + c] = req.wdata[c];
        else model[e] = req.wdata[0];
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
