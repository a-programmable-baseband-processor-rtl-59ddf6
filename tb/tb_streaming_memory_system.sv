// tb_streaming_memory_system: loads and stores with the strided patterns a
// baseband kernel chain needs, against an SDRAM model with random wait states
// and a flat array standing in for the SRF. Checks a plain block copy, an
// odd/even column gather, a matrix transpose and a strided store, the exact
// transfer time with a zero-wait memory (overlapped over four channels and
// serialised on one), the done pulse and the wait counter.
module tb_streaming_memory_system;
  import sbp_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  xfer_t xfer;
  srf_req_t srf_req;
  word_t srf_rdata;
  logic      [MEM_CHANNELS-1:0] mem_req, mem_we, mem_ack;
  mem_addr_t [MEM_CHANNELS-1:0] mem_addr;
  word_t     [MEM_CHANNELS-1:0] mem_wdata, mem_rdata;
  logic [31:0] mem_wait_cycles;
  int unsigned accesses;
  int checks = 0, failures = 0;

  streaming_memory_system dut (.*);
  sdram_model #(.MAX_WAIT(3)) u_sdram (.clk, .req(mem_req), .we(mem_we), .addr(mem_addr),
                                      .wdata(mem_wdata), .ack(mem_ack), .rdata(mem_rdata),
                                      .accesses);

  always #5 clk = ~clk;

  // SRF stand-in: element writes, element reads with one cycle latency
  word_t srf [1024];
  always @(posedge clk) begin
    if (srf_req.wr_en) srf[srf_req.wr_addr % 1024] <= srf_req.wdata[0];
    if (srf_req.rd_en) srf_rdata <= srf[srf_req.rd_addr % 1024];
  end

  // loads delivered by several channels in one cycle (one must wait in its slot)
  int n_multi_ack = 0;
  always @(posedge clk) if ($countones(mem_ack & ~mem_we) > 1) n_multi_ack++;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // run one transfer, return its length in cycles from start to done
  task automatic run(input xfer_t x, output int cycles);
    @(negedge clk);
    xfer = x; start = 1;
    @(negedge clk);
    start = 0;
    cycles = 1;
    while (!done) begin @(negedge clk); cycles++; end
    @(negedge clk);
    chk(!done && !busy, "done lasts one cycle");
  endtask

  initial begin
    xfer_t x;
    int cyc;
    int unsigned w0;
    localparam int ROWS = 6, COLS = 10; // a ROWS x COLS matrix, row-major in memory
    srf_rdata = '0;
    xfer = '0;
    for (int a = 0; a < 4096; a++) u_sdram.poke(a, word_t'($urandom));
    repeat (2) @(posedge clk);
    rst_n = 1;

    // 1: zero-wait block copy. Memory acks two cycles after a request, so a
    //    channel turns a load around every 3 cycles (request, wait, ack with
    //    SRF write); unit stride rotates over the 4 channels, so the address
    //    generator's one word per cycle is the limit: n cycles plus start,
    //    the last turnaround and done (5).
    u_sdram.max_wait = 0;
    x = '0; x.mem_addr = 100; x.inner_cnt = 20; x.inner_stride = 1; x.outer_cnt = 1;
    x.srf_addr = 0;
    run(x, cyc);
    chk(cyc == 20 + 5, $sformatf("block load time %0d", cyc));
    for (int j = 0; j < 20; j++) chk(srf[j] == u_sdram.peek(100 + j), "block load data");
    //    stride 4 hits a single channel: one access at a time, 3 cycles each,
    //    2 of them waiting for the acknowledge
    w0 = mem_wait_cycles;
    x = '0; x.mem_addr = 3; x.inner_cnt = 12; x.inner_stride = 4; x.outer_cnt = 1;
    x.srf_addr = 40;
    run(x, cyc);
    chk(cyc == 3 * 12 + 3, $sformatf("single-channel load time %0d", cyc)); // + start and done cycles
    chk(mem_wait_cycles - w0 == 2 * 12, $sformatf("wait count %0d", mem_wait_cycles - w0));
    for (int j = 0; j < 12; j++) chk(srf[40 + j] == u_sdram.peek(3 + 4*j), "single-channel data");

    // 2: odd/even column gather of a ROWS x COLS matrix at 200:
    //    even columns to SRF 100.., odd columns to SRF 200..
    u_sdram.max_wait = 3;
    w0 = mem_wait_cycles;
    x = '0; x.mem_addr = 200; x.inner_cnt = COLS/2; x.inner_stride = 2;
    x.outer_cnt = ROWS; x.outer_stride = COLS; x.srf_addr = 100;
    run(x, cyc);
    x.mem_addr = 201; x.srf_addr = 200;
    run(x, cyc);
    for (int r = 0; r < ROWS; r++)
      for (int k = 0; k < COLS/2; k++) begin
        chk(srf[100 + r*COLS/2 + k] == u_sdram.peek(200 + r*COLS + 2*k), "even column gather");
        chk(srf[200 + r*COLS/2 + k] == u_sdram.peek(200 + r*COLS + 2*k + 1), "odd column gather");
      end
    chk(mem_wait_cycles > w0 + 2 * ROWS * COLS, "random wait states stall the transfer");

    // 3: transpose: SRF 300.. gets column-major order of the matrix
    x = '0; x.mem_addr = 200; x.inner_cnt = ROWS; x.inner_stride = COLS;
    x.outer_cnt = COLS; x.outer_stride = 1; x.srf_addr = 300;
    run(x, cyc);
    for (int c = 0; c < COLS; c++)
      for (int r = 0; r < ROWS; r++)
        chk(srf[300 + c*ROWS + r] == u_sdram.peek(200 + r*COLS + c), "transpose");

    // 4: strided store of 12 SRF words to every third word from 1000
    for (int j = 0; j < 12; j++) srf[500 + j] = word_t'($urandom);
    x = '0; x.mem_addr = 1000; x.inner_cnt = 4; x.inner_stride = 3; x.outer_cnt = 3;
    x.outer_stride = 12; x.srf_addr = 500; x.store = 1;
    run(x, cyc);
    for (int j = 0; j < 12; j++) chk(u_sdram.peek(1000 + 3*j) == srf[500 + j], "strided store");

    // 5: empty transfer finishes at once
    x = '0; x.inner_cnt = 0; x.outer_cnt = 5;
    run(x, cyc);
    chk(cyc == 1, "empty transfer");

    chk(n_multi_ack > 0, "simultaneous load acknowledges occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
