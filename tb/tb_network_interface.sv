// tb_network_interface: sends a stream from an SRF stand-in to a receiver
// that stalls at random, and receives a stream from a sender that pauses at
// random. Checks every word and its order, the send rate with an always-ready
// receiver (3 cycles per word), the backpressure counter and the done pulse.
module tb_network_interface;
  import sbp_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, send = 0, busy, done;
  srf_addr_t srf_addr;
  logic [31:0] len;
  srf_req_t srf_req;
  word_t srf_rdata;
  logic net_out_valid, net_out_ready = 0, net_in_valid = 0, net_in_ready;
  word_t net_out_data, net_in_data;
  logic [31:0] backpressure_cycles;
  int checks = 0, failures = 0;

  network_interface dut (.*);

  always #5 clk = ~clk;

  word_t srf [512];
  always @(posedge clk) begin
    if (srf_req.wr_en) srf[srf_req.wr_addr % 512] <= srf_req.wdata[0];
    if (srf_req.rd_en) srf_rdata <= srf[srf_req.rd_addr % 512];
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // receiver: records words; ready pattern chosen by stall_rx
  word_t rx [$];
  bit    stall_rx = 0;
  always @(negedge clk) net_out_ready <= stall_rx ? ($urandom_range(2, 0) == 0) : 1'b1;
  always @(posedge clk) if (net_out_valid && net_out_ready) rx.push_back(net_out_data);

  task automatic do_cmd(bit s, int base, int n, output int cycles);
    @(negedge clk);
    send = s; srf_addr = srf_addr_t'(base); len = n; start = 1;
    @(negedge clk);
    start = 0;
    cycles = 1;
    while (!done) begin @(negedge clk); cycles++; end
    @(negedge clk);
    chk(!done && !busy, "done lasts one cycle");
  endtask

  initial begin
    int cyc;
    word_t tx [$];
    srf_rdata = '0;
    srf_addr = '0;
    len = 0;
    net_in_data = '0;
    for (int a = 0; a < 512; a++) srf[a] = word_t'($urandom);
    repeat (2) @(posedge clk);
    rst_n = 1;

    // send 16 words, receiver always ready
    do_cmd(1, 40, 16, cyc);
    chk(cyc == 3 * 16 + 1, $sformatf("send time %0d", cyc));
    chk(rx.size() == 16, "send count");
    foreach (rx[k]) chk(rx[k] == srf[40 + k], "send data");
    chk(backpressure_cycles == 0, "no backpressure");

    // send 30 words to a stalling receiver
    rx.delete();
    stall_rx = 1;
    do_cmd(1, 300, 30, cyc);
    stall_rx = 0;
    chk(rx.size() == 30, "stalled send count");
    foreach (rx[k]) chk(rx[k] == srf[300 + k], "stalled send data");
    chk(backpressure_cycles > 0, "backpressure seen");

    // receive 25 words from a sender with random gaps
    for (int k = 0; k < 25; k++) tx.push_back(word_t'($urandom));
    fork
      do_cmd(0, 100, 25, cyc);
      begin
        automatic int k = 0;
        while (k < 25) begin
          @(negedge clk);
          net_in_valid = ($urandom_range(1, 0) == 1);
          net_in_data  = tx[k];
          @(posedge clk);
          if (net_in_valid && net_in_ready) k++;
        end
        @(negedge clk);
        net_in_valid = 0;
      end
    join
    for (int k = 0; k < 25; k++) chk(srf[100 + k] == tx[k], "receive data");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
