// tb_microcontroller: loads a kernel with two nested loops, runs it and
// compares, cycle by cycle, the broadcast instruction and the SRF stream
// requests with a trace the testbench builds from the loop structure. Then
// checks the kernel length, the done pulse and the operation counters, and
// that a second launch restarts the stream offsets.
module tb_microcontroller;
  import sbp_pkg::*;
  logic clk = 0, rst_n = 0;
  logic ucode_we = 0, start = 0;
  pc_t ucode_addr, start_pc;
  instr_t ucode_wdata;
  srf_addr_t [NUM_IN-1:0] in_base;
  srf_addr_t [NUM_OUT-1:0] out_base;
  logic busy, done, issue;
  instr_t instr;
  logic srf_rd_en, srf_rd_lane, srf_wr_en;
  srf_addr_t srf_rd_addr, srf_wr_addr;
  logic [31:0] perf_cycles, perf_add_ops, perf_mul_ops;
  int checks = 0, failures = 0;

  microcontroller dut (.*);

  always #5 clk = ~clk;

  instr_t prog [16];

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    int trace [$];
    int rd_lane_n = 0, rd_b_n = 0, wr_n = 0;
    int cyc;
    localparam int OUTER = 3, INNER = 2;
    for (int p = 0; p < 16; p++) begin
      prog[p] = '0;
      prog[p].add[2].dst = reg_idx_t'(p); // tag, no write (op is NOP)
    end
    prog[10].ctrl.op = C_SETC; prog[10].ctrl.csel = 0; prog[10].imm = IMM_W'(OUTER);
    prog[10].add[0].op = A_ADD;
    prog[11].ctrl.op = C_SETC; prog[11].ctrl.csel = 1; prog[11].imm = IMM_W'(INNER);
    prog[11].in.en = 1; prog[11].in.sid = 1;
    prog[12].in.en = 1; prog[12].in.bcast = 1; prog[12].in.sid = 2;
    prog[12].mul[0].op = M_MUL;
    prog[13].out.en = 1; prog[13].out.sid = 0;
    prog[13].ctrl.op = C_LOOP; prog[13].ctrl.csel = 1; prog[13].ctrl.target = 12;
    prog[14].ctrl.op = C_LOOP; prog[14].ctrl.csel = 0; prog[14].ctrl.target = 11;
    prog[15].ctrl.op = C_HALT;
    // expected pc trace
    trace.push_back(10);
    for (int o = 0; o < OUTER; o++) begin
      trace.push_back(11);
      for (int i = 0; i < INNER; i++) begin trace.push_back(12); trace.push_back(13); end
      trace.push_back(14);
    end
    trace.push_back(15);

    in_base  = '0; out_base = '0;
    in_base[1] = 15'd800; in_base[2] = 15'd1003; out_base[0] = 15'd2048;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int p = 0; p < 16; p++) begin
      ucode_we = 1; ucode_addr = pc_t'(p); ucode_wdata = prog[p];
      @(negedge clk);
    end
    ucode_we = 0;
    for (int run = 0; run < 2; run++) begin
      rd_lane_n = 0; rd_b_n = 0; wr_n = 0;
      chk(!busy && !issue, "idle before start");
      start = 1; start_pc = 10;
      @(negedge clk);
      start = 0;
      foreach (trace[k]) begin
        chk(issue && busy, "issue during kernel");
        chk(instr === prog[trace[k]], $sformatf("instruction %0d (pc %0d)", k, trace[k]));
        chk(!done, "no done while running");
        if (trace[k] == 11) begin
          chk(srf_rd_en && srf_rd_lane && srf_rd_addr == srf_addr_t'(800 + 8*rd_lane_n), "lane read address");
          rd_lane_n++;
        end else if (trace[k] == 12) begin
          chk(srf_rd_en && !srf_rd_lane && srf_rd_addr == srf_addr_t'(1003 + rd_b_n), "broadcast read address");
          rd_b_n++;
        end else chk(!srf_rd_en, "no read");
        if (trace[k] == 13) begin
          chk(srf_wr_en && srf_wr_addr == srf_addr_t'(2048 + 8*wr_n), "write address");
          wr_n++;
        end else chk(!srf_wr_en, "no write");
        @(negedge clk);
      end
      chk(done && !busy && !issue, "done pulse right after HALT");
      @(negedge clk);
      chk(!done, "done is one cycle");
      cyc = trace.size();
      chk(perf_cycles == 32'((run + 1) * cyc), "cycle counter");
      chk(perf_add_ops == 32'(run + 1), "adder op counter");
      chk(perf_mul_ops == 32'((run + 1) * OUTER * INNER), "multiplier op counter");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
