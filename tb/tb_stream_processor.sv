// tb_stream_processor: end-to-end multiuser matched filter on the whole
// processor, at the default (full) size.
//
// Workload: K = 32 users, spreading length N = 32, NBITS detection bits.
// The channel estimate A (2K rows of N complex Q15 values; row 2k is user k's
// A0 row, row 2k+1 its A1 row) sits in SDRAM. Per user the matched filter
// output is y_i[k] = Re(A1[k]^H r_{i-1} + A0[k]^H r_i) and the first decision
// d_i[k] = sign(y_i[k]).
//
// The host side of the testbench
//   1. writes the matched-filter kernel into the microcode store,
//   2. rearranges A into per-cluster streams with strided loads (odd/even
//      rows, transposed so that each cluster gets one user's row),
//   3. per bit: receives r_i (2N words) from the network port, runs one kernel
//      per group of eight users, stores y to SDRAM and sends d to the network.
// y and d are compared with a model in the testbench using the same fixed-point
// arithmetic. The testbench also counts how often each mechanism occurred
// (memory wait states, memory stall time, strided rearrangement, command queue
// full, broadcast and lane stream reads, loop branches, network backpressure)
// and counts a failure for any that never did. Kernel length and unit
// utilisation are checked against the schedule of the kernel.
module tb_stream_processor;
  import sbp_pkg::*;

  localparam int K = 32, N = 32, NBITS = 3, GROUPS = K / NUM_CLUSTERS;
  // SDRAM layout
  localparam int A_BASE = 0;        // 2K x N complex, interleaved re/im
  localparam int Y_BASE = 8192;     // NBITS x K results
  // SRF layout (element addresses)
  localparam int S_A    = 0;        // 16 streams of 8N elements
  localparam int S_R    = 4096;     // received vectors, 2N each
  localparam int S_Y    = 5120;     // y per bit, K each
  localparam int S_D    = 6144;     // d per bit, K each

  logic clk = 0, rst_n = 0;
  logic cmd_valid = 0, cmd_ready, idle;
  cmd_t cmd;
  logic ucode_we = 0;
  pc_t ucode_addr = '0;
  instr_t ucode_wdata = '0;
  logic      [MEM_CHANNELS-1:0] mem_req, mem_we, mem_ack;
  mem_addr_t [MEM_CHANNELS-1:0] mem_addr;
  word_t     [MEM_CHANNELS-1:0] mem_wdata, mem_rdata;
  logic net_out_valid, net_out_ready = 0, net_in_valid = 0, net_in_ready;
  word_t net_out_data, net_in_data = 0;
  logic [31:0] cmds_done, stall_cycles, kernel_cycles, queue_full_cycles, mem_wait_cycles,
               net_backpressure_cycles, perf_cycles, perf_add_ops, perf_mul_ops;
  int unsigned accesses;
  int checks = 0, failures = 0;

  stream_processor dut (.*);
  sdram_model #(.DEPTH(4096), .MAX_WAIT(2)) u_sdram (
    .clk, .req(mem_req), .we(mem_we), .addr(mem_addr), .wdata(mem_wdata),
    .ack(mem_ack), .rdata(mem_rdata), .accesses);

  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 12) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // ---------------------------------------------------------------- data
  word_t a_re [2*K][N], a_im [2*K][N];
  word_t r_re [NBITS+1][N], r_im [NBITS+1][N];

  function automatic longint mulq(word_t x, word_t z);
    longint p = longint'(x) * longint'(z);
    return p >>> FRAC_BITS;
  endfunction

  function automatic word_t y_model(int i, int k);
    longint acc = 0;
    for (int n = 0; n < N; n++) begin
      longint t1 = mulq(a_re[2*k+1][n], r_re[i-1][n]) + mulq(a_im[2*k+1][n], r_im[i-1][n]);
      longint t2 = mulq(a_re[2*k][n], r_re[i][n]) + mulq(a_im[2*k][n], r_im[i][n]);
      acc = acc + t1 + t2;
    end
    return word_t'(acc);
  endfunction

  // --------------------------------------------------------- instructions
  function automatic instr_t nop();
    return '0;
  endfunction
  function automatic add_slot_t aop(add_op_e op, int d, int x, int z);
    add_slot_t s;
    s.op = op; s.dst = reg_idx_t'(d); s.a = reg_idx_t'(x); s.b = reg_idx_t'(z);
    return s;
  endfunction
  function automatic mul_slot_t mop(mul_op_e op, int d, int x, int z);
    mul_slot_t s;
    s.op = op; s.dst = reg_idx_t'(d); s.a = reg_idx_t'(x); s.b = reg_idx_t'(z);
    return s;
  endfunction
  function automatic in_slot_t rd(int sid, bit bc, int d);
    in_slot_t s;
    s.en = 1; s.bcast = bc; s.sid = 3'(sid); s.dst = reg_idx_t'(d);
    return s;
  endfunction

  // Matched filter kernel (one group of eight users, one user per cluster).
  // Streams: 0 A0re, 1 A0im, 2 A1re, 3 A1im (lane), 4 r_{i-1}, 5 r_i
  // (broadcast, re/im interleaved); out 0 y, out 1 d = sign(y).
  // Registers: r1 acc, r2..r5 A, r6..r9 r, r10..r15 products and sums.
  localparam int MF_PC = 0;
  localparam int MF_BODY = 12;              // instructions per n
  localparam int MF_LEN = 1 + MF_BODY * N + 2; // issued instructions per launch
  instr_t prog [$];
  task automatic build_mf();
    instr_t i;
    prog.delete();
    i = nop(); i.add[0] = aop(A_SUB, 1, 1, 1); i.ctrl.op = C_SETC; i.ctrl.csel = 0;
    i.imm = IMM_W'(N); prog.push_back(i);                                  // 0
    i = nop(); i.in = rd(0, 0, 2); prog.push_back(i);                      // 1 loop
    i = nop(); i.in = rd(1, 0, 3); prog.push_back(i);
    i = nop(); i.in = rd(2, 0, 4); prog.push_back(i);
    i = nop(); i.in = rd(3, 0, 5); prog.push_back(i);
    i = nop(); i.in = rd(4, 1, 6); prog.push_back(i);
    i = nop(); i.in = rd(4, 1, 7); prog.push_back(i);
    i = nop(); i.in = rd(5, 1, 8); i.mul[0] = mop(M_MULQ, 10, 4, 6); prog.push_back(i); // A1re*rp_re
    i = nop(); i.in = rd(5, 1, 9); i.mul[0] = mop(M_MULQ, 11, 5, 7); prog.push_back(i); // A1im*rp_im
    i = nop(); i.mul[1] = mop(M_MULQ, 12, 2, 8); i.add[0] = aop(A_ADD, 14, 10, 11);
    prog.push_back(i);                                                     // t1
    i = nop(); i.mul[2] = mop(M_MULQ, 15, 3, 9); i.add[0] = aop(A_ADD, 1, 1, 14);
    prog.push_back(i);                                                     // acc += t1
    i = nop(); i.add[1] = aop(A_ADD, 13, 12, 15); prog.push_back(i);       // t2
    i = nop(); i.add[0] = aop(A_ADD, 1, 1, 13);                            // acc += t2
    i.ctrl.op = C_LOOP; i.ctrl.csel = 0; i.ctrl.target = pc_t'(MF_PC + 1); prog.push_back(i);
    i = nop(); i.add[0] = aop(A_SGN, 2, 1, 1); i.out.en = 1; i.out.sid = 0; i.out.src = 1;
    prog.push_back(i);
    i = nop(); i.out.en = 1; i.out.sid = 1; i.out.src = 2; i.ctrl.op = C_HALT; prog.push_back(i);
  endtask

  // ------------------------------------------------------------ host side
  int posted = 0;
  task automatic post(cmd_t c);
    @(negedge clk);
    cmd = c; cmd_valid = 1;
    #1;
    while (!cmd_ready) begin @(negedge clk); #1; end
    @(negedge clk);
    cmd_valid = 0;
    posted++;
  endtask

  function automatic cmd_t mk(cmd_op_e op);
    cmd_t c = '0;
    c.op = op; c.outer_cnt = 1;
    return c;
  endfunction

  // network: sender of received samples, receiver of decisions
  word_t net_tx [$];
  word_t net_rx [$];
  always @(negedge clk) begin
    net_out_ready <= ($urandom_range(3, 0) != 0);
    net_in_valid  <= (net_tx.size() != 0);
    net_in_data   <= (net_tx.size() != 0) ? net_tx[0] : '0;
  end
  always @(posedge clk) begin
    if (net_out_valid && net_out_ready) net_rx.push_back(net_out_data);
    if (net_in_valid && net_in_ready) void'(net_tx.pop_front());
  end

  // mechanism counters
  int n_wait = 0, n_bcast = 0, n_lane = 0, n_loop = 0, n_qfull = 0, n_bp = 0, n_strided = 0;
  int n_kernels = 0, n_stall = 0;
  always @(posedge clk) if (rst_n) begin
    if (|(mem_req & ~mem_ack)) n_wait++;
    if (dut.u_sc.owner == 2'd1) n_stall++;
    if (dut.issue && dut.instr.in.en && dut.instr.in.bcast) n_bcast++;
    if (dut.issue && dut.instr.in.en && !dut.instr.in.bcast) n_lane++;
    if (dut.issue && dut.instr.ctrl.op == C_LOOP && dut.u_uc.cnt[dut.instr.ctrl.csel] != 1) n_loop++;
    if (cmd_valid && !cmd_ready) n_qfull++;
    if (net_out_valid && !net_out_ready) n_bp++;
    if (dut.u_uc.done) n_kernels++;
  end

  initial begin
    cmd_t c;
    int t0, kcyc;
    cmd = '0;
    build_mf();
    // random channel estimate and received vectors, |x| < 2^14
    for (int j = 0; j < 2*K; j++)
      for (int n = 0; n < N; n++) begin
        a_re[j][n] = word_t'($urandom_range(32767, 0)) - 16384;
        a_im[j][n] = word_t'($urandom_range(32767, 0)) - 16384;
        u_sdram.poke(A_BASE + (j*N + n)*2,     a_re[j][n]);
        u_sdram.poke(A_BASE + (j*N + n)*2 + 1, a_im[j][n]);
      end
    for (int i = 0; i <= NBITS; i++)
      for (int n = 0; n < N; n++) begin
        r_re[i][n] = word_t'($urandom_range(32767, 0)) - 16384;
        r_im[i][n] = word_t'($urandom_range(32767, 0)) - 16384;
      end
    repeat (3) @(posedge clk);
    rst_n = 1;
    // 1. microcode
    foreach (prog[p]) begin
      @(negedge clk);
      ucode_we = 1; ucode_addr = pc_t'(MF_PC + p); ucode_wdata = prog[p];
    end
    @(negedge clk);
    ucode_we = 0;
    // 2. data rearrangement: stream (g, b, part) gets element n*8+c =
    //    A[2(8g+c)+b][n].part
    for (int g = 0; g < GROUPS; g++)
      for (int b = 0; b < 2; b++)
        for (int part = 0; part < 2; part++) begin
          c = mk(CMD_LOAD);
          c.mem_addr = mem_addr_t'(A_BASE + 2*N*(16*g + b) + part);
          c.inner_cnt = cnt_t'(NUM_CLUSTERS); c.inner_stride = cnt_t'(4*N);
          c.outer_cnt = cnt_t'(N);            c.outer_stride = 2;
          c.srf_addr = srf_addr_t'(S_A + (g*4 + b*2 + part) * 8*N);
          post(c);
          n_strided++;
        end
    // r_0 arrives first
    foreach (r_re[0][n]) begin net_tx.push_back(r_re[0][n]); net_tx.push_back(r_im[0][n]); end
    c = mk(CMD_NET_RECV); c.inner_cnt = cnt_t'(2*N); c.srf_addr = srf_addr_t'(S_R);
    post(c);
    // 3. detection bits
    t0 = 0;
    for (int i = 1; i <= NBITS; i++) begin
      foreach (r_re[i][n]) begin net_tx.push_back(r_re[i][n]); net_tx.push_back(r_im[i][n]); end
      c = mk(CMD_NET_RECV); c.inner_cnt = cnt_t'(2*N); c.srf_addr = srf_addr_t'(S_R + 2*N*i);
      post(c);
      for (int g = 0; g < GROUPS; g++) begin
        c = mk(CMD_KERNEL);
        c.pc = pc_t'(MF_PC);
        for (int s = 0; s < 4; s++) c.in_base[s] = srf_addr_t'(S_A + (g*4 + s) * 8*N);
        c.in_base[4] = srf_addr_t'(S_R + 2*N*(i-1));
        c.in_base[5] = srf_addr_t'(S_R + 2*N*i);
        c.out_base[0] = srf_addr_t'(S_Y + K*i + 8*g);
        c.out_base[1] = srf_addr_t'(S_D + K*i + 8*g);
        post(c);
      end
      c = mk(CMD_STORE); c.inner_cnt = cnt_t'(K); c.inner_stride = 1;
      c.mem_addr = mem_addr_t'(Y_BASE + K*(i-1)); c.srf_addr = srf_addr_t'(S_Y + K*i);
      post(c);
      c = mk(CMD_NET_SEND); c.inner_cnt = cnt_t'(K); c.srf_addr = srf_addr_t'(S_D + K*i);
      post(c);
    end
    while (!idle) @(negedge clk);
    repeat (2) @(negedge clk);

    // results
    chk(cmds_done == 32'(posted), "every command completed");
    chk(net_rx.size() == NBITS*K, $sformatf("decisions sent: %0d", net_rx.size()));
    for (int i = 1; i <= NBITS; i++)
      for (int k = 0; k < K; k++) begin
        automatic word_t y = y_model(i, k);
        automatic word_t d = (y < 0) ? -Q_ONE : Q_ONE;
        chk(u_sdram.peek(Y_BASE + K*(i-1) + k) == y,
            $sformatf("y bit %0d user %0d: %0d vs %0d", i, k, u_sdram.peek(Y_BASE + K*(i-1) + k), y));
        if (net_rx.size() == NBITS*K) chk(net_rx[K*(i-1) + k] == d, "decision");
      end
    // kernel schedule: MF_LEN issued cycles per launch
    kcyc = NBITS * GROUPS * MF_LEN;
    chk(perf_cycles == 32'(kcyc), $sformatf("kernel issue cycles %0d vs %0d", perf_cycles, kcyc));
    chk(perf_mul_ops == 32'(NBITS * GROUPS * 4 * N), "multiplier operations");
    chk(perf_add_ops == 32'(NBITS * GROUPS * (1 + 4 * N + 1)), "adder operations");
    $display("kernel cycles %0d, memory stall cycles %0d, adder util %0d%%, multiplier util %0d%%",
             kernel_cycles, stall_cycles, 100 * perf_add_ops / (NUM_ADD * perf_cycles),
             100 * perf_mul_ops / (NUM_MUL * perf_cycles));
    // mechanisms
    $display("mechanisms: wait=%0d stall=%0d strided=%0d qfull=%0d bcast=%0d lane=%0d loop=%0d backpressure=%0d kernels=%0d",
             n_wait, n_stall, n_strided, n_qfull, n_bcast, n_lane, n_loop, n_bp, n_kernels);
    chk(n_wait > 0 && mem_wait_cycles > 0, "memory wait states happened");
    chk(n_stall > 0 && stall_cycles == 32'(n_stall), "memory stall time counted");
    chk(n_strided > 0, "strided rearrangement happened");
    chk(n_qfull > 0 && queue_full_cycles > 0, "command queue filled");
    chk(n_bcast == NBITS * GROUPS * 4 * N, "broadcast reads");
    chk(n_lane == NBITS * GROUPS * 4 * N, "lane reads");
    chk(n_loop == NBITS * GROUPS * (N - 1), "loop branches");
    chk(n_bp > 0 && net_backpressure_cycles > 0, "network backpressure happened");
    chk(n_kernels == NBITS * GROUPS, "kernel launches");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
