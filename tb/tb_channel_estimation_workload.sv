// tb_channel_estimation_workload: one step of the tracking channel estimator
// on the whole processor at full size (K = 32 users, N = 32 chips):
//   Rbr' = Rbr + b r^H - bo ro^H           (2K x N complex)
//   Rbb' = Rbb + b b^T - bo bo^T           (2K x 2K real)
//   A'   = A - mu (Rbb' A - Rbr')          (2K x N complex)
// with b, bo the newest and the oldest bit vector of the estimation window
// (±1.0 in Q15), r, ro the matching received vectors, and mu = 1/16. Every
// product is a Q15 multiply. Since Rbb' is real, Rbb' A treats the real and
// imaginary words of A alike, so A is handled as a 2K x 2N real matrix.
//
// All matrices sit in SDRAM row-major with real and imaginary words
// interleaved. The host side of the testbench
//   1. loads Rbr, Rbb and A as lane streams (row m of the matrix to cluster
//      m mod 8, one stream per group of eight rows), A a second time by
//      columns for broadcast, and b, bo, r, ro;
//   2. runs the correlation-update kernel once per group (two loops: the
//      complex update of Rbr with conjugated r, then the real update of Rbb);
//   3. runs the matrix-product and iteration-update kernel once per group
//      and column of A: a 2K-term dot product of a row of Rbb' with the
//      broadcast column, then the update of one element per cluster;
//   4. stores Rbr', Rbb' and A' back to SDRAM.
// The stored results are compared with a model in the testbench; kernel
// cycle and operation counts are checked against the schedules.
module tb_channel_estimation_workload;
  import sbp_pkg::*;

  localparam int K = 32, N = 32, M2 = 2 * K, W = 2 * N, GROUPS = M2 / NUM_CLUSTERS;
  localparam int MU = 1 << (FRAC_BITS - 4);   // 1/16 in Q15
  // SDRAM layout (row-major, W or M2 words per row)
  localparam int M_A    = 0;
  localparam int M_RBR  = 4096;
  localparam int M_RBB  = 8192;
  localparam int M_B    = 12288;             // b then bo, M2 each
  localparam int M_R    = 12416;             // r then ro, W each
  localparam int M_AN   = 16384;             // results
  localparam int M_RBR2 = 20480;
  localparam int M_RBB2 = 24576;
  // SRF layout
  localparam int S_RBR  = 0;                 // lane streams, 8W per group
  localparam int S_RBB  = 4096;
  localparam int S_AC   = 8192;              // A by columns: element w*M2 + p
  localparam int S_AL   = 12288;             // A lane streams
  localparam int S_B    = 16384;             // b, bo
  localparam int S_R    = 16512;             // r, ro
  localparam int S_RBR2 = 16640;
  localparam int S_RBB2 = 20736;
  localparam int S_AN   = 24832;
  localparam int GS     = NUM_CLUSTERS * W;  // SRF words per group of rows

  logic clk = 0, rst_n = 0;
  logic cmd_valid = 0, cmd_ready, idle;
  cmd_t cmd;
  logic ucode_we = 0;
  pc_t ucode_addr = '0;
  instr_t ucode_wdata = '0;
  logic      [MEM_CHANNELS-1:0] mem_req, mem_we, mem_ack;
  mem_addr_t [MEM_CHANNELS-1:0] mem_addr;
  word_t     [MEM_CHANNELS-1:0] mem_wdata, mem_rdata;
  logic net_out_valid, net_out_ready = 1, net_in_valid = 0, net_in_ready;
  word_t net_out_data, net_in_data = 0;
  logic [31:0] cmds_done, stall_cycles, kernel_cycles, queue_full_cycles, mem_wait_cycles,
               net_backpressure_cycles, perf_cycles, perf_add_ops, perf_mul_ops;
  int unsigned accesses;
  int checks = 0, failures = 0;

  stream_processor dut (.*);
  sdram_model #(.DEPTH(8192), .MAX_WAIT(1)) u_sdram (
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

  // ---------------------------------------------------------------- model
  word_t am [M2][W], rbr [M2][W], rbb [M2][M2];
  word_t bn [M2], bo [M2], rn [W], ro [W];
  word_t an_m [M2][W], rbr_m [M2][W], rbb_m [M2][M2];

  function automatic word_t mq(word_t x, word_t z);
    longint p = longint'(x) * longint'(z);
    return word_t'(p >>> FRAC_BITS);
  endfunction

  task automatic model();
    for (int m = 0; m < M2; m++) begin
      for (int n = 0; n < N; n++) begin
        // b r^H: the imaginary part of conj(r) is -Im(r)
        rbr_m[m][2*n]   = rbr[m][2*n]   + mq(bn[m], rn[2*n])   - mq(bo[m], ro[2*n]);
        rbr_m[m][2*n+1] = rbr[m][2*n+1] - mq(bn[m], rn[2*n+1]) + mq(bo[m], ro[2*n+1]);
      end
      for (int p = 0; p < M2; p++)
        rbb_m[m][p] = rbb[m][p] + mq(bn[m], bn[p]) - mq(bo[m], bo[p]);
    end
    for (int m = 0; m < M2; m++)
      for (int w = 0; w < W; w++) begin
        word_t acc = 0;
        for (int p = 0; p < M2; p++) acc += mq(rbb_m[m][p], am[p][w]);
        an_m[m][w] = am[m][w] - mq(word_t'(MU), acc - rbr_m[m][w]);
      end
  endtask

  // --------------------------------------------------------- instructions
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

  // Correlation update, one group of eight rows. Streams: 0 Rbr (lane),
  // 1 b and 2 bo (lane, one record each), 3 r and 4 ro (broadcast), 5 Rbb
  // (lane), 6 b and 7 bo (broadcast); out 0 Rbr', out 1 Rbb'.
  localparam int CU_PC = 0, CU_LEN = 2 + 10 * N + 7 * M2 + 1;
  // Matrix product and iteration update, one group and one column w.
  // Streams: 0 Rbb' (lane), 1 column w of A (broadcast), 2 Rbr' and 3 A
  // (lane, one record each); out 0 A'.
  localparam int MM_PC = 40, MM_LEN = 1 + 5 * M2 + 6;
  instr_t prog [$];
  int     prog_pc [$];
  task automatic emit(int pc, instr_t i);
    prog.push_back(i); prog_pc.push_back(pc);
  endtask
  function automatic out_slot_t wr(int sid, int src);
    out_slot_t s;
    s.en = 1; s.sid = 1'(sid); s.src = reg_idx_t'(src);
    return s;
  endfunction
  task automatic build();
    instr_t i;
    int pc, top;
    // ---- correlation update
    pc = CU_PC;
    i = '0; i.in = rd(1, 0, 2); i.ctrl.op = C_SETC; i.imm = IMM_W'(N); emit(pc++, i);
    i = '0; i.in = rd(2, 0, 3); i.ctrl.op = C_SETC; i.ctrl.csel = 1; i.imm = IMM_W'(M2);
    emit(pc++, i);
    top = pc;                                                                 // Rbr loop
    i = '0; i.in = rd(0, 0, 4); emit(pc++, i);
    i = '0; i.in = rd(3, 1, 5); emit(pc++, i);
    i = '0; i.in = rd(4, 1, 6); emit(pc++, i);
    i = '0; i.in = rd(0, 0, 7); i.mul[0] = mop(M_MULQ, 8, 2, 5); emit(pc++, i);
    i = '0; i.in = rd(3, 1, 9); i.mul[0] = mop(M_MULQ, 10, 3, 6);
    i.add[0] = aop(A_ADD, 4, 4, 8); emit(pc++, i);
    i = '0; i.in = rd(4, 1, 11); i.add[0] = aop(A_SUB, 4, 4, 10); emit(pc++, i);
    i = '0; i.mul[0] = mop(M_MULQ, 12, 2, 9); i.out = wr(0, 4); emit(pc++, i);
    i = '0; i.mul[0] = mop(M_MULQ, 13, 3, 11); i.add[0] = aop(A_SUB, 7, 7, 12); emit(pc++, i);
    i = '0; i.add[0] = aop(A_ADD, 7, 7, 13); emit(pc++, i);
    i = '0; i.out = wr(0, 7); i.ctrl.op = C_LOOP; i.ctrl.target = pc_t'(top); emit(pc++, i);
    top = pc;                                                                 // Rbb loop
    i = '0; i.in = rd(5, 0, 4); emit(pc++, i);
    i = '0; i.in = rd(6, 1, 5); emit(pc++, i);
    i = '0; i.in = rd(7, 1, 6); emit(pc++, i);
    i = '0; i.mul[0] = mop(M_MULQ, 8, 2, 5); emit(pc++, i);
    i = '0; i.mul[0] = mop(M_MULQ, 9, 3, 6); i.add[0] = aop(A_ADD, 4, 4, 8); emit(pc++, i);
    i = '0; i.add[0] = aop(A_SUB, 4, 4, 9); emit(pc++, i);
    i = '0; i.out = wr(1, 4); i.ctrl.op = C_LOOP; i.ctrl.csel = 1; i.ctrl.target = pc_t'(top);
    emit(pc++, i);
    i = '0; i.ctrl.op = C_HALT; emit(pc++, i);
    // ---- matrix product and iteration update
    pc = MM_PC;
    i = '0; i.add[0] = aop(A_SUB, 1, 1, 1); i.ctrl.op = C_SETC; i.imm = IMM_W'(M2); emit(pc++, i);
    top = pc;
    i = '0; i.in = rd(0, 0, 2); emit(pc++, i);
    i = '0; i.in = rd(1, 1, 3); emit(pc++, i);
    i = '0; emit(pc++, i);
    i = '0; i.mul[0] = mop(M_MULQ, 4, 2, 3); emit(pc++, i);
    i = '0; i.add[0] = aop(A_ADD, 1, 1, 4); i.ctrl.op = C_LOOP; i.ctrl.target = pc_t'(top);
    emit(pc++, i);
    i = '0; i.in = rd(2, 0, 5); emit(pc++, i);
    i = '0; i.in = rd(3, 0, 6); emit(pc++, i);
    i = '0; i.add[0] = aop(A_SUB, 8, 1, 5); i.add[1] = aop(A_LDI, 7, 0, 0);
    i.imm = IMM_W'(MU); emit(pc++, i);
    i = '0; i.mul[0] = mop(M_MULQ, 9, 7, 8); emit(pc++, i);
    i = '0; i.add[0] = aop(A_SUB, 10, 6, 9); emit(pc++, i);
    i = '0; i.out = wr(0, 10); i.ctrl.op = C_HALT; emit(pc++, i);
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

  function automatic cmd_t load(int m, int ic, int is, int oc, int os, int s);
    cmd_t c = '0;
    c.op = CMD_LOAD; c.mem_addr = mem_addr_t'(m);
    c.inner_cnt = cnt_t'(ic); c.inner_stride = cnt_t'(is);
    c.outer_cnt = cnt_t'(oc); c.outer_stride = cnt_t'(os);
    c.srf_addr = srf_addr_t'(s);
    return c;
  endfunction

  function automatic cmd_t store(int m, int ic, int is, int oc, int os, int s);
    cmd_t c = load(m, ic, is, oc, os, s);
    c.op = CMD_STORE;
    return c;
  endfunction

  initial begin
    cmd_t c;
    cmd = '0;
    build();
    for (int m = 0; m < M2; m++) begin
      bn[m] = ($urandom_range(1, 0) != 0) ? Q_ONE : -Q_ONE;
      bo[m] = ($urandom_range(1, 0) != 0) ? Q_ONE : -Q_ONE;
      u_sdram.poke(M_B + m, bn[m]);
      u_sdram.poke(M_B + M2 + m, bo[m]);
      for (int w = 0; w < W; w++) begin
        am[m][w]  = word_t'($urandom_range(16383, 0)) - 8192;
        rbr[m][w] = word_t'($urandom_range(131071, 0)) - 65536;
        u_sdram.poke(M_A + m*W + w, am[m][w]);
        u_sdram.poke(M_RBR + m*W + w, rbr[m][w]);
      end
      for (int p = 0; p < M2; p++) begin
        rbb[m][p] = (word_t'($urandom_range(16, 0)) - 8) * Q_ONE;
        u_sdram.poke(M_RBB + m*M2 + p, rbb[m][p]);
      end
    end
    for (int w = 0; w < W; w++) begin
      rn[w] = word_t'($urandom_range(32767, 0)) - 16384;
      ro[w] = word_t'($urandom_range(32767, 0)) - 16384;
      u_sdram.poke(M_R + w, rn[w]);
      u_sdram.poke(M_R + W + w, ro[w]);
    end
    model();
    repeat (3) @(posedge clk);
    rst_n = 1;
    foreach (prog[p]) begin
      @(negedge clk);
      ucode_we = 1; ucode_addr = pc_t'(prog_pc[p]); ucode_wdata = prog[p];
    end
    @(negedge clk);
    ucode_we = 0;

    // lane streams: element w*8+c = row 8g+c, word w
    for (int g = 0; g < GROUPS; g++) begin
      post(load(M_RBR + 8*g*W, NUM_CLUSTERS, W, W, 1, S_RBR + g*GS));
      post(load(M_RBB + 8*g*M2, NUM_CLUSTERS, M2, M2, 1, S_RBB + g*GS));
      post(load(M_A + 8*g*W, NUM_CLUSTERS, W, W, 1, S_AL + g*GS));
    end
    post(load(M_A, M2, W, W, 1, S_AC));        // by columns
    post(load(M_B, 2*M2, 1, 1, 0, S_B));
    post(load(M_R, 2*W, 1, 1, 0, S_R));

    for (int g = 0; g < GROUPS; g++) begin
      c = '0;
      c.op = CMD_KERNEL; c.pc = pc_t'(CU_PC); c.outer_cnt = 1;
      c.in_base[0] = srf_addr_t'(S_RBR + g*GS);
      c.in_base[1] = srf_addr_t'(S_B + 8*g);
      c.in_base[2] = srf_addr_t'(S_B + M2 + 8*g);
      c.in_base[3] = srf_addr_t'(S_R);
      c.in_base[4] = srf_addr_t'(S_R + W);
      c.in_base[5] = srf_addr_t'(S_RBB + g*GS);
      c.in_base[6] = srf_addr_t'(S_B);
      c.in_base[7] = srf_addr_t'(S_B + M2);
      c.out_base[0] = srf_addr_t'(S_RBR2 + g*GS);
      c.out_base[1] = srf_addr_t'(S_RBB2 + g*GS);
      post(c);
    end
    for (int g = 0; g < GROUPS; g++)
      for (int w = 0; w < W; w++) begin
        c = '0;
        c.op = CMD_KERNEL; c.pc = pc_t'(MM_PC); c.outer_cnt = 1;
        c.in_base[0] = srf_addr_t'(S_RBB2 + g*GS);
        c.in_base[1] = srf_addr_t'(S_AC + w*M2);
        c.in_base[2] = srf_addr_t'(S_RBR2 + g*GS + 8*w);
        c.in_base[3] = srf_addr_t'(S_AL + g*GS + 8*w);
        c.out_base[0] = srf_addr_t'(S_AN + g*GS + 8*w);
        post(c);
      end
    for (int g = 0; g < GROUPS; g++) begin
      post(store(M_AN + 8*g*W, NUM_CLUSTERS, W, W, 1, S_AN + g*GS));
      post(store(M_RBR2 + 8*g*W, NUM_CLUSTERS, W, W, 1, S_RBR2 + g*GS));
      post(store(M_RBB2 + 8*g*M2, NUM_CLUSTERS, M2, M2, 1, S_RBB2 + g*GS));
    end
    while (!idle) @(negedge clk);

    for (int m = 0; m < M2; m++) begin
      for (int w = 0; w < W; w++) begin
        chk(u_sdram.peek(M_RBR2 + m*W + w) == rbr_m[m][w], $sformatf("Rbr'[%0d][%0d]", m, w));
        chk(u_sdram.peek(M_AN + m*W + w) == an_m[m][w], $sformatf("A'[%0d][%0d]", m, w));
      end
      for (int p = 0; p < M2; p++)
        chk(u_sdram.peek(M_RBB2 + m*M2 + p) == rbb_m[m][p], $sformatf("Rbb'[%0d][%0d]", m, p));
    end
    chk(cmds_done == 32'(posted), "every command completed");
    chk(perf_cycles == 32'(GROUPS * CU_LEN + GROUPS * W * MM_LEN),
        $sformatf("kernel issue cycles %0d", perf_cycles));
    chk(perf_mul_ops == 32'(GROUPS * (4 * N + 2 * M2) + GROUPS * W * (M2 + 1)),
        "multiplier operations");
    chk(perf_add_ops == 32'(GROUPS * (4 * N + 2 * M2) + GROUPS * W * (M2 + 4)),
        "adder operations");
    $display("correlation update: %0d cycles, matrix product and iteration update: %0d cycles, memory transfers: %0d cycles",
             GROUPS * CU_LEN, GROUPS * W * MM_LEN, stall_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
