// tb_matmul_lc_workload: the two correlation-matrix kernels of the detector,
// L = Re(A1^H A0) and C = Re(A0^H A0 + A1^H A1) with a zero diagonal, on the
// whole processor at full size (K = 32 users, N = 32 chips).
//
// With a0_k, a1_k the two N-element complex channel vectors of user k:
//   L[k][j] = sum_n Re(conj(a1_k[n]) a0_j[n]),
//   C[k][j] = sum_n Re(conj(a0_k[n]) a0_j[n] + conj(a1_k[n]) a1_j[n]), k != j,
//   C[k][k] = 0,
// each product taken as a Q15 multiply.
//
// The channel estimate sits in SDRAM as in the matched-filter testbench: 2K
// rows of N interleaved re/im words, row 2k holding a0_k and row 2k+1 a1_k.
// The host side of the testbench
//   1. splits it by strided loads into lane streams (one user per cluster,
//      even and odd rows apart, real and imaginary parts apart) and into
//      per-user broadcast streams;
//   2. runs one L kernel and one C kernel per group of eight users and per
//      column j, each writing one eight-user record of column j;
//   3. stores both matrices row-major to SDRAM with a transposing strided
//      store, and then writes zeros over the diagonal of C with a store of
//      stride K + 1.
// The stored matrices are compared with a model in the testbench; the
// kernel cycle and operation counts are checked against the schedules.
module tb_matmul_lc_workload;
  import sbp_pkg::*;

  localparam int K = 32, N = 32, GROUPS = K / NUM_CLUSTERS;
  // SDRAM layout
  localparam int M_A = 0;                    // 2K x N complex, re/im interleaved
  localparam int M_L = 4096;                 // K x K row-major
  localparam int M_C = 5120;                 // K x K row-major
  localparam int M_Z = 6144;                 // K zero words
  // SRF layout
  localparam int S_A  = 0;                   // 16 lane streams of 8N
  localparam int S_B  = 4096;                // 4 broadcast regions of K*N
  localparam int S_LT = 8192;                // L by columns: element j*K + k
  localparam int S_CT = 9216;                // C by columns
  localparam int S_Z  = 10240;               // K zeros

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
  sdram_model #(.DEPTH(4096), .MAX_WAIT(1)) u_sdram (
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
  // a[b][part][k][n]: b = 0 for a0, 1 for a1; part = 0 real, 1 imaginary
  word_t a [2][2][K][N];
  word_t lm [K][K], cm [K][K];

  function automatic word_t mq(word_t x, word_t z);
    longint p = longint'(x) * longint'(z);
    return word_t'(p >>> FRAC_BITS);
  endfunction

  task automatic model();
    for (int k = 0; k < K; k++)
      for (int j = 0; j < K; j++) begin
        word_t sl = 0, sc = 0;
        for (int n = 0; n < N; n++) begin
          sl += mq(a[1][0][k][n], a[0][0][j][n]) + mq(a[1][1][k][n], a[0][1][j][n]);
          sc += mq(a[0][0][k][n], a[0][0][j][n]) + mq(a[0][1][k][n], a[0][1][j][n])
              + mq(a[1][0][k][n], a[1][0][j][n]) + mq(a[1][1][k][n], a[1][1][j][n]);
        end
        lm[k][j] = sl;
        cm[k][j] = (k == j) ? 0 : sc;
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

  // L kernel, one group and one column j. Streams: 0/1 real/imaginary a1 of
  // the cluster's user (lane), 2/3 real/imaginary a0 of user j (broadcast).
  localparam int L_PC = 0, L_LEN = 1 + 7 * N + 1;
  // C kernel. Streams: 0-3 a0 re, a0 im, a1 re, a1 im of the cluster's user
  // (lane), 4-7 the same of user j (broadcast).
  localparam int C_PC = 16, C_LEN = 1 + 11 * N + 1;
  instr_t prog [$];
  int     prog_pc [$];
  task automatic emit(int pc, instr_t i);
    prog.push_back(i); prog_pc.push_back(pc);
  endtask
  task automatic build();
    instr_t i;
    int pc;
    // ---- L
    pc = L_PC;
    i = '0; i.add[0] = aop(A_SUB, 1, 1, 1); i.ctrl.op = C_SETC; i.imm = IMM_W'(N); emit(pc++, i);
    i = '0; i.in = rd(0, 0, 2); emit(pc++, i);                                   // loop
    i = '0; i.in = rd(2, 1, 4); emit(pc++, i);
    i = '0; i.in = rd(1, 0, 3); emit(pc++, i);
    i = '0; i.in = rd(3, 1, 5); emit(pc++, i);
    i = '0; i.mul[0] = mop(M_MULQ, 6, 2, 4); emit(pc++, i);
    i = '0; i.mul[1] = mop(M_MULQ, 7, 3, 5); i.add[0] = aop(A_ADD, 1, 1, 6); emit(pc++, i);
    i = '0; i.add[0] = aop(A_ADD, 1, 1, 7);
    i.ctrl.op = C_LOOP; i.ctrl.target = pc_t'(L_PC + 1); emit(pc++, i);
    i = '0; i.out.en = 1; i.out.sid = 0; i.out.src = 1; i.ctrl.op = C_HALT; emit(pc++, i);
    // ---- C
    pc = C_PC;
    i = '0; i.add[0] = aop(A_SUB, 1, 1, 1); i.ctrl.op = C_SETC; i.imm = IMM_W'(N); emit(pc++, i);
    i = '0; i.in = rd(0, 0, 2); emit(pc++, i);                                   // loop
    i = '0; i.in = rd(4, 1, 6); emit(pc++, i);
    i = '0; i.in = rd(1, 0, 3); emit(pc++, i);
    i = '0; i.in = rd(5, 1, 7); i.mul[0] = mop(M_MULQ, 10, 2, 6); emit(pc++, i);
    i = '0; i.in = rd(2, 0, 4); i.add[0] = aop(A_ADD, 1, 1, 10); emit(pc++, i);
    i = '0; i.in = rd(6, 1, 8); i.mul[0] = mop(M_MULQ, 11, 3, 7); emit(pc++, i);
    i = '0; i.in = rd(3, 0, 5); i.add[0] = aop(A_ADD, 1, 1, 11); emit(pc++, i);
    i = '0; i.in = rd(7, 1, 9); i.mul[0] = mop(M_MULQ, 12, 4, 8); emit(pc++, i);
    i = '0; i.add[0] = aop(A_ADD, 1, 1, 12); emit(pc++, i);
    i = '0; i.mul[0] = mop(M_MULQ, 13, 5, 9); emit(pc++, i);
    i = '0; i.add[0] = aop(A_ADD, 1, 1, 13);
    i.ctrl.op = C_LOOP; i.ctrl.target = pc_t'(C_PC + 1); emit(pc++, i);
    i = '0; i.out.en = 1; i.out.sid = 0; i.out.src = 1; i.ctrl.op = C_HALT; emit(pc++, i);
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
    for (int k = 0; k < K; k++)
      for (int b = 0; b < 2; b++)
        for (int n = 0; n < N; n++)
          for (int part = 0; part < 2; part++) begin
            a[b][part][k][n] = word_t'($urandom_range(16383, 0)) - 8192;
            u_sdram.poke(M_A + 2*N*(2*k + b) + 2*n + part, a[b][part][k][n]);
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

    for (int b = 0; b < 2; b++)
      for (int part = 0; part < 2; part++) begin
        // lane streams: element n*8+c = part of a_b of user 8g+c, chip n
        for (int g = 0; g < GROUPS; g++)
          post(load(M_A + 2*N*(16*g + b) + part, NUM_CLUSTERS, 4*N, N, 2,
                    S_A + (g*4 + b*2 + part) * 8*N));
        // broadcast streams: element j*N+n = part of a_b of user j, chip n
        post(load(M_A + 2*N*b + part, N, 2, K, 4*N, S_B + (b*2 + part) * K*N));
      end
    post(load(M_Z, K, 1, 1, 0, S_Z));

    for (int g = 0; g < GROUPS; g++)
      for (int j = 0; j < K; j++) begin
        c = '0;
        c.op = CMD_KERNEL; c.pc = pc_t'(L_PC); c.outer_cnt = 1;
        c.in_base[0] = srf_addr_t'(S_A + (g*4 + 2) * 8*N);
        c.in_base[1] = srf_addr_t'(S_A + (g*4 + 3) * 8*N);
        c.in_base[2] = srf_addr_t'(S_B + 0*K*N + j*N);
        c.in_base[3] = srf_addr_t'(S_B + 1*K*N + j*N);
        c.out_base[0] = srf_addr_t'(S_LT + j*K + 8*g);
        post(c);
        c.pc = pc_t'(C_PC);
        for (int s = 0; s < 4; s++) begin
          c.in_base[s]     = srf_addr_t'(S_A + (g*4 + s) * 8*N);
          c.in_base[4 + s] = srf_addr_t'(S_B + s*K*N + j*N);
        end
        c.out_base[0] = srf_addr_t'(S_CT + j*K + 8*g);
        post(c);
      end
    // SRF element j*K + k holds M[k][j]: store row-major (k outer stride K)
    post(store(M_L, K, K, K, 1, S_LT));
    post(store(M_C, K, K, K, 1, S_CT));
    post(store(M_C, K, K + 1, 1, 0, S_Z));     // zero diagonal
    while (!idle) @(negedge clk);

    for (int k = 0; k < K; k++)
      for (int j = 0; j < K; j++) begin
        chk(u_sdram.peek(M_L + k*K + j) == lm[k][j], $sformatf("L[%0d][%0d]", k, j));
        chk(u_sdram.peek(M_C + k*K + j) == cm[k][j], $sformatf("C[%0d][%0d]", k, j));
      end
    chk(cmds_done == 32'(posted), "every command completed");
    chk(perf_cycles == 32'(GROUPS * K * (L_LEN + C_LEN)),
        $sformatf("kernel issue cycles %0d", perf_cycles));
    chk(perf_mul_ops == 32'(GROUPS * K * 6 * N), "multiplier operations");
    chk(perf_add_ops == 32'(GROUPS * K * (2 + 6 * N)), "adder operations");
    $display("L: %0d and C: %0d kernel cycles for %0d users, total run %0d cycles of which %0d in memory transfers",
             GROUPS * K * L_LEN, GROUPS * K * C_LEN, K, kernel_cycles + stall_cycles, stall_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
