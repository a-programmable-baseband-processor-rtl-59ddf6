// tb_pic_workload: three stages of parallel interference cancellation on the
// whole processor at full size (K = 32 users).
//
// For bit i and stage l the detector refines the matched-filter output y0:
//   y_i(l) = y0_i - L d_{i-1}(l-1) - C d_i(l-1) - L^T d_{i+1}(l-1),
//   d_i(l) = sign(y_i(l)),
// with L and C the real K x K partial and centre correlation matrices (C with
// a zero diagonal) and L^T the transpose of L (L is real, so L^H = L^T).
// Decisions are ±1.0 in Q15, so a Q15 product with a decision is exact.
//
// The testbench writes L, C, y0 and the first decisions d(0) = sign(y0) into
// SDRAM, then issues stream commands:
//   * row streams of L and C: strided loads that give cluster c row 8g+c;
//   * rows of L^T: the same data loaded with the strides exchanged, i.e. the
//     matrix transpose is done by the memory system;
//   * per stage, per bit 1..NB, per group of eight users: one PIC kernel,
//     with the three decision vectors as broadcast streams;
//   * finally y and d of the last stage are stored back to SDRAM.
// Every stage's y and d (read from the SRF after the stage) and the stored
// final results are compared with a model in the testbench. Bits 0 and NB+1
// are fixed neighbours and keep their first decisions. The kernel cycle and
// operation counts are checked against the kernel's schedule.
module tb_pic_workload;
  import sbp_pkg::*;

  localparam int K = 32, NB = 3, STAGES = 3, GROUPS = K / NUM_CLUSTERS;
  // SDRAM layout
  localparam int M_L  = 0;                   // K x K row-major
  localparam int M_C  = K*K;                 // K x K row-major
  localparam int M_Y0 = 2*K*K;               // (NB+2) x K
  localparam int M_D0 = 2*K*K + 256;         // (NB+2) x K
  localparam int M_Y  = 2*K*K + 512;         // results: NB x K y, then NB x K d
  // SRF layout
  localparam int S_L  = 0;                   // GROUPS streams of 8K
  localparam int S_C  = 1024;
  localparam int S_LT = 2048;
  localparam int S_Y0 = 3072;                // (NB+2) x K
  localparam int S_D  = 4096;                // per stage (0..STAGES): (NB+2) x K
  localparam int S_Y  = 5120;                // per stage (1..STAGES): (NB+2) x K
  localparam int DSTRIDE = 256;              // SRF words per stage region

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
  word_t lm [K][K], cm [K][K];
  word_t y0 [NB+2][K];
  word_t dm [STAGES+1][NB+2][K];
  word_t ym [STAGES+1][NB+2][K];

  function automatic word_t sgn(word_t v);
    return (v < 0) ? -Q_ONE : Q_ONE;
  endfunction
  function automatic word_t mq(word_t a, word_t b);
    longint p = longint'(a) * longint'(b);
    return word_t'(p >>> FRAC_BITS);
  endfunction

  task automatic model();
    for (int i = 0; i < NB+2; i++)
      for (int k = 0; k < K; k++) dm[0][i][k] = sgn(y0[i][k]);
    for (int l = 1; l <= STAGES; l++) begin
      for (int k = 0; k < K; k++) begin
        dm[l][0][k] = dm[0][0][k];
        dm[l][NB+1][k] = dm[0][NB+1][k];
      end
      for (int i = 1; i <= NB; i++)
        for (int k = 0; k < K; k++) begin
          word_t sl = 0, sc = 0, st = 0;
          for (int j = 0; j < K; j++) begin
            sl += mq(lm[k][j], dm[l-1][i-1][j]);
            sc += mq(cm[k][j], dm[l-1][i][j]);
            st += mq(lm[j][k], dm[l-1][i+1][j]);
          end
          ym[l][i][k] = y0[i][k] - (sl + sc + st);
          dm[l][i][k] = sgn(ym[l][i][k]);
        end
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

  // PIC kernel, one group of eight users. Streams: 0 L rows, 1 C rows,
  // 2 L^T rows (lane, one element j per record), 3 d_{i-1}, 4 d_i, 5 d_{i+1}
  // (broadcast), 6 y0 (lane, one record); out 0 y, out 1 d.
  // r11/r12/r13 accumulate the three interference sums in parallel.
  localparam int PIC_PC = 0, BODY = 9;
  localparam int PIC_LEN = 2 + BODY * K + 5;
  instr_t prog [$];
  task automatic build_pic();
    instr_t i;
    prog.delete();
    i = '0; i.add[0] = aop(A_SUB, 11, 11, 11); i.add[1] = aop(A_SUB, 12, 12, 12);
    i.add[2] = aop(A_SUB, 13, 13, 13); i.ctrl.op = C_SETC; i.imm = IMM_W'(K); prog.push_back(i);
    i = '0; i.in = rd(6, 0, 14); prog.push_back(i);                              // y0
    i = '0; i.in = rd(0, 0, 2); prog.push_back(i);                               // loop: L
    i = '0; i.in = rd(1, 0, 3); prog.push_back(i);                               // C
    i = '0; i.in = rd(2, 0, 4); prog.push_back(i);                               // L^T
    i = '0; i.in = rd(3, 1, 5); prog.push_back(i);                               // d_{i-1}
    i = '0; i.in = rd(4, 1, 6); prog.push_back(i);                               // d_i
    i = '0; i.in = rd(5, 1, 7); i.mul[0] = mop(M_MULQ, 8, 2, 5); prog.push_back(i);
    i = '0; i.mul[1] = mop(M_MULQ, 9, 3, 6); i.add[0] = aop(A_ADD, 11, 11, 8); prog.push_back(i);
    i = '0; i.mul[2] = mop(M_MULQ, 10, 4, 7); i.add[1] = aop(A_ADD, 12, 12, 9); prog.push_back(i);
    i = '0; i.add[2] = aop(A_ADD, 13, 13, 10);
    i.ctrl.op = C_LOOP; i.ctrl.target = pc_t'(PIC_PC + 2); prog.push_back(i);
    i = '0; i.add[0] = aop(A_ADD, 15, 11, 12); prog.push_back(i);
    i = '0; i.add[0] = aop(A_ADD, 15, 15, 13); prog.push_back(i);
    i = '0; i.add[0] = aop(A_SUB, 1, 14, 15); prog.push_back(i);
    i = '0; i.add[0] = aop(A_SGN, 2, 1, 1); i.out.en = 1; i.out.sid = 0; i.out.src = 1;
    prog.push_back(i);
    i = '0; i.out.en = 1; i.out.sid = 1; i.out.src = 2; i.ctrl.op = C_HALT; prog.push_back(i);
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

  // SRF address of the decision vector of bit i used as input of stage l
  function automatic int d_in(int l, int i);
    return (i == 0 || i == NB+1) ? S_D + i*K : S_D + (l-1)*DSTRIDE + i*K;
  endfunction

  function automatic word_t srf_word(int e);
    int r = e / NUM_CLUSTERS;
    case (e % NUM_CLUSTERS)
      0: return dut.u_srf.g_bank[0].mem[r];
      1: return dut.u_srf.g_bank[1].mem[r];
      2: return dut.u_srf.g_bank[2].mem[r];
      3: return dut.u_srf.g_bank[3].mem[r];
      4: return dut.u_srf.g_bank[4].mem[r];
      5: return dut.u_srf.g_bank[5].mem[r];
      6: return dut.u_srf.g_bank[6].mem[r];
      default: return dut.u_srf.g_bank[7].mem[r];
    endcase
  endfunction

  initial begin
    cmd_t c;
    cmd = '0;
    build_pic();
    for (int k = 0; k < K; k++)
      for (int j = 0; j < K; j++) begin
        lm[k][j] = word_t'($urandom_range(16383, 0)) - 8192;
        cm[k][j] = (k == j) ? 0 : word_t'($urandom_range(16383, 0)) - 8192;
        u_sdram.poke(M_L + k*K + j, lm[k][j]);
        u_sdram.poke(M_C + k*K + j, cm[k][j]);
      end
    for (int i = 0; i < NB+2; i++)
      for (int k = 0; k < K; k++) begin
        y0[i][k] = word_t'($urandom_range(1 << 19, 0)) - (1 << 18);
        u_sdram.poke(M_Y0 + i*K + k, y0[i][k]);
        u_sdram.poke(M_D0 + i*K + k, sgn(y0[i][k]));
      end
    model();
    repeat (3) @(posedge clk);
    rst_n = 1;
    foreach (prog[p]) begin
      @(negedge clk);
      ucode_we = 1; ucode_addr = pc_t'(PIC_PC + p); ucode_wdata = prog[p];
    end
    @(negedge clk);
    ucode_we = 0;

    // row streams: element j*8+c = M[8g+c][j]
    for (int g = 0; g < GROUPS; g++) begin
      post(load(M_L + 8*g*K, NUM_CLUSTERS, K, K, 1, S_L + g*8*K));
      post(load(M_C + 8*g*K, NUM_CLUSTERS, K, K, 1, S_C + g*8*K));
      // transpose: element j*8+c = L[j][8g+c]
      post(load(M_L + 8*g, NUM_CLUSTERS, 1, K, K, S_LT + g*8*K));
    end
    post(load(M_Y0, (NB+2)*K, 1, 1, 0, S_Y0));
    post(load(M_D0, (NB+2)*K, 1, 1, 0, S_D));

    for (int l = 1; l <= STAGES; l++) begin
      for (int i = 1; i <= NB; i++)
        for (int g = 0; g < GROUPS; g++) begin
          c = '0;
          c.op = CMD_KERNEL; c.pc = pc_t'(PIC_PC); c.outer_cnt = 1;
          c.in_base[0] = srf_addr_t'(S_L + g*8*K);
          c.in_base[1] = srf_addr_t'(S_C + g*8*K);
          c.in_base[2] = srf_addr_t'(S_LT + g*8*K);
          c.in_base[3] = srf_addr_t'(d_in(l, i-1));
          c.in_base[4] = srf_addr_t'(d_in(l, i));
          c.in_base[5] = srf_addr_t'(d_in(l, i+1));
          c.in_base[6] = srf_addr_t'(S_Y0 + i*K + 8*g);
          c.out_base[0] = srf_addr_t'(S_Y + (l-1)*DSTRIDE + i*K + 8*g);
          c.out_base[1] = srf_addr_t'(S_D + l*DSTRIDE + i*K + 8*g);
          post(c);
        end
      // stage results, read from the SRF once the stage has finished
      while (!idle) @(negedge clk);
      for (int i = 1; i <= NB; i++)
        for (int k = 0; k < K; k++) begin
          chk(srf_word(S_Y + (l-1)*DSTRIDE + i*K + k) == ym[l][i][k],
              $sformatf("stage %0d bit %0d user %0d y", l, i, k));
          chk(srf_word(S_D + l*DSTRIDE + i*K + k) == dm[l][i][k],
              $sformatf("stage %0d bit %0d user %0d d", l, i, k));
        end
    end
    // store the last stage
    c = '0; c.op = CMD_STORE; c.mem_addr = mem_addr_t'(M_Y); c.inner_cnt = cnt_t'(NB*K);
    c.inner_stride = 1; c.outer_cnt = 1; c.srf_addr = srf_addr_t'(S_Y + (STAGES-1)*DSTRIDE + K);
    post(c);
    c.mem_addr = mem_addr_t'(M_Y + NB*K); c.srf_addr = srf_addr_t'(S_D + STAGES*DSTRIDE + K);
    post(c);
    while (!idle) @(negedge clk);
    for (int i = 1; i <= NB; i++)
      for (int k = 0; k < K; k++) begin
        chk(u_sdram.peek(M_Y + (i-1)*K + k) == ym[STAGES][i][k], "stored y");
        chk(u_sdram.peek(M_Y + NB*K + (i-1)*K + k) == dm[STAGES][i][k], "stored d");
      end
    begin
      automatic int changed = 0;
      for (int l = 1; l <= STAGES; l++)
        for (int i = 1; i <= NB; i++)
          for (int k = 0; k < K; k++) if (dm[l][i][k] != dm[l-1][i][k]) changed++;
      $display("decisions changed by cancellation: %0d", changed);
      chk(changed > 0, "cancellation changed some decisions");
    end
    chk(cmds_done == 32'(posted), "every command completed");
    chk(perf_cycles == 32'(STAGES * NB * GROUPS * PIC_LEN),
        $sformatf("kernel issue cycles %0d", perf_cycles));
    chk(perf_mul_ops == 32'(STAGES * NB * GROUPS * 3 * K), "multiplier operations");
    chk(perf_add_ops == 32'(STAGES * NB * GROUPS * (3 + 3 * K + 4)), "adder operations");
    $display("PIC: %0d kernel cycles per bit and stage for %0d users, adder util %0d%%, multiplier util %0d%%",
             GROUPS * PIC_LEN, K, 100 * perf_add_ops / (NUM_ADD * perf_cycles),
             100 * perf_mul_ops / (NUM_MUL * perf_cycles));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
