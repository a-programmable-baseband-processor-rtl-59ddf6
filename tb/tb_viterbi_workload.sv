// tb_viterbi_workload: Viterbi decoding of a rate 1/2, constraint length 5
// convolutional code for 32 users on the whole processor at full size.
//
// Code (own choice of the common generators 23 and 35 octal): the encoder
// state s holds the last four input bits, newest in bit 3; input u gives the
// code bits g0 = u^s1^s0 and g1 = u^s3^s2^s0 and the next state
// (u << 3) | (s >> 1). Each user sends TD data bits and four zero tail bits,
// so T = TD + 4 trellis steps end in state 0. The received soft value of code
// bit c is (1 - 2c) * AMP plus noise; two code bits per user are inverted
// outright to show that the decoder corrects errors.
//
// One cluster decodes one user. Per trellis step the kernel forms the four
// branch metrics (a code-bit guess e costs y if e = 1 and -y if e = 0),
// then for each of the eight butterflies (old states 2j and 2j+1, new
// states j and j+8) adds, compares and selects. Survivors are kept by
// register exchange: each state carries a 32-bit word of its path's input
// bits, newest in bit 0, chosen with a multiply by the decision bit. The
// path metrics and survivors of every step are appended to two SRF streams
// (states 0-7 and states 8-15) that the same kernel reads back one step
// later, so all of the trellis state lives in the SRF. After T steps the
// survivor of state 0 holds the decoded bits. The launches for the four
// groups of eight users run one after another and reuse the same SRF space;
// the last step of each is stored to SDRAM.
//
// The final path metrics and survivors of all states are compared with an
// add-compare-select model in the testbench, and the decoded bits with the
// bits that were sent. Kernel cycle and operation counts are checked against
// the schedule.
module tb_viterbi_workload;
  import sbp_pkg::*;

  localparam int USERS = 32, TD = 28, T = TD + 4, S = 16, GROUPS = USERS / NUM_CLUSTERS;
  localparam int AMP = 1024, BIG = 1 << 20;
  localparam int STEP = 2 * (S / 2) * NUM_CLUSTERS;   // SRF words per step and half
  // SDRAM layout
  localparam int M_Y    = 0;                 // USERS x 2T soft values
  localparam int M_INIT = 2048;              // initial step, low and high halves
  localparam int M_OUT  = 4096;              // per group: last step, both halves
  // SRF layout
  localparam int S_P = 0;                    // states 0-7, (T+1) steps
  localparam int S_Q = 8192;                 // states 8-15
  localparam int S_Y = 16384;                // lane stream of 2T words

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
  bit    data [USERS][TD];
  word_t ysoft [USERS][2*T];
  word_t pm_m [USERS][S];
  word_t sv_m [USERS][S];

  function automatic bit [1:0] code(int s, int u);
    bit b0 = 1'(u) ^ s[1] ^ s[0];
    bit b1 = 1'(u) ^ s[3] ^ s[2] ^ s[0];
    return {b0, b1};
  endfunction

  task automatic encode_and_model();
    for (int k = 0; k < USERS; k++) begin
      int s = 0;
      int flip0 = $urandom_range(19, 0), flip1 = $urandom_range(59, 40);
      for (int t = 0; t < T; t++) begin
        int u = (t < TD) ? int'(data[k][t]) : 0;
        bit [1:0] c = code(s, u);
        for (int b = 0; b < 2; b++) begin
          int v = (c[1-b] ? -AMP : AMP) + int'($urandom_range(400, 0)) - 200;
          if (2*t + b == flip0 || 2*t + b == flip1) v = -v;
          ysoft[k][2*t + b] = word_t'(v);
        end
        s = (u << 3) | (s >> 1);
      end
      // add-compare-select over the received values
      for (int s2 = 0; s2 < S; s2++) begin
        pm_m[k][s2] = (s2 == 0) ? 0 : BIG;
        sv_m[k][s2] = 0;
      end
      for (int t = 0; t < T; t++) begin
        word_t npm [S], nsv [S];
        for (int ns = 0; ns < S; ns++) begin
          int u = ns >> 3, a = (ns & 7) << 1, b = a + 1;
          word_t ca = pm_m[k][a] + bm(code(a, u), ysoft[k][2*t], ysoft[k][2*t+1]);
          word_t cb = pm_m[k][b] + bm(code(b, u), ysoft[k][2*t], ysoft[k][2*t+1]);
          if (cb < ca) begin npm[ns] = cb; nsv[ns] = (sv_m[k][b] << 1) | word_t'(u); end
          else         begin npm[ns] = ca; nsv[ns] = (sv_m[k][a] << 1) | word_t'(u); end
        end
        pm_m[k] = npm;
        sv_m[k] = nsv;
      end
    end
  endtask

  function automatic word_t bm(bit [1:0] e, word_t y0, word_t y1);
    return (e[1] ? y0 : -y0) + (e[0] ? y1 : -y1);
  endfunction

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

  // Registers: r0 = 0, r1 = 1, r2..r5 branch metrics of code bits 00, 01,
  // 10, 11, r6..r15 butterfly temporaries. Streams: 0 states 0-7 and 1
  // states 8-15 (lane, pm and survivor per state), 2 received values (lane);
  // out 0 and out 1 the new states 0-7 and 8-15.
  localparam int BFLY = 13, BFLY_PITCH = 11, STEP_HEAD = 5;
  localparam int BODY = STEP_HEAD + 7 * BFLY_PITCH + BFLY;
  localparam int V_LEN = 2 + BODY * T + 1;
  instr_t body [BODY];
  instr_t prog [$];

  function automatic out_slot_t wr(int sid, int src);
    out_slot_t s;
    s.en = 1; s.sid = 1'(sid); s.src = reg_idx_t'(src);
    return s;
  endfunction

  // merge the used slots of x into body[at]
  task automatic put(int at, instr_t x);
    for (int n = 0; n < NUM_ADD; n++)
      if (x.add[n].op != A_NOP) begin
        if (body[at].add[n].op != A_NOP) $fatal(1, "slot clash");
        body[at].add[n] = x.add[n];
      end
    for (int n = 0; n < NUM_MUL; n++)
      if (x.mul[n].op != M_NOP) begin
        if (body[at].mul[n].op != M_NOP) $fatal(1, "slot clash");
        body[at].mul[n] = x.mul[n];
      end
    if (x.in.en) begin
      if (body[at].in.en) $fatal(1, "slot clash");
      body[at].in = x.in;
    end
    if (x.out.en) begin
      if (body[at].out.en) $fatal(1, "slot clash");
      body[at].out = x.out;
    end
  endtask

  task automatic butterfly(int at, int j);
    int a = 2 * j, b = a + 1, sid = (j < 4) ? 0 : 1;
    instr_t i;
    i = '0; i.in = rd(sid, 0, 6); put(at + 0, i);                      // pm a
    i = '0; i.in = rd(sid, 0, 7); put(at + 1, i);                      // sv a
    i = '0; i.in = rd(sid, 0, 8); put(at + 2, i);                      // pm b
    i = '0; i.in = rd(sid, 0, 9);                                      // sv b
    i.add[0] = aop(A_ADD, 10, 6, 2 + int'(code(a, 0)));
    i.add[1] = aop(A_ADD, 11, 6, 2 + int'(code(a, 1))); put(at + 3, i);
    i = '0; i.add[0] = aop(A_ADD, 12, 8, 2 + int'(code(b, 0)));
    i.add[1] = aop(A_ADD, 13, 8, 2 + int'(code(b, 1))); put(at + 4, i);
    i = '0; i.add[0] = aop(A_LT, 14, 12, 10); i.add[1] = aop(A_LT, 15, 13, 11);
    i.add[2] = aop(A_MIN, 10, 10, 12); put(at + 5, i);
    i = '0; i.add[0] = aop(A_MIN, 11, 11, 13); i.add[1] = aop(A_SUB, 12, 9, 7);
    i.out = wr(0, 10); put(at + 6, i);                                 // pm of state j
    i = '0; i.mul[0] = mop(M_MUL, 13, 12, 14); i.mul[1] = mop(M_MUL, 12, 12, 15); put(at + 7, i);
    i = '0; i.add[0] = aop(A_ADD, 13, 7, 13); i.add[1] = aop(A_ADD, 12, 7, 12); put(at + 8, i);
    i = '0; i.add[0] = aop(A_ADD, 13, 13, 13); i.add[1] = aop(A_ADD, 12, 12, 12); put(at + 9, i);
    i = '0; i.add[0] = aop(A_ADD, 12, 12, 1); i.out = wr(0, 13); put(at + 10, i);  // sv of j
    i = '0; i.out = wr(1, 11); put(at + 11, i);                        // pm of j+8
    i = '0; i.out = wr(1, 12); put(at + 12, i);                        // sv of j+8
  endtask

  task automatic build();
    instr_t i;
    for (int n = 0; n < BODY; n++) body[n] = '0;
    i = '0; i.in = rd(2, 0, 6); put(0, i);
    i = '0; i.in = rd(2, 0, 7); put(1, i);
    i = '0; i.add[0] = aop(A_ADD, 5, 6, 7); i.add[1] = aop(A_SUB, 4, 6, 7); put(3, i);
    i = '0; i.add[0] = aop(A_SUB, 3, 0, 4); i.add[1] = aop(A_SUB, 2, 0, 5); put(4, i);
    for (int j = 0; j < 8; j++) butterfly(STEP_HEAD + j * BFLY_PITCH, j);
    body[BODY-1].ctrl.op = C_LOOP;
    body[BODY-1].ctrl.target = 2;
    prog.delete();
    // LDI and SETC share the immediate field, so they take two instructions
    i = '0; i.add[0] = aop(A_SUB, 0, 0, 0); i.add[1] = aop(A_LDI, 1, 0, 0); i.imm = 1;
    prog.push_back(i);
    i = '0; i.ctrl.op = C_SETC; i.imm = IMM_W'(T); prog.push_back(i);
    foreach (body[n]) prog.push_back(body[n]);
    i = '0; i.ctrl.op = C_HALT; prog.push_back(i);
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
    automatic int dec_ok = 0, raw_err = 0;
    cmd = '0;
    for (int k = 0; k < USERS; k++)
      for (int t = 0; t < TD; t++) data[k][t] = 1'($urandom_range(1, 0));
    encode_and_model();
    build();
    for (int k = 0; k < USERS; k++)
      for (int n = 0; n < 2*T; n++) u_sdram.poke(M_Y + k*2*T + n, ysoft[k][n]);
    // initial step: per state pm then survivor, one row of eight users each
    for (int h = 0; h < 2; h++)
      for (int s2 = 0; s2 < S/2; s2++)
        for (int c2 = 0; c2 < NUM_CLUSTERS; c2++) begin
          u_sdram.poke(M_INIT + h*STEP + s2*16 + c2, (h == 0 && s2 == 0) ? 0 : BIG);
          u_sdram.poke(M_INIT + h*STEP + s2*16 + 8 + c2, 0);
        end
    repeat (3) @(posedge clk);
    rst_n = 1;
    foreach (prog[p]) begin
      @(negedge clk);
      ucode_we = 1; ucode_addr = pc_t'(p); ucode_wdata = prog[p];
    end
    @(negedge clk);
    ucode_we = 0;

    for (int g = 0; g < GROUPS; g++) begin
      post(load(M_INIT, STEP, 1, 1, 0, S_P));
      post(load(M_INIT + STEP, STEP, 1, 1, 0, S_Q));
      post(load(M_Y + 8*g*2*T, NUM_CLUSTERS, 2*T, 2*T, 1, S_Y));
      c = '0;
      c.op = CMD_KERNEL; c.pc = 0; c.outer_cnt = 1;
      c.in_base[0] = srf_addr_t'(S_P);
      c.in_base[1] = srf_addr_t'(S_Q);
      c.in_base[2] = srf_addr_t'(S_Y);
      c.out_base[0] = srf_addr_t'(S_P + STEP);
      c.out_base[1] = srf_addr_t'(S_Q + STEP);
      post(c);
      post(store(M_OUT + g*2*STEP, STEP, 1, 1, 0, S_P + T*STEP));
      post(store(M_OUT + g*2*STEP + STEP, STEP, 1, 1, 0, S_Q + T*STEP));
    end
    while (!idle) @(negedge clk);

    for (int k = 0; k < USERS; k++) begin
      automatic int g = k / NUM_CLUSTERS, c2 = k % NUM_CLUSTERS;
      automatic bit ok = 1;
      word_t sv0;
      for (int s2 = 0; s2 < S; s2++) begin
        automatic int base = M_OUT + g*2*STEP + (s2 / 8)*STEP + (s2 % 8)*16 + c2;
        chk(u_sdram.peek(base) == pm_m[k][s2], $sformatf("user %0d state %0d metric", k, s2));
        chk(u_sdram.peek(base + 8) == sv_m[k][s2], $sformatf("user %0d state %0d survivor", k, s2));
      end
      sv0 = u_sdram.peek(M_OUT + g*2*STEP + c2 + 8);
      for (int t = 0; t < TD; t++) if (sv0[T-1-t] != data[k][t]) ok = 0;
      for (int t = 0; t < 2*T; t++) if (ysoft[k][t] < 0 != code_bit(k, t)) raw_err++;
      chk(ok, $sformatf("user %0d decoded bits", k));
      dec_ok += int'(ok);
    end
    $display("users decoded without error: %0d of %0d, code bits received wrong: %0d",
             dec_ok, USERS, raw_err);
    chk(raw_err >= 2 * USERS, "errors were present in the received values");
    chk(cmds_done == 32'(posted), "every command completed");
    chk(perf_cycles == 32'(GROUPS * V_LEN), $sformatf("kernel issue cycles %0d", perf_cycles));
    chk(perf_mul_ops == 32'(GROUPS * T * 16), "multiplier operations");
    chk(perf_add_ops == 32'(GROUPS * (2 + T * (4 + 8 * 14))), "adder operations");
    $display("Viterbi: %0d kernel cycles per trellis step for %0d users, adder util %0d%%, multiplier util %0d%%",
             GROUPS * BODY, USERS, 100 * perf_add_ops / (NUM_ADD * perf_cycles),
             100 * perf_mul_ops / (NUM_MUL * perf_cycles));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // code bit n of user k as sent, worked out again from the data
  function automatic bit code_bit(int k, int n);
    int s = 0;
    for (int t = 0; t < n / 2; t++) begin
      int u = (t < TD) ? int'(data[k][t]) : 0;
      s = (u << 3) | (s >> 1);
    end
    begin
      int u = (n / 2 < TD) ? int'(data[k][n / 2]) : 0;
      bit [1:0] c = code(s, u);
      return c[1 - n % 2];
    end
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
