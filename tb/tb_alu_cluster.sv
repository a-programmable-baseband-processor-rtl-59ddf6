// tb_alu_cluster: random VLIW instructions on one cluster.
//
// Each cycle the testbench issues an instruction with all three adder and
// all three multiplier slots busy (distinct destinations) and, often, a
// stream input. A register model in the testbench executes the same
// instruction; after every clock edge all registers are read back through the
// out slot and compared. Also checks the one-cycle delay of stream input,
// the cluster index operation and the unit activity outputs.
module tb_alu_cluster;
  import sbp_pkg::*;
  localparam int unsigned MY_CID = 5;

  logic clk = 0, rst_n = 0, issue = 0;
  instr_t instr;
  word_t  srf_rdata, out_data;
  logic [NUM_ADD-1:0] add_busy;
  logic [NUM_MUL-1:0] mul_busy;
  int checks = 0, failures = 0;

  alu_cluster #(.CID(MY_CID)) dut (.clk, .rst_n, .issue, .instr, .srf_rdata, .out_data,
                                   .add_busy, .mul_busy);

  always #50 clk = ~clk;

  longint model [NUM_REGS];
  instr_t last_instr;

  function automatic longint s32(longint v);
    return longint'(signed'(v[31:0]));
  endfunction

  function automatic longint m_add(int o, longint x, longint z, int im);
    case (o)
      1: return s32(x + z);
      2: return s32(x - z);
      3: return (x < z) ? x : z;
      4: return (x > z) ? x : z;
      5: return s32((x < 0) ? -x : x);
      6: return (x < 0) ? -32768 : 32768;
      7: return x;
      8: return (im >= 32768) ? im - 65536 : im;
      9: return MY_CID;
      10: return x >>> (z & 31);
      11: return s32(x << (z & 31));
      12: return s32(x & z);
      13: return s32(x | z);
      14: return s32(x ^ z);
      default: return (x < z) ? 1 : 0;
    endcase
  endfunction

  function automatic longint m_mul(int o, longint x, longint z);
    longint p = x * z;
    case (o)
      1: return s32(p);
      2: return s32(p >>> 15);
      default: return s32(p >>> 32);
    endcase
  endfunction

  task automatic check_regs(string tag);
    issue = 0;
    for (int r = 0; r < NUM_REGS; r++) begin
      instr.out.src = reg_idx_t'(r);
      #1;
      checks++;
      if (longint'(out_data) != model[r]) begin
        failures++;
        if (failures < 4) $display("FAIL %s r%0d dut=%0d model=%0d", tag, r, out_data, model[r]);
        if (failures < 4) for (int i = 0; i < 3; i++) $display("  add%0d %s d%0d a%0d b%0d | mul%0d %s d%0d a%0d b%0d | in %b d%0d", i, last_instr.add[i].op.name(), last_instr.add[i].dst, last_instr.add[i].a, last_instr.add[i].b, i, last_instr.mul[i].op.name(), last_instr.mul[i].dst, last_instr.mul[i].a, last_instr.mul[i].b, last_instr.in.en, last_instr.in.dst);
      end
    end
  endtask

  initial begin
    int perm [NUM_REGS];
    longint nxt [NUM_REGS];
    bit     pend = 0;
    int     pend_dst = 0;
    instr = '0;
    srf_rdata = '0;
    for (int r = 0; r < NUM_REGS; r++) model[r] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check_regs("reset");
    // preload registers with small values through LDI
    for (int r = 0; r < NUM_REGS; r++) begin
      instr = '0;
      instr.add[0].op  = A_LDI;
      instr.add[0].dst = reg_idx_t'(r);
      instr.imm        = IMM_W'($urandom);
      issue = 1;
      @(posedge clk); #1;
      model[r] = longint'(signed'(instr.imm));
    end
    for (int n = 0; n < 600; n++) begin
      @(negedge clk);
      // random distinct destinations for the six unit slots and the input
      for (int r = 0; r < NUM_REGS; r++) perm[r] = r;
      perm.shuffle();
      // the pending stream word must not collide with a unit destination
      if (pend) begin
        for (int k = 0; k < 6; k++)
          if (perm[k] == pend_dst) begin perm[k] = perm[6]; perm[6] = pend_dst; end
      end
      instr = '0;
      instr.imm = IMM_W'($urandom);
      for (int i = 0; i < NUM_ADD; i++) begin
        instr.add[i].op  = add_op_e'($urandom_range(15, 1));
        instr.add[i].dst = reg_idx_t'(perm[i]);
        instr.add[i].a   = reg_idx_t'($urandom);
        instr.add[i].b   = reg_idx_t'($urandom);
      end
      for (int i = 0; i < NUM_MUL; i++) begin
        instr.mul[i].op  = mul_op_e'($urandom_range(3, 1));
        instr.mul[i].dst = reg_idx_t'(perm[NUM_ADD+i]);
        instr.mul[i].a   = reg_idx_t'($urandom);
        instr.mul[i].b   = reg_idx_t'($urandom);
      end
      instr.in.en  = ($urandom % 2 == 0);
      instr.in.dst = reg_idx_t'(perm[$urandom_range(14, 7)]);
      srf_rdata    = word_t'($urandom);
      issue = 1;
      #1;
      checks++;
      if (add_busy !== '1 || mul_busy !== '1) begin
        failures++;
        $display("FAIL busy flags %b %b ops %s %s %s issue=%b", add_busy, mul_busy, instr.add[0].op.name(), instr.add[1].op.name(), instr.add[2].op.name(), issue);
      end
      for (int r = 0; r < NUM_REGS; r++) nxt[r] = model[r];
      for (int i = 0; i < NUM_ADD; i++)
        nxt[instr.add[i].dst] = m_add(int'(instr.add[i].op), model[instr.add[i].a],
                                      model[instr.add[i].b], int'(instr.imm));
      for (int i = 0; i < NUM_MUL; i++)
        nxt[instr.mul[i].dst] = m_mul(int'(instr.mul[i].op), model[instr.mul[i].a],
                                      model[instr.mul[i].b]);
      if (pend) nxt[pend_dst] = longint'(srf_rdata);
      @(posedge clk); #1;
      last_instr = instr;
      pend     = instr.in.en;
      pend_dst = int'(instr.in.dst);
      for (int r = 0; r < NUM_REGS; r++) model[r] = nxt[r];
      check_regs("random");
    end
    // with issue low nothing but a pending stream word is written
    @(negedge clk);
    issue = 0;
    instr.add[0].op = A_ADD;
    #1;
    checks++;
    if (add_busy !== '0) begin failures++; $display("FAIL busy while not issuing"); end
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
