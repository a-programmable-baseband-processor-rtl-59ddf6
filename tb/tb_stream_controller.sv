// tb_stream_controller: posts a burst of random commands faster than they
// can run, with stand-in units that finish after a random time. Checks that
// commands start one at a time, in posting order, on the right unit with the
// right operands, that the SRF owner follows the running unit, that the queue
// pushes back when full, and the completion and cycle counters.
module tb_stream_controller;
  import sbp_pkg::*;
  logic clk = 0, rst_n = 0;
  logic cmd_valid = 0, cmd_ready, idle;
  cmd_t cmd;
  logic mem_start, kern_start, net_start, net_send;
  logic mem_done = 0, kern_done = 0, net_done = 0;
  xfer_t mem_xfer;
  pc_t kern_pc;
  srf_addr_t [NUM_IN-1:0] kern_in_base;
  srf_addr_t [NUM_OUT-1:0] kern_out_base;
  srf_addr_t net_srf_addr;
  logic [31:0] net_len;
  logic [1:0] owner;
  logic [31:0] cmds_done, stall_cycles, kernel_cycles, queue_full_cycles;
  int checks = 0, failures = 0;

  stream_controller dut (.*);

  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  localparam int NCMD = 40;
  cmd_t sent [$];
  int   started = 0;
  int   exp_mem_cycles = 0, exp_kern_cycles = 0;

  // stand-in units: accept a start, finish after a random time
  initial begin
    forever begin
      @(negedge clk);
      if (mem_start || kern_start || net_start) begin
        automatic int n = $urandom_range(6, 0);
        automatic cmd_t c = sent[started];
        automatic int u = mem_start ? 1 : kern_start ? 2 : 3;
        chk(int'(mem_start) + int'(kern_start) + int'(net_start) == 1, "one start");
        chk(started < sent.size(), "start only for a posted command");
        case (c.op)
          CMD_LOAD, CMD_STORE: begin
            chk(u == 1, "memory command to memory system");
            chk(mem_xfer.mem_addr == c.mem_addr && mem_xfer.inner_cnt == c.inner_cnt &&
                mem_xfer.inner_stride == c.inner_stride && mem_xfer.outer_cnt == c.outer_cnt &&
                mem_xfer.outer_stride == c.outer_stride && mem_xfer.srf_addr == c.srf_addr &&
                mem_xfer.store == (c.op == CMD_STORE), "memory operands");
          end
          CMD_KERNEL: begin
            chk(u == 2, "kernel command to microcontroller");
            chk(kern_pc == c.pc && kern_in_base == c.in_base && kern_out_base == c.out_base,
                "kernel operands");
          end
          default: begin
            chk(u == 3, "network command to network interface");
            chk(net_send == (c.op == CMD_NET_SEND) && net_srf_addr == c.srf_addr &&
                net_len == 32'(c.inner_cnt) * 32'(c.outer_cnt), "network operands");
          end
        endcase
        started++;
        // ownership while running; done comes after n more cycles
        for (int k = 0; k <= n; k++) begin
          chk(owner == 2'(u), "owner follows running unit");
          if (u == 1) exp_mem_cycles++;
          if (u == 2) exp_kern_cycles++;
          if (k == n) begin
            if (u == 1) mem_done = 1; else if (u == 2) kern_done = 1; else net_done = 1;
          end
          @(negedge clk);
          mem_done = 0; kern_done = 0; net_done = 0;
        end
      end
    end
  end

  initial begin
    cmd = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(idle && cmd_ready, "idle after reset");
    for (int k = 0; k < NCMD; k++) begin
      cmd_t c;
      c = '0;
      c.op = cmd_op_e'($urandom_range(4, 0));
      c.mem_addr = mem_addr_t'($urandom);
      c.inner_cnt = cnt_t'($urandom); c.inner_stride = cnt_t'($urandom);
      c.outer_cnt = cnt_t'($urandom); c.outer_stride = cnt_t'($urandom);
      c.srf_addr = srf_addr_t'($urandom); c.pc = pc_t'($urandom);
      for (int s = 0; s < NUM_IN; s++) c.in_base[s] = srf_addr_t'($urandom);
      for (int s = 0; s < NUM_OUT; s++) c.out_base[s] = srf_addr_t'($urandom);
      cmd = c;
      cmd_valid = 1;
      #1;
      while (!cmd_ready) begin @(negedge clk); #1; end
      sent.push_back(c);
      @(negedge clk);
    end
    cmd_valid = 0;
    while (!idle) @(negedge clk);
    chk(started == NCMD, "every command started");
    chk(cmds_done == NCMD, "completion counter");
    chk(queue_full_cycles > 0, "queue pushed back");
    chk(stall_cycles == 32'(exp_mem_cycles), $sformatf("stall cycles %0d vs %0d", stall_cycles, exp_mem_cycles));
    chk(kernel_cycles == 32'(exp_kern_cycles), "kernel cycles");
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
