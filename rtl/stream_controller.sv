// stream_controller: takes stream commands from the host and runs them.
//
// The host processor does not drive the units directly; it posts commands
// (cmd_t: load, store, kernel, network send/receive) into a QDEPTH-entry queue
// and the stream controller starts them one at a time, in order, on the unit
// that executes them: the streaming memory system, the microcontroller or the
// network interface. The unit that runs the current command owns the SRF
// (owner output). A command completes when its unit pulses done.
//
// Because commands run one at a time, the clusters sit idle while the memory
// system moves or rearranges data; stall_cycles counts those cycles (the
// memory stall time), kernel_cycles the cycles spent in kernels.
//
// Interface: cmd_valid/cmd_ready handshake (ready while the queue has room);
// idle is high when the queue is empty and no command runs. Each unit gets a
// one-cycle start pulse and its operands; cmds_done counts finished commands.
// Timing: a command starts two cycles after it enters an empty queue and the
// next one two cycles after the previous done.
// The design says only that the host issues commands via the stream
// controller; the queue, in-order execution and command format are this
// design's own choices.
module stream_controller
  import sbp_pkg::*;
#(
  parameter int unsigned QDEPTH = 4
)(
  input  logic                    clk,
  input  logic                    rst_n,
  // host
  input  logic                    cmd_valid,
  output logic                    cmd_ready,
  input  cmd_t                    cmd,
  output logic                    idle,
  // streaming memory system
  output logic                    mem_start,
  output xfer_t                   mem_xfer,
  input  logic                    mem_done,
  // microcontroller
  output logic                    kern_start,
  output pc_t                     kern_pc,
  output srf_addr_t [NUM_IN-1:0]  kern_in_base,
  output srf_addr_t [NUM_OUT-1:0] kern_out_base,
  input  logic                    kern_done,
  // network interface
  output logic                    net_start,
  output logic                    net_send,
  output srf_addr_t               net_srf_addr,
  output logic [31:0]             net_len,
  input  logic                    net_done,
  // SRF ownership
  output logic [1:0]              owner,        // 0 none, 1 memory, 2 kernel, 3 network
  // statistics
  output logic [31:0]             cmds_done,
  output logic [31:0]             stall_cycles,
  output logic [31:0]             kernel_cycles,
  output logic [31:0]             queue_full_cycles
);
  localparam int unsigned QW = $clog2(QDEPTH);
  localparam logic [1:0] OWN_NONE = 2'd0, OWN_MEM = 2'd1, OWN_KERN = 2'd2, OWN_NET = 2'd3;

  cmd_t          q [QDEPTH];
  logic [QW-1:0] rd_ptr, wr_ptr;
  logic [QW:0]   count;
  cmd_t          cur;
  logic          running;

  logic push, pop;
  assign cmd_ready = (count != (QW+1)'(QDEPTH));
  assign push      = cmd_valid && cmd_ready;
  assign pop       = !running && (count != 0);
  assign idle      = !running && (count == 0);

  logic unit_done;
  always_comb begin
    unique case (owner)
      OWN_MEM:  unit_done = mem_done;
      OWN_KERN: unit_done = kern_done;
      OWN_NET:  unit_done = net_done;
      default:  unit_done = 1'b0;
    endcase
  end

  always_ff @(posedge clk) begin
    if (push) q[wr_ptr] <= cmd;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
      cur    <= '0;
      running <= 1'b0;
      owner  <= OWN_NONE;
      mem_start  <= 1'b0;
      kern_start <= 1'b0;
      net_start  <= 1'b0;
      cmds_done  <= '0;
      stall_cycles      <= '0;
      kernel_cycles     <= '0;
      queue_full_cycles <= '0;
    end else begin
      mem_start  <= 1'b0;
      kern_start <= 1'b0;
      net_start  <= 1'b0;
      if (push) wr_ptr <= (wr_ptr == QW'(QDEPTH-1)) ? '0 : wr_ptr + 1'b1;
      if (pop)  rd_ptr <= (rd_ptr == QW'(QDEPTH-1)) ? '0 : rd_ptr + 1'b1;
      count <= count + (QW+1)'(push) - (QW+1)'(pop);
      if (cmd_valid && !cmd_ready) queue_full_cycles <= queue_full_cycles + 1;
      if (owner == OWN_MEM)  stall_cycles  <= stall_cycles + 1;
      if (owner == OWN_KERN) kernel_cycles <= kernel_cycles + 1;

      if (pop) begin
        cur     <= q[rd_ptr];
        running <= 1'b1;
        unique case (q[rd_ptr].op)
          CMD_LOAD, CMD_STORE:        begin owner <= OWN_MEM;  mem_start  <= 1'b1; end
          CMD_KERNEL:                 begin owner <= OWN_KERN; kern_start <= 1'b1; end
          CMD_NET_SEND, CMD_NET_RECV: begin owner <= OWN_NET;  net_start  <= 1'b1; end
          default: begin
            // unknown command: retire it at once
            running   <= 1'b0;
            cmds_done <= cmds_done + 1;
          end
        endcase
      end else if (running && unit_done) begin
        running   <= 1'b0;
        owner     <= OWN_NONE;
        cmds_done <= cmds_done + 1;
      end
    end
  end

  always_comb begin
    mem_xfer.mem_addr     = cur.mem_addr;
    mem_xfer.inner_cnt    = cur.inner_cnt;
    mem_xfer.inner_stride = cur.inner_stride;
    mem_xfer.outer_cnt    = cur.outer_cnt;
    mem_xfer.outer_stride = cur.outer_stride;
    mem_xfer.srf_addr     = cur.srf_addr;
    mem_xfer.store        = (cur.op == CMD_STORE);
  end
  assign kern_pc       = cur.pc;
  assign kern_in_base  = cur.in_base;
  assign kern_out_base = cur.out_base;
  assign net_send      = (cur.op == CMD_NET_SEND);
  assign net_srf_addr  = cur.srf_addr;
  assign net_len       = 32'(cur.inner_cnt) * 32'(cur.outer_cnt);

  a_one_start: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0({mem_start, kern_start, net_start}))
    else $error("two units started at once");
endmodule
