// microcontroller: kernel sequencer of the SIMD cluster array.
//
// The microcontroller holds the kernel microcode and, while a kernel runs,
// fetches one VLIW instruction per cycle and broadcasts it to all clusters.
// It also owns the kernel's stream pointers: the in slot of an instruction
// becomes an SRF read at in_base[sid] plus the stream's running offset, which
// then advances by NUM_CLUSTERS elements (lane read: one record, one word per
// cluster) or by one element (broadcast read); the out slot becomes an SRF row
// write at out_base[sid] plus its offset. Control slots give two loop counters
// (SETC loads one from the immediate, LOOP decrements it and jumps back while
// it is non-zero) and HALT, which ends the kernel after its own slots execute.
//
// It counts kernel cycles and issued adder and multiplier operations (of one
// cluster; all clusters do the same), from which unit utilisation follows.
//
// Interface: the host writes microcode through ucode_we/addr/wdata while no
// kernel runs; start with start_pc and the stream bases launches a kernel;
// busy is high from the cycle after start until HALT issues, done pulses
// the cycle after HALT. The microcode store is read asynchronously, so a taken
// LOOP costs no bubble.
// Instruction format, loop counters and microcode depth are this design's own
// choices; the design names the microcontroller but does not detail it.
module microcontroller
  import sbp_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  // microcode load
  input  logic                    ucode_we,
  input  pc_t                     ucode_addr,
  input  instr_t                  ucode_wdata,
  // kernel launch
  input  logic                    start,
  input  pc_t                     start_pc,
  input  srf_addr_t [NUM_IN-1:0]  in_base,
  input  srf_addr_t [NUM_OUT-1:0] out_base,
  output logic                    busy,
  output logic                    done,
  // broadcast to clusters
  output logic                    issue,
  output instr_t                  instr,
  // SRF requests for the cluster streams
  output logic                    srf_rd_en,
  output logic                    srf_rd_lane,
  output srf_addr_t               srf_rd_addr,
  output logic                    srf_wr_en,
  output srf_addr_t               srf_wr_addr,
  // performance counters (since reset)
  output logic [31:0]             perf_cycles,
  output logic [31:0]             perf_add_ops,
  output logic [31:0]             perf_mul_ops
);
  instr_t ucode [UCODE_DEPTH];

  pc_t                     pc;
  logic                    running;
  cnt_t                    cnt [2];
  srf_addr_t [NUM_IN-1:0]  ibase;
  srf_addr_t [NUM_OUT-1:0] obase;
  srf_addr_t [NUM_IN-1:0]  ioff;
  srf_addr_t [NUM_OUT-1:0] ooff;

  always_ff @(posedge clk) begin
    if (ucode_we) ucode[ucode_addr] <= ucode_wdata;
  end

  assign issue = running;
  assign instr = ucode[pc];
  assign busy  = running;

  assign srf_rd_en   = running && instr.in.en;
  assign srf_rd_lane = !instr.in.bcast;
  assign srf_rd_addr = ibase[instr.in.sid] + ioff[instr.in.sid];
  assign srf_wr_en   = running && instr.out.en;
  assign srf_wr_addr = obase[instr.out.sid] + ooff[instr.out.sid];

  int unsigned n_add, n_mul;
  always_comb begin
    n_add = 0;
    n_mul = 0;
    for (int i = 0; i < NUM_ADD; i++) if (instr.add[i].op != A_NOP) n_add++;
    for (int i = 0; i < NUM_MUL; i++) if (instr.mul[i].op != M_NOP) n_mul++;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc           <= '0;
      running      <= 1'b0;
      done         <= 1'b0;
      cnt[0]       <= '0;
      cnt[1]       <= '0;
      ibase        <= '0;
      obase        <= '0;
      ioff         <= '0;
      ooff         <= '0;
      perf_cycles  <= '0;
      perf_add_ops <= '0;
      perf_mul_ops <= '0;
    end else begin
      done <= 1'b0;
      if (!running) begin
        if (start) begin
          running <= 1'b1;
          pc      <= start_pc;
          ibase   <= in_base;
          obase   <= out_base;
          ioff    <= '0;
          ooff    <= '0;
        end
      end else begin
        perf_cycles  <= perf_cycles + 1;
        perf_add_ops <= perf_add_ops + n_add;
        perf_mul_ops <= perf_mul_ops + n_mul;
        if (instr.in.en)
          ioff[instr.in.sid] <= ioff[instr.in.sid] +
                                (instr.in.bcast ? srf_addr_t'(1) : srf_addr_t'(NUM_CLUSTERS));
        if (instr.out.en)
          ooff[instr.out.sid] <= ooff[instr.out.sid] + srf_addr_t'(NUM_CLUSTERS);
        pc <= pc + 1'b1;
        unique case (instr.ctrl.op)
          C_NOP: ;
          C_SETC: cnt[instr.ctrl.csel] <= cnt_t'(instr.imm);
          C_LOOP: begin
            cnt[instr.ctrl.csel] <= cnt[instr.ctrl.csel] - 1'b1;
            if (cnt[instr.ctrl.csel] != cnt_t'(1)) pc <= instr.ctrl.target;
          end
          C_HALT: begin
            running <= 1'b0;
            done    <= 1'b1;
          end
          default: ;
        endcase
      end
    end
  end

  a_no_load_while_running: assert property (@(posedge clk) disable iff (!rst_n)
    !(ucode_we && running)) else $error("microcode written while a kernel runs");
  a_lane_aligned: assert property (@(posedge clk) disable iff (!rst_n)
    srf_rd_en && srf_rd_lane |-> srf_rd_addr[$clog2(NUM_CLUSTERS)-1:0] == '0)
    else $error("lane stream read not record aligned");
endmodule
