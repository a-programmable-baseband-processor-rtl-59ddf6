// alu_cluster: one VLIW arithmetic cluster of the SIMD array.
//
// All clusters receive the same instruction from the microcontroller each
// cycle and execute it on their own data (SIMD). A cluster holds NUM_ADD
// adders and NUM_MUL multipliers (3 + 3) and a local register file. Every
// slot of the instruction reads its operands from the register file in the
// cycle it is issued and writes its result at the clock edge, so a result is
// visible to the very next instruction. If two slots write the same register
// the later slot wins (multipliers after adders, stream input last); an
// assertion flags such a collision.
//
// Stream I/O: the SRF returns stream words one cycle after the microcontroller
// requests them; the cluster remembers the destination register of the read
// and writes srf_rdata at the end of that following cycle. out_data is the
// register named by the instruction's out slot, for the SRF to store.
//
// The register file size, single-cycle units and write priority are this
// design's own choices; the cluster count and unit mix follow the design.
module alu_cluster
  import sbp_pkg::*;
#(
  parameter int unsigned CID = 0
)(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   issue,      // instr is valid this cycle
  input  instr_t instr,
  input  word_t  srf_rdata,  // this cluster's lane of the stream read
  output word_t  out_data,   // register selected by instr.out.src
  output logic [NUM_ADD-1:0] add_busy, // per-unit activity, for utilisation
  output logic [NUM_MUL-1:0] mul_busy
);
  word_t rf [NUM_REGS];

  word_t [NUM_ADD-1:0] add_y;
  logic  [NUM_ADD-1:0] add_we;
  word_t [NUM_MUL-1:0] mul_y;
  logic  [NUM_MUL-1:0] mul_we;

  // pending stream-input write
  logic     in_pend;
  reg_idx_t in_dst;

  for (genvar i = 0; i < NUM_ADD; i++) begin : g_add
    adder_unit u_add (
      .op  (issue ? instr.add[i].op : A_NOP),
      .a   (rf[instr.add[i].a]),
      .b   (rf[instr.add[i].b]),
      .imm (instr.imm),
      .cid (8'(CID)),
      .y   (add_y[i]),
      .we  (add_we[i])
    );
  end

  for (genvar i = 0; i < NUM_MUL; i++) begin : g_mul
    multiplier_unit u_mul (
      .op (issue ? instr.mul[i].op : M_NOP),
      .a  (rf[instr.mul[i].a]),
      .b  (rf[instr.mul[i].b]),
      .y  (mul_y[i]),
      .we (mul_we[i])
    );
  end

  assign add_busy = add_we;
  assign mul_busy = mul_we;
  assign out_data = rf[instr.out.src];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_pend <= 1'b0;
      in_dst  <= '0;
      for (int r = 0; r < NUM_REGS; r++) rf[r] <= '0;
    end else begin
      for (int i = 0; i < NUM_ADD; i++)
        if (add_we[i]) rf[instr.add[i].dst] <= add_y[i];
      for (int i = 0; i < NUM_MUL; i++)
        if (mul_we[i]) rf[instr.mul[i].dst] <= mul_y[i];
      if (in_pend) rf[in_dst] <= srf_rdata;
      in_pend <= issue && instr.in.en;
      in_dst  <= instr.in.dst;
    end
  end

  // Two units writing one register in the same cycle is a programming error.
  function automatic int unsigned writes_to(reg_idx_t r);
    int unsigned n = 0;
    for (int i = 0; i < NUM_ADD; i++) if (add_we[i] && instr.add[i].dst == r) n++;
    for (int i = 0; i < NUM_MUL; i++) if (mul_we[i] && instr.mul[i].dst == r) n++;
    if (in_pend && in_dst == r) n++;
    return n;
  endfunction

  for (genvar r = 0; r < NUM_REGS; r++) begin : g_chk
    a_one_writer: assert property (@(posedge clk) disable iff (!rst_n)
      writes_to(reg_idx_t'(r)) <= 1)
      else $error("cluster %0d: several writes to register %0d", CID, r);
  end
endmodule
