// multiplier_unit: one multiplier functional unit of an arithmetic cluster.
//
// Three of these sit in every cluster, in place of the former division unit,
// so that a cluster has as many multipliers as adders. The unit forms the full
// 64-bit signed product and returns its low word (integer), its high word, or
// the product shifted right by FRAC_BITS (Q15 fixed-point multiply). The
// operation set is this design's own choice.
//
// Interface: op and operands in; result y and we (1 unless op is M_NOP) out.
// Timing: combinational; the cluster registers the result, so a product is
// usable by the next instruction.
module multiplier_unit
  import sbp_pkg::*;
(
  input  mul_op_e op,
  input  word_t   a,
  input  word_t   b,
  output word_t   y,
  output logic    we
);
  logic signed [2*DATA_W-1:0] p;
  logic signed [2*DATA_W-1:0] pq;

  always_comb begin
    p  = 64'(a) * 64'(b);
    pq = p >>> FRAC_BITS;
    we = (op != M_NOP);
    unique case (op)
      M_NOP:  y = '0;
      M_MUL:  y = p[DATA_W-1:0];
      M_MULQ: y = pq[DATA_W-1:0];
      M_MULH: y = p[2*DATA_W-1:DATA_W];
      default: y = '0;
    endcase
  end
endmodule
