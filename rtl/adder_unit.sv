// adder_unit: one adder functional unit of an arithmetic cluster.
//
// Each cluster holds three of these next to three multipliers. Besides add
// and subtract the unit does the other single-cycle integer operations a
// baseband kernel needs: min/max (Viterbi add-compare-select), absolute
// value, hard decision sign() as +/-1.0 in the Q format, shifts, logic,
// signed compare, immediate load and cluster index.
// The operation set and the Q format are this design's own choices; the
// design only fixes that there are adders next to multipliers.
//
// Interface: op, operands a and b, the instruction immediate and the cluster
// index in; result y and we (1 unless op is A_NOP) out.
// Timing: purely combinational; the cluster registers the result.
module adder_unit
  import sbp_pkg::*;
(
  input  add_op_e          op,
  input  word_t            a,
  input  word_t            b,
  input  logic [IMM_W-1:0] imm,
  input  logic [7:0]       cid,
  output word_t            y,
  output logic             we
);
  always_comb begin
    we = (op != A_NOP);
    unique case (op)
      A_NOP:  y = '0;
      A_ADD:  y = a + b;
      A_SUB:  y = a - b;
      A_MIN:  y = (a < b) ? a : b;
      A_MAX:  y = (a > b) ? a : b;
      A_ABS:  y = a[DATA_W-1] ? -a : a;
      A_SGN:  y = a[DATA_W-1] ? -Q_ONE : Q_ONE;
      A_PASS: y = a;
      A_LDI:  y = word_t'(signed'(imm));
      A_CID:  y = word_t'(cid);
      A_SHR:  y = a >>> b[4:0];
      A_SHL:  y = a <<  b[4:0];
      A_AND:  y = a & b;
      A_OR:   y = a | b;
      A_XOR:  y = a ^ b;
      A_LT:   y = (a < b) ? word_t'(1) : word_t'(0);
      default: y = '0;
    endcase
  end
endmodule
