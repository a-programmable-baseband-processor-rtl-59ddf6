// tb_multiplier_unit: random and corner operands for every multiplier
// operation, compared with a 64-bit product computed in the testbench.
module tb_multiplier_unit;
  import sbp_pkg::*;
  mul_op_e op;
  word_t   a, b, y;
  logic    we;
  int checks = 0, failures = 0;

  multiplier_unit dut (.op, .a, .b, .y, .we);

  initial begin
    longint p;
    word_t   expv;
    for (int n = 0; n < 4000; n++) begin
      op = mul_op_e'(n % 4);
      a  = (n % 9 == 0) ? -32'sd32768 : word_t'($urandom);
      b  = (n % 11 == 0) ? 32'sh80000000 : word_t'($urandom);
      if (n % 3 == 0) begin a = a >>> 14; b = b >>> 14; end
      #1;
      p = longint'(a) * longint'(b);
      case (n % 4)
        0: expv = 0;
        1: expv = word_t'(p);
        2: expv = word_t'(p / 32768 - ((p < 0 && p % 32768 != 0) ? 1 : 0));
        default: expv = word_t'(p >>> 32);
      endcase
      checks++;
      if (y !== expv || we !== (op != M_NOP)) begin
        failures++;
        if (failures < 10) $display("FAIL op=%s a=%0d b=%0d y=%0d exp=%0d", op.name(), a, b, y, expv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
