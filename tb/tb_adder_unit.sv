// tb_adder_unit: exercises every adder operation with random and corner
// operands and compares with a reference model written with plain integer
// arithmetic in the testbench.
module tb_adder_unit;
  import sbp_pkg::*;
  add_op_e          op;
  word_t            a, b, y;
  logic [IMM_W-1:0] imm;
  logic [7:0]       cid;
  logic             we;
  int checks = 0, failures = 0;

  adder_unit dut (.op, .a, .b, .imm, .cid, .y, .we);

  function automatic longint ref_y(int o, longint x, longint z, int im, int c);
    case (o)
      0:  return 0;
      1:  return 32'(x + z);
      2:  return 32'(x - z);
      3:  return (x < z) ? x : z;
      4:  return (x > z) ? x : z;
      5:  return (x < 0) ? -x : x;
      6:  return (x < 0) ? -32768 : 32768;
      7:  return x;
      8:  return (im >= 32768) ? im - 65536 : im;
      9:  return c;
      10: return x >>> (z & 31);
      11: return 32'(x << (z & 31));
      12: return x & z;
      13: return x | z;
      14: return x ^ z;
      15: return (x < z) ? 1 : 0;
      default: return 0;
    endcase
  endfunction

  initial begin
    word_t corner [6] = '{32'sd0, 32'sd1, -32'sd1, 32'sh7fffffff, 32'sh80000000, 32'sd12345};
    for (int n = 0; n < 4000; n++) begin
      op  = add_op_e'(n % 16);
      a   = (n % 7 == 0) ? corner[n % 6] : word_t'($urandom);
      b   = (n % 5 == 0) ? corner[(n / 5) % 6] : word_t'($urandom);
      imm = IMM_W'($urandom);
      cid = 8'($urandom % 8);
      #1;
      checks++;
      if (word_t'(ref_y(int'(op), longint'(a), longint'(b), int'(imm), int'(cid))) !== y
          || we !== (op != A_NOP)) begin
        failures++;
        if (failures < 10) $display("FAIL op=%s a=%0d b=%0d imm=%0d y=%0d", op.name(), a, b, imm, y);
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
