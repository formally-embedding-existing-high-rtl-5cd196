// tb_functional_unit: self-checking test of the compound functional unit.
// Both results must be produced at once: product of (mul_a, mul_b) and the
// selected multi-purpose operation on (mp_d, mp_e).
module tb_functional_unit;
  import myg_pkg::*;
  int checks = 0, failures = 0;
  logic [15:0] mul_a, mul_b, mp_d, mp_e, mul_res, mp_res;
  mp_op_t op;

  functional_unit #(.WIDTH(16)) dut (
    .mul_a(mul_a), .mul_b(mul_b), .mp_d(mp_d), .mp_e(mp_e), .mp_op(op),
    .mul_res(mul_res), .mp_res(mp_res));

  initial begin
    #100000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned exp_mul, exp_mp;
    repeat (400) begin
      mul_a = 16'($urandom); mul_b = 16'($urandom);
      mp_d = 16'($urandom_range(0, 65535)); mp_e = 16'($urandom_range(0, 65535));
      op = mp_op_t'($urandom_range(0, 2));
      #1;
      exp_mul = (int'(mul_a) * int'(mul_b)) & 32'hFFFF;
      case (op)
        OP_ADD:  exp_mp = (int'(mp_d) + int'(mp_e)) & 32'hFFFF;
        OP_SUB:  exp_mp = (mp_d >= mp_e) ? int'(mp_d) - int'(mp_e) : 0;
        default: exp_mp = (int'(mp_d) + 1) & 32'hFFFF;
      endcase
      checks += 2;
      if (mul_res !== 16'(exp_mul)) begin failures++; $display("FAIL mul"); end
      if (mp_res  !== 16'(exp_mp))  begin failures++; $display("FAIL mp op=%s", op.name()); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
