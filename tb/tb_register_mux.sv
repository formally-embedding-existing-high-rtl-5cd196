// tb_register_mux: self-checking test of the register-input multiplexer.
// Every select code must give hold, an input field or an FU result.
module tb_register_mux;
  import myg_pkg::*;
  int checks = 0, failures = 0;
  logic [15:0] cur, ia, ib, ic, mr, mp, d;
  reg_src_t sel;

  register_mux #(.WIDTH(16)) dut (
    .cur(cur), .in_a(ia), .in_b(ib), .in_c(ic), .mul_res(mr), .mp_res(mp),
    .sel(sel), .d(d));

  initial begin
    #100000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] exp_d;
    repeat (100) begin
      cur = 16'($urandom); ia = 16'($urandom); ib = 16'($urandom); ic = 16'($urandom);
      mr = 16'($urandom); mp = 16'($urandom);
      for (int s = 0; s <= 5; s++) begin
        sel = reg_src_t'(s); #1;
        case (s)
          0: exp_d = cur;
          1: exp_d = ia;
          2: exp_d = ib;
          3: exp_d = ic;
          4: exp_d = mr;
          default: exp_d = mp;
        endcase
        checks++;
        if (d !== exp_d) begin failures++; $display("FAIL sel=%0d", s); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
