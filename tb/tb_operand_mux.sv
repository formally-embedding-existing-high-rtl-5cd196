// tb_operand_mux: self-checking test of the operand multiplexer.
// Every select code must route the named register or input field.
module tb_operand_mux;
  import myg_pkg::*;
  int checks = 0, failures = 0;
  logic [3:0][15:0] regs;
  logic [15:0] ia, ib, ic, y;
  opnd_src_t sel;

  operand_mux #(.WIDTH(16), .NUM_REGS(4)) dut (
    .regs(regs), .in_a(ia), .in_b(ib), .in_c(ic), .sel(sel), .y(y));

  initial begin
    #100000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] exp_y;
    repeat (100) begin
      for (int k = 0; k < 4; k++) regs[k] = 16'($urandom);
      ia = 16'($urandom); ib = 16'($urandom); ic = 16'($urandom);
      for (int s = 0; s <= 6; s++) begin
        sel = opnd_src_t'(s); #1;
        exp_y = (s < 4) ? regs[s] : (s == 4) ? ia : (s == 5) ? ib : ic;
        checks++;
        if (y !== exp_y) begin failures++; $display("FAIL sel=%0d", s); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
