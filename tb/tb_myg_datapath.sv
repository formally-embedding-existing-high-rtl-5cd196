// tb_myg_datapath: self-checking test of the myg datapath.
// The testbench plays the controller: it applies the control words of
// c-steps 0..3 (written out here from the myg schedule and register
// binding) one per clock, and checks the registers after each step and
// (x, y) = myg(a, b, c) in step 3. With en low the registers must hold.
module tb_myg_datapath;
  import myg_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 0, valid;
  ctrl_word_t ctrl;
  logic [31:0] ia, ib, ic, ox, oy;
  logic [3:0][31:0] regs, snap;

  always #5 clk = ~clk;

  myg_datapath #(.WIDTH(32), .NUM_REGS(4)) dut (
    .clk(clk), .rst_n(rst_n), .en(en), .ctrl(ctrl),
    .in_a(ia), .in_b(ib), .in_c(ic), .out_x(ox), .out_y(oy),
    .valid(valid), .regs(regs));

  function automatic ctrl_word_t step_word(int st);
    ctrl_word_t w;
    w.mul_a = SRC_R1; w.mul_b = SRC_R2; w.out_valid = 1'b0;
    w.reg_src = {4{RSRC_HOLD}};
    case (st)
      0: begin w.mp_d = SRC_IN_B; w.mp_e = SRC_IN_C; w.mp_op = OP_ADD;
               w.reg_src[0] = RSRC_IN_A; w.reg_src[1] = RSRC_IN_B;
               w.reg_src[2] = RSRC_MP;   w.reg_src[3] = RSRC_IN_C; end
      1: begin w.mp_d = SRC_R4; w.mp_e = SRC_R1; w.mp_op = OP_INC;
               w.reg_src[0] = RSRC_MUL; w.reg_src[1] = RSRC_MP; end
      2: begin w.mp_d = SRC_R1; w.mp_e = SRC_R3; w.mp_op = OP_SUB;
               w.reg_src[0] = RSRC_MUL; w.reg_src[1] = RSRC_MP; end
      default: begin w.mp_d = SRC_R1; w.mp_e = SRC_R2; w.mp_op = OP_ADD;
               w.out_valid = 1'b1; end
    endcase
    return w;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] a, b, c, p, q, r, s, t;
    ctrl = step_word(3); ia = 0; ib = 0; ic = 0;
    @(posedge clk); #1 rst_n = 1;
    repeat (300) begin
      if ($urandom_range(0, 1)) begin
        a = $urandom_range(0, 3000); b = $urandom_range(0, 3000); c = $urandom_range(0, 3000);
      end else begin a = $urandom; b = $urandom; c = $urandom; end
      p = a * b; q = c + 1; r = p * q; s = b + c; t = (p >= s) ? p - s : 0;
      for (int st = 0; st <= 3; st++) begin
        ctrl = step_word(st); en = 1'b1;
        // the input only needs to be present in c-step 0
        if (st == 0) begin ia = a; ib = b; ic = c; end
        else begin ia = $urandom; ib = $urandom; ic = $urandom; end
        #1;
        checks++;
        if (valid !== (st == 3)) begin failures++; $display("FAIL valid step %0d", st); end
        if (st == 3) begin
          checks += 2;
          if (ox !== r + t) begin failures++; $display("FAIL x=%0d exp %0d", ox, r + t); end
          if (oy !== r * t) begin failures++; $display("FAIL y=%0d exp %0d", oy, r * t); end
        end
        @(posedge clk); #1;
        case (st)
          0: begin checks += 4;
               if (regs[0] !== a || regs[1] !== b || regs[2] !== s || regs[3] !== c) begin
                 failures++; $display("FAIL regs after step 0"); end
             end
          1: begin checks += 3;
               if (regs[0] !== p || regs[1] !== q || regs[2] !== s) begin
                 failures++; $display("FAIL regs after step 1"); end
             end
          2: begin checks += 2;
               if (regs[0] !== r || regs[1] !== t) begin
                 failures++; $display("FAIL regs after step 2"); end
             end
          default: ;
        endcase
        // occasionally pause with en low: nothing may change
        if ($urandom_range(0, 7) == 0) begin
          en = 1'b0; snap = regs; ia = $urandom;
          @(posedge clk); #1;
          checks++;
          if (regs !== snap) begin failures++; $display("FAIL hold with en low"); end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
