// tb_control_decoder: self-checking test of the control table.
// The control words of c-steps 0..3 are applied to a behavioural model of
// the multiplexers, functional unit and registers written here; for random
// inputs the register contents after each step must be the bound variables
// (a,b,s,c), (p,q,s,-), (r,t,-,-), and the outputs of step 3 must be
// (x, y) = (r+t, r*t) computed directly from the myg equations.
module tb_control_decoder;
  import myg_pkg::*;
  int checks = 0, failures = 0;
  cstep_t cstep;
  ctrl_word_t ctrl;

  control_decoder dut (.cstep(cstep), .ctrl(ctrl));

  typedef logic [31:0] w_t;
  w_t r [4];
  w_t ia, ib, ic;

  function automatic w_t opnd(opnd_src_t s);
    case (s)
      SRC_R1: return r[0];
      SRC_R2: return r[1];
      SRC_R3: return r[2];
      SRC_R4: return r[3];
      SRC_IN_A: return ia;
      SRC_IN_B: return ib;
      SRC_IN_C: return ic;
      default: return 32'hDEAD_BEEF;
    endcase
  endfunction

  function automatic w_t mpf(w_t d, w_t e, mp_op_t o);
    case (o)
      OP_ADD: return d + e;
      OP_SUB: return d >= e ? d - e : 0;
      OP_INC: return d + 1;
      default: return 32'hBAD0_BAD0;
    endcase
  endfunction

  initial begin
    #100000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    w_t mulv, mpv, p, q, rr, s, t, x, y;
    w_t nr [4];
    repeat (200) begin
      ia = $urandom_range(0, 2000); ib = $urandom_range(0, 2000); ic = $urandom_range(0, 2000);
      if ($urandom_range(0, 1)) begin ia = $urandom; ib = $urandom; ic = $urandom; end
      for (int k = 0; k < 4; k++) r[k] = $urandom;  // stale register contents
      p = ia * ib; q = ic + 1; rr = p * q; s = ib + ic;
      t = (p >= s) ? p - s : 0; x = rr + t; y = rr * t;
      for (int st = 0; st <= 3; st++) begin
        cstep = cstep_t'(st); #1;
        mulv = opnd(ctrl.mul_a) * opnd(ctrl.mul_b);
        mpv  = mpf(opnd(ctrl.mp_d), opnd(ctrl.mp_e), ctrl.mp_op);
        checks++;
        if (ctrl.out_valid !== (st == 3)) begin failures++; $display("FAIL out_valid step %0d", st); end
        if (st == 3) begin
          checks += 2;
          if (mpv !== x)  begin failures++; $display("FAIL x"); end
          if (mulv !== y) begin failures++; $display("FAIL y"); end
        end
        for (int k = 0; k < 4; k++)
          case (ctrl.reg_src[k])
            RSRC_HOLD: nr[k] = r[k];
            RSRC_IN_A: nr[k] = ia;
            RSRC_IN_B: nr[k] = ib;
            RSRC_IN_C: nr[k] = ic;
            RSRC_MUL:  nr[k] = mulv;
            RSRC_MP:   nr[k] = mpv;
            default:   nr[k] = 32'hFFFF_0000;
          endcase
        r = nr;
        case (st)
          0: begin checks += 4;
               if (r[0] !== ia) failures++;
               if (r[1] !== ib) failures++;
               if (r[2] !== s)  failures++;
               if (r[3] !== ic) failures++;
             end
          1: begin checks += 3;
               if (r[0] !== p) failures++;
               if (r[1] !== q) failures++;
               if (r[2] !== s) failures++;
             end
          2: begin checks += 2;
               if (r[0] !== rr) failures++;
               if (r[1] !== t)  failures++;
             end
          default: ;
        endcase
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
