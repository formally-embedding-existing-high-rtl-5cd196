// tb_multipurpose: self-checking test of the multi-purpose unit.
// Checks add, truncated subtract (both signs of d-e) and increment,
// including wrap-around, against an independent reference.
module tb_multipurpose;
  import myg_pkg::*;
  int checks = 0, failures = 0;
  logic [31:0] d, e, res;
  mp_op_t op;

  multipurpose #(.WIDTH(32)) dut (.d(d), .e(e), .op(op), .res(res));

  function automatic logic [31:0] ref_mp(logic [31:0] x, logic [31:0] y, mp_op_t o);
    longint signed diff;
    case (o)
      OP_ADD: return 32'(longint'(x) + longint'(y));
      OP_SUB: begin
        diff = longint'(x) - longint'(y);
        return diff < 0 ? 32'd0 : 32'(diff);
      end
      default: return 32'(longint'(x) + 1);
    endcase
  endfunction

  task automatic check(input logic [31:0] x, input logic [31:0] y, input mp_op_t o);
    d = x; e = y; op = o; #1;
    checks++;
    if (res !== ref_mp(x, y, o)) begin
      failures++;
      $display("FAIL op=%s d=%0d e=%0d res=%0d exp=%0d", o.name(), x, y, res, ref_mp(x, y, o));
    end
  endtask

  initial begin
    #100000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(5, 3, OP_ADD); check(32'hFFFF_FFFF, 1, OP_ADD);
    check(9, 4, OP_SUB); check(4, 9, OP_SUB); check(7, 7, OP_SUB);
    check(5, 99, OP_INC); check(32'hFFFF_FFFF, 0, OP_INC);
    // explicit expected values, independent of the reference function
    d = 10; e = 3; op = OP_SUB; #1; checks++; if (res !== 32'd7)  failures++;
    d = 3; e = 10; op = OP_SUB; #1; checks++; if (res !== 32'd0)  failures++;
    d = 10; e = 3; op = OP_INC; #1; checks++; if (res !== 32'd11) failures++;
    d = 10; e = 3; op = OP_ADD; #1; checks++; if (res !== 32'd13) failures++;
    repeat (300) begin
      check($urandom, $urandom, mp_op_t'($urandom_range(0, 2)));
      check($urandom_range(0, 1000), $urandom_range(0, 1000), OP_SUB);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
