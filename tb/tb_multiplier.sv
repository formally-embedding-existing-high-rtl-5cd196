// tb_multiplier: self-checking test of the multiplier.
// Drives corner cases and random operands at two widths and compares the
// product with a 64-bit reference reduced modulo 2**WIDTH.
module tb_multiplier;
  int checks = 0, failures = 0;
  logic [31:0] a, b, p;
  logic [7:0]  a8, b8, p8;

  multiplier #(.WIDTH(32)) dut   (.a(a),  .b(b),  .p(p));
  multiplier #(.WIDTH(8))  dut8  (.a(a8), .b(b8), .p(p8));

  task automatic check32(input logic [31:0] x, input logic [31:0] y);
    longint unsigned ref_p;
    a = x; b = y; #1;
    ref_p = longint'(x) * longint'(y);
    checks++;
    if (p !== ref_p[31:0]) begin
      failures++;
      $display("FAIL %0d * %0d = %0d, expected %0d", x, y, p, ref_p[31:0]);
    end
  endtask

  initial begin
    #100000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check32(0, 0); check32(1, 7); check32(6, 7); check32(32'hFFFF_FFFF, 2);
    check32(32'h0001_0000, 32'h0001_0000); check32(12345, 6789);
    repeat (200) check32($urandom, $urandom);
    repeat (100) begin
      a8 = 8'($urandom); b8 = 8'($urandom); #1;
      checks++;
      if (p8 !== 8'(int'(a8) * int'(b8))) begin
        failures++; $display("FAIL w8 %0d * %0d = %0d", a8, b8, p8);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
