// tb_register_bank: self-checking test of the register bank.
// Reset clears all registers; with en high they take d at the clock edge,
// with en low they keep their value.
module tb_register_bank;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 0;
  logic [3:0][15:0] d, q, model;

  always #5 clk = ~clk;

  register_bank #(.WIDTH(16), .NUM_REGS(4)) dut (
    .clk(clk), .rst_n(rst_n), .en(en), .d(d), .q(q));

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = '1;
    @(posedge clk); #1;
    checks++; if (q !== '0) begin failures++; $display("FAIL reset"); end
    rst_n = 1; model = '0;
    repeat (300) begin
      en = ($urandom_range(0, 2) != 0);
      for (int k = 0; k < 4; k++) d[k] = 16'($urandom);
      @(posedge clk); #1;
      if (en) model = d;
      checks++;
      if (q !== model) begin failures++; $display("FAIL en=%0b", en); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
