// tb_cstep_counter: self-checking test of the self-starting controller.
// After reset the c-step must run 0,1,..,N,0,1,.. with 'last' exactly in
// step N, i.e. a period of N+1 cycles. Tested for N=3 and N=5.
module tb_cstep_counter;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [1:0] cs3; logic last3;
  logic [2:0] cs5; logic last5;
  int cyc;

  always #5 clk = ~clk;

  cstep_counter #(.N_CSTEPS(3)) dut3 (.clk(clk), .rst_n(rst_n), .cstep(cs3), .last(last3));
  cstep_counter #(.N_CSTEPS(5)) dut5 (.clk(clk), .rst_n(rst_n), .cstep(cs5), .last(last5));

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    // cycle 0 is the first clock period after reset release
    for (cyc = 0; cyc < 60; cyc++) begin
      #3;
      checks += 4;
      if (cs3 !== 2'(cyc % 4))     begin failures++; $display("FAIL cyc %0d cs3=%0d", cyc, cs3); end
      if (last3 !== (cyc % 4 == 3)) begin failures++; $display("FAIL cyc %0d last3", cyc); end
      if (cs5 !== 3'(cyc % 6))     begin failures++; $display("FAIL cyc %0d cs5=%0d", cyc, cs5); end
      if (last5 !== (cyc % 6 == 5)) begin failures++; $display("FAIL cyc %0d last5", cyc); end
      @(posedge clk); #1;
    end
    // reset in the middle returns to step 0
    rst_n = 0; @(posedge clk); #1;
    checks++; if (cs3 !== 0 || cs5 !== 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
