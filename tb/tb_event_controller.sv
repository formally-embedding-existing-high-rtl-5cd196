// tb_event_controller: self-checking test of the event-driven controller.
// A cycle-level reference of the busy/start rules runs next to the DUT on a
// random start pattern: not busy after reset; idle without start stays idle;
// start while idle gives busy for exactly N cycles, 'last' in the N-th,
// and idle again in the cycle after. Also counts ignored starts while busy.
module tb_event_controller;
  localparam int N = 3;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0;
  logic [1:0] cstep; logic busy, active, last;
  int ref_cnt;   // 0 = idle, 1..N = c-step of a running evaluation
  int n_starts = 0, n_ignored = 0, n_idle = 0, n_b2b = 0;
  int last_done = -10, cyc = 0;

  always #5 clk = ~clk;

  event_controller #(.N_CSTEPS(N)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .cstep(cstep),
    .busy(busy), .active(active), .last(last));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1; ref_cnt = 0;
    for (cyc = 0; cyc < 800; cyc++) begin
      // choose start for this cycle (sometimes forced right after a finish)
      start = ($urandom_range(0, 3) == 0) || (cyc == last_done + 1 && cyc % 3 == 0);
      #2;
      checks += 5;
      if (busy   !== (ref_cnt != 0))           begin failures++; $display("FAIL %0d busy", cyc); end
      if (cstep  !== 2'(ref_cnt))              begin failures++; $display("FAIL %0d cstep", cyc); end
      if (last   !== (ref_cnt == N))           begin failures++; $display("FAIL %0d last", cyc); end
      if (active !== (ref_cnt != 0 || start))  begin failures++; $display("FAIL %0d active", cyc); end
      checks++;
      if (cyc == 0 && busy) begin failures++; $display("FAIL busy at time 0"); end
      // reference step
      if (ref_cnt == 0) begin
        if (start) begin
          ref_cnt = 1; n_starts++;
          if (cyc == last_done + 1) n_b2b++;
        end else n_idle++;
      end else begin
        if (start) n_ignored++;
        if (ref_cnt == N) begin ref_cnt = 0; last_done = cyc; end
        else ref_cnt++;
      end
      @(posedge clk); #1;
    end
    $display("starts=%0d back_to_back=%0d ignored=%0d idle=%0d", n_starts, n_b2b, n_ignored, n_idle);
    checks += 4;
    if (n_starts == 0)  failures++;
    if (n_b2b == 0)     failures++;
    if (n_ignored == 0) failures++;
    if (n_idle == 0)    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
