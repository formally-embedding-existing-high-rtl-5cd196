// tb_myg_top: end-to-end test of both myg circuits at default parameters.
//
// Self-starting circuit (a_*): new random inputs are driven every cycle;
// the output of cycle 4k+3 must be myg of the input of cycle 4k, and a_done
// must be high exactly in those cycles.
// Event-driven circuit (b_*): random start pulses and random inputs every
// cycle. A reference of the busy/start rules predicts busy, and for every
// accepted start at cycle t checks busy in t+1..t+3, (x, y) = myg(i(t)) with
// b_done in t+3, and not busy in t+4.
// Counted mechanisms (each must occur): back-to-back restarts of circuit A,
// accepted starts, idle cycles, starts ignored while busy, a start in the
// very cycle the circuit becomes free, truncated subtraction (p < s) and
// wrap-around of the 32-bit product.
module tb_myg_top;
  localparam int N = 3;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [31:0] a_in_a, a_in_b, a_in_c, a_x, a_y;
  logic        a_done;
  logic        b_start, b_busy, b_done;
  logic [31:0] b_in_a, b_in_b, b_in_c, b_x, b_y;

  always #5 clk = ~clk;

  myg_top dut (
    .clk(clk), .rst_n(rst_n),
    .a_in_a(a_in_a), .a_in_b(a_in_b), .a_in_c(a_in_c),
    .a_x(a_x), .a_y(a_y), .a_done(a_done),
    .b_start(b_start), .b_in_a(b_in_a), .b_in_b(b_in_b), .b_in_c(b_in_c),
    .b_x(b_x), .b_y(b_y), .b_busy(b_busy), .b_done(b_done));

  // Reference myg on 32-bit words: + and * wrap, - truncates at zero.
  function automatic logic [63:0] myg(logic [31:0] a, logic [31:0] b, logic [31:0] c);
    logic [31:0] p, q, r, s, t;
    p = a * b; q = c + 1; r = p * q; s = b + c;
    t = (p >= s) ? p - s : 32'd0;
    return {r + t, r * t};
  endfunction

  function automatic logic [31:0] rnd();
    // mix of small and full-range values so both truncation and wrap occur
    case ($urandom_range(0, 2))
      0: return $urandom_range(0, 20);
      1: return $urandom_range(0, 100000);
      default: return $urandom;
    endcase
  endfunction

  int n_a_evals = 0, n_b_starts = 0, n_b_idle = 0, n_b_ignored = 0, n_b_b2b = 0;
  int n_trunc = 0, n_wrap = 0;

  task automatic note_mechanisms(logic [31:0] a, logic [31:0] b, logic [31:0] c);
    logic [31:0] p, s;
    logic [63:0] rfull;
    p = a * b; s = b + c;
    if (p < s) n_trunc++;
    rfull = 64'(p) * 64'(c + 32'd1);
    if (rfull[63:32] != 0) n_wrap++;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] a_exp, b_exp;
    int b_cnt, b_last_done;
    a_in_a = 0; a_in_b = 0; a_in_c = 0;
    b_in_a = 0; b_in_b = 0; b_in_c = 0; b_start = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    b_cnt = 0; b_last_done = -10;
    // cycle 0 is the clock period after reset release
    for (int cyc = 0; cyc < 2000; cyc++) begin
      // ---- drive ----
      a_in_a = rnd(); a_in_b = rnd(); a_in_c = rnd();
      b_in_a = rnd(); b_in_b = rnd(); b_in_c = rnd();
      b_start = ($urandom_range(0, 2) == 0) || (cyc == b_last_done + 1 && cyc % 3 == 0);
      #2;
      // ---- circuit A ----
      if (cyc % (N + 1) == 0) begin
        a_exp = myg(a_in_a, a_in_b, a_in_c);
        note_mechanisms(a_in_a, a_in_b, a_in_c);
      end
      checks++;
      if (a_done !== (cyc % (N + 1) == N)) begin failures++; $display("FAIL A done at %0d", cyc); end
      if (cyc % (N + 1) == N) begin
        n_a_evals++;
        checks += 2;
        if (a_x !== a_exp[63:32]) begin failures++; $display("FAIL A x at %0d: %0d exp %0d", cyc, a_x, a_exp[63:32]); end
        if (a_y !== a_exp[31:0])  begin failures++; $display("FAIL A y at %0d: %0d exp %0d", cyc, a_y, a_exp[31:0]); end
      end
      // ---- circuit B ----
      checks += 2;
      if (b_busy !== (b_cnt != 0))  begin failures++; $display("FAIL B busy at %0d", cyc); end
      if (b_done !== (b_cnt == N))  begin failures++; $display("FAIL B done at %0d", cyc); end
      if (cyc == 0 && b_busy) begin failures++; $display("FAIL B busy at time 0"); end
      if (b_cnt == N) begin
        checks += 2;
        if (b_x !== b_exp[63:32]) begin failures++; $display("FAIL B x at %0d", cyc); end
        if (b_y !== b_exp[31:0])  begin failures++; $display("FAIL B y at %0d", cyc); end
      end
      if (b_cnt == 0) begin
        if (b_start) begin
          b_exp = myg(b_in_a, b_in_b, b_in_c);
          note_mechanisms(b_in_a, b_in_b, b_in_c);
          n_b_starts++;
          if (cyc == b_last_done + 1) n_b_b2b++;
          b_cnt = 1;
        end else n_b_idle++;
      end else begin
        if (b_start) n_b_ignored++;
        if (b_cnt == N) begin b_cnt = 0; b_last_done = cyc; end
        else b_cnt++;
      end
      @(posedge clk); #1;
    end
    $display("A evaluations=%0d  B starts=%0d idle=%0d ignored=%0d back_to_back=%0d  truncated_sub=%0d product_wrap=%0d",
             n_a_evals, n_b_starts, n_b_idle, n_b_ignored, n_b_b2b, n_trunc, n_wrap);
    checks += 7;
    if (n_a_evals < 2)    failures++;
    if (n_b_starts == 0)  failures++;
    if (n_b_idle == 0)    failures++;
    if (n_b_ignored == 0) failures++;
    if (n_b_b2b == 0)     failures++;
    if (n_trunc == 0)     failures++;
    if (n_wrap == 0)      failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
