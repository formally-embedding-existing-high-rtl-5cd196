// myg_top: two register-transfer implementations of myg side by side.
//
// myg(a, b, c) = (x, y) with p = a*b, q = c+1, r = p*q, s = b+c, t = p-s,
// x = r+t, y = r*t, computed in four c-steps on one multiplier, one
// add/sub/increment unit and four registers. Both circuits share the same
// datapath and control table and differ only in how they talk to their
// environment:
//
//  * Type A, self-starting (a_*): a wrapping c-step counter. The input is
//    read in cycles 4k (c-step 0) and (x, y) is on a_x/a_y in cycles 4k+3,
//    flagged by a_done. It never stops.
//  * Type B, event-driven (b_*): idle until b_start. b_start in a cycle t
//    with b_busy low takes the input of cycle t; b_busy is high in cycles
//    t+1..t+3, (x, y) is on b_x/b_y in cycle t+3 (b_done), and the circuit
//    is ready in cycle t+4.
//
// All values are WIDTH-bit unsigned; + and * wrap, - is truncated at zero.
// Cycle 0 is the first rising clock edge after rst_n is released
// (synchronous, active low).
module myg_top
  import myg_pkg::*;
#(
  parameter int unsigned WIDTH = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  // type A: self-starting evaluation
  input  logic [WIDTH-1:0] a_in_a,
  input  logic [WIDTH-1:0] a_in_b,
  input  logic [WIDTH-1:0] a_in_c,
  output logic [WIDTH-1:0] a_x,
  output logic [WIDTH-1:0] a_y,
  output logic             a_done,
  // type B: event-driven evaluation
  input  logic             b_start,
  input  logic [WIDTH-1:0] b_in_a,
  input  logic [WIDTH-1:0] b_in_b,
  input  logic [WIDTH-1:0] b_in_c,
  output logic [WIDTH-1:0] b_x,
  output logic [WIDTH-1:0] b_y,
  output logic             b_busy,
  output logic             b_done
);

  // ---------------- type A ----------------
  cstep_t     a_cstep;
  logic       a_last;
  ctrl_word_t a_ctrl;

  cstep_counter #(.N_CSTEPS(MYG_N_CSTEPS)) u_a_ctrl (
    .clk(clk), .rst_n(rst_n), .cstep(a_cstep), .last(a_last));

  control_decoder u_a_dec (.cstep(a_cstep), .ctrl(a_ctrl));

  myg_datapath #(.WIDTH(WIDTH), .NUM_REGS(MYG_NUM_REGS)) u_a_dp (
    .clk(clk), .rst_n(rst_n), .en(1'b1), .ctrl(a_ctrl),
    .in_a(a_in_a), .in_b(a_in_b), .in_c(a_in_c),
    .out_x(a_x), .out_y(a_y), .valid(a_done), .regs());

  // ---------------- type B ----------------
  cstep_t     b_cstep;
  logic       b_last, b_active;
  ctrl_word_t b_ctrl;
  logic       b_valid;

  event_controller #(.N_CSTEPS(MYG_N_CSTEPS)) u_b_ctrl (
    .clk(clk), .rst_n(rst_n), .start(b_start), .cstep(b_cstep),
    .busy(b_busy), .active(b_active), .last(b_last));

  control_decoder u_b_dec (.cstep(b_cstep), .ctrl(b_ctrl));

  myg_datapath #(.WIDTH(WIDTH), .NUM_REGS(MYG_NUM_REGS)) u_b_dp (
    .clk(clk), .rst_n(rst_n), .en(b_active), .ctrl(b_ctrl),
    .in_a(b_in_a), .in_b(b_in_b), .in_c(b_in_c),
    .out_x(b_x), .out_y(b_y), .valid(b_valid), .regs());

  always_comb b_done = b_valid && b_last;

  // The control table marks the output step exactly where the controllers do.
  a_out_step: assert property (@(posedge clk) disable iff (!rst_n) a_done == a_last);
  b_out_step: assert property (@(posedge clk) disable iff (!rst_n) b_valid == b_last);

endmodule
