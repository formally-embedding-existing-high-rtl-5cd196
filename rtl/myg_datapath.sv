// myg_datapath: datapath of the myg circuit.
//
// Operand multiplexers on the left, the functional unit (one multiplier,
// one multi-purpose unit) in the middle, register multiplexers on the right
// and the registers r1..r4 that close the loop. The control word of the
// current c-step sets every multiplexer and the multi-purpose operation.
// On a rising clock edge with 'en' high the registers take the values
// chosen for them; the c-step is then complete.
// The outputs (x, y) are the multi-purpose result and the product, taken
// combinationally from the functional unit: they are the result of myg in
// the c-step whose control word has out_valid set, and meaningless in the
// others. 'valid' is en && out_valid. 'regs' shows the registers.
module myg_datapath
  import myg_pkg::*;
#(
  parameter int unsigned WIDTH    = 32,
  parameter int unsigned NUM_REGS = myg_pkg::MYG_NUM_REGS
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           en,
  input  ctrl_word_t                     ctrl,
  input  logic [WIDTH-1:0]               in_a,
  input  logic [WIDTH-1:0]               in_b,
  input  logic [WIDTH-1:0]               in_c,
  output logic [WIDTH-1:0]               out_x,
  output logic [WIDTH-1:0]               out_y,
  output logic                           valid,
  output logic [NUM_REGS-1:0][WIDTH-1:0] regs
);

  logic [WIDTH-1:0]               mul_a, mul_b, mp_d, mp_e;
  logic [WIDTH-1:0]               mul_res, mp_res;
  logic [NUM_REGS-1:0][WIDTH-1:0] regs_d;

  // Left multiplexers
  operand_mux #(.WIDTH(WIDTH), .NUM_REGS(NUM_REGS)) u_mux_mul_a (
    .regs(regs), .in_a(in_a), .in_b(in_b), .in_c(in_c), .sel(ctrl.mul_a), .y(mul_a));
  operand_mux #(.WIDTH(WIDTH), .NUM_REGS(NUM_REGS)) u_mux_mul_b (
    .regs(regs), .in_a(in_a), .in_b(in_b), .in_c(in_c), .sel(ctrl.mul_b), .y(mul_b));
  operand_mux #(.WIDTH(WIDTH), .NUM_REGS(NUM_REGS)) u_mux_mp_d (
    .regs(regs), .in_a(in_a), .in_b(in_b), .in_c(in_c), .sel(ctrl.mp_d), .y(mp_d));
  operand_mux #(.WIDTH(WIDTH), .NUM_REGS(NUM_REGS)) u_mux_mp_e (
    .regs(regs), .in_a(in_a), .in_b(in_b), .in_c(in_c), .sel(ctrl.mp_e), .y(mp_e));

  functional_unit #(.WIDTH(WIDTH)) u_fu (
    .mul_a(mul_a), .mul_b(mul_b), .mp_d(mp_d), .mp_e(mp_e), .mp_op(ctrl.mp_op),
    .mul_res(mul_res), .mp_res(mp_res));

  // Right multiplexers, one per register
  for (genvar i = 0; i < NUM_REGS; i++) begin : g_rmux
    register_mux #(.WIDTH(WIDTH)) u_rmux (
      .cur(regs[i]), .in_a(in_a), .in_b(in_b), .in_c(in_c),
      .mul_res(mul_res), .mp_res(mp_res), .sel(ctrl.reg_src[i]), .d(regs_d[i]));
  end

  register_bank #(.WIDTH(WIDTH), .NUM_REGS(NUM_REGS)) u_regs (
    .clk(clk), .rst_n(rst_n), .en(en), .d(regs_d), .q(regs));

  always_comb begin
    out_x = mp_res;
    out_y = mul_res;
    valid = en && ctrl.out_valid;
  end

endmodule
