// operand_mux: one of the multiplexers in front of the functional unit.
//
// Routes one operand to the functional unit: one of the registers r1..r4
// (regs[0..3]) or one of the fields a, b, c of the circuit input, chosen by
// the control word of the current c-step. Combinational. An unused select
// code gives r1. The source set is the one the myg binding needs.
module operand_mux
  import myg_pkg::*;
#(
  parameter int unsigned WIDTH    = 32,
  parameter int unsigned NUM_REGS = myg_pkg::MYG_NUM_REGS
) (
  input  logic [NUM_REGS-1:0][WIDTH-1:0] regs,
  input  logic [WIDTH-1:0]               in_a,
  input  logic [WIDTH-1:0]               in_b,
  input  logic [WIDTH-1:0]               in_c,
  input  opnd_src_t                      sel,
  output logic [WIDTH-1:0]               y
);

  always_comb begin
    y = regs[0];
    case (sel)
      SRC_R1:   y = regs[0];
      SRC_R2:   y = regs[1 % NUM_REGS];
      SRC_R3:   y = regs[2 % NUM_REGS];
      SRC_R4:   y = regs[3 % NUM_REGS];
      SRC_IN_A: y = in_a;
      SRC_IN_B: y = in_b;
      SRC_IN_C: y = in_c;
      default:  y = regs[0];
    endcase
  end

endmodule
