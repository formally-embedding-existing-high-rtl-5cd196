// functional_unit: the compound functional unit FU of the myg circuit.
//
// FU(((a, b), (d, e)), c) = (multiplier(a, b), multipurpose((d, e), c)):
// one multiplier and one multi-purpose unit side by side, both used in the
// same c-step. Combinational. The two units are the ones the schedule was
// made for; which operands reach them is set by the operand multiplexers.
module functional_unit
  import myg_pkg::*;
#(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] mul_a,
  input  logic [WIDTH-1:0] mul_b,
  input  logic [WIDTH-1:0] mp_d,
  input  logic [WIDTH-1:0] mp_e,
  input  mp_op_t           mp_op,
  output logic [WIDTH-1:0] mul_res,
  output logic [WIDTH-1:0] mp_res
);

  multiplier #(.WIDTH(WIDTH)) u_mul (
    .a(mul_a), .b(mul_b), .p(mul_res)
  );

  multipurpose #(.WIDTH(WIDTH)) u_mp (
    .d(mp_d), .e(mp_e), .op(mp_op), .res(mp_res)
  );

endmodule
