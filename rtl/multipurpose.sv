// multipurpose: the multi-purpose unit of the functional unit.
//
// Depending on the control input op it returns d + e (OP_ADD), d - e (OP_SUB)
// or d + 1 (OP_INC); e is ignored by OP_INC. The operands are natural
// numbers, so subtraction is truncated at zero (d - e = 0 when e > d);
// addition and increment wrap modulo 2**WIDTH. Combinational, one c-step.
// The truncated subtraction and the width are this design's choices.
module multipurpose
  import myg_pkg::*;
#(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] d,
  input  logic [WIDTH-1:0] e,
  input  mp_op_t           op,
  output logic [WIDTH-1:0] res
);

  always_comb begin
    unique case (op)
      OP_SUB:  res = (d >= e) ? d - e : '0;
      OP_INC:  res = d + WIDTH'(1);
      default: res = d + e;  // OP_ADD and the unused code
    endcase
  end

endmodule
