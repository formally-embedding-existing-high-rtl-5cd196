// multiplier: the library multiplier of the functional unit, p = a * b.
//
// Combinational; it completes within one c-step. The operands stand for
// natural numbers; in hardware they are WIDTH-bit unsigned words and the
// product is kept modulo 2**WIDTH (the width is this design's choice).
module multiplier #(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] p
);

  always_comb p = a * b;

endmodule
