// register_mux: one of the multiplexers behind the functional unit.
//
// Chooses the value a register takes at the end of the current c-step: its
// own value (hold), a field a, b, c of the circuit input, the product of
// the multiplier or the result of the multi-purpose unit. Combinational.
// An unused select code holds the register.
module register_mux
  import myg_pkg::*;
#(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] cur,
  input  logic [WIDTH-1:0] in_a,
  input  logic [WIDTH-1:0] in_b,
  input  logic [WIDTH-1:0] in_c,
  input  logic [WIDTH-1:0] mul_res,
  input  logic [WIDTH-1:0] mp_res,
  input  reg_src_t         sel,
  output logic [WIDTH-1:0] d
);

  always_comb begin
    case (sel)
      RSRC_IN_A: d = in_a;
      RSRC_IN_B: d = in_b;
      RSRC_IN_C: d = in_c;
      RSRC_MUL:  d = mul_res;
      RSRC_MP:   d = mp_res;
      default:   d = cur;
    endcase
  end

endmodule
