// cstep_counter: controller of the self-starting (type A) implementation.
//
// A counter over the c-steps 0..N_CSTEPS that wraps to 0 after the last
// step, so the circuit reads a new input in every c-step 0 and presents the
// result in every c-step N_CSTEPS: input at cycles (N+1)*k, output at
// cycles (N+1)*(k+1)-1. There are N_CSTEPS+1 states, one per c-step.
// 'last' is high in c-step N_CSTEPS. The synchronous active-low reset
// puts the counter in c-step 0, so the first evaluation starts with the
// first clock cycle after reset (the reset style is this design's choice).
module cstep_counter
  import myg_pkg::*;
#(
  parameter int unsigned N_CSTEPS = myg_pkg::MYG_N_CSTEPS,
  localparam int unsigned W       = $clog2(N_CSTEPS + 1)
) (
  input  logic         clk,
  input  logic         rst_n,
  output logic [W-1:0] cstep,
  output logic         last
);

  always_comb last = (cstep == W'(N_CSTEPS));

  always_ff @(posedge clk) begin
    if (!rst_n)    cstep <= '0;
    else if (last) cstep <= '0;
    else           cstep <= cstep + W'(1);
  end

endmodule
