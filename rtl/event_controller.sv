// event_controller: controller of the event-driven (type B) implementation.
//
// At reset the circuit is not busy and sits in c-step 0, where the datapath
// sees the input. If 'start' is high in a cycle t in which the circuit is
// not busy, that cycle is c-step 0 of an evaluation: the input is taken,
// the circuit is busy in cycles t+1..t+N_CSTEPS (c-steps 1..N_CSTEPS), the
// result is on the outputs in cycle t+N_CSTEPS ('last'), and the circuit is
// not busy again in cycle t+N_CSTEPS+1, when it may start once more.
// Without start it stays idle. 'start' while busy is ignored.
// 'active' tells the datapath that a c-step is being executed (busy, or idle
// with start), so the registers do not change while idle.
// The busy/start behaviour follows the event-driven specification; the
// busy flag plus counter realisation is this design's own.
module event_controller
  import myg_pkg::*;
#(
  parameter int unsigned N_CSTEPS = myg_pkg::MYG_N_CSTEPS,
  localparam int unsigned W       = $clog2(N_CSTEPS + 1)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  output logic [W-1:0] cstep,
  output logic         busy,
  output logic         active,
  output logic         last
);

  always_comb begin
    active = busy || start;
    last   = busy && (cstep == W'(N_CSTEPS));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      cstep <= '0;
    end else if (!busy) begin
      if (start) begin
        busy  <= 1'b1;
        cstep <= W'(1);
      end
    end else if (last) begin
      busy  <= 1'b0;
      cstep <= '0;
    end else begin
      cstep <= cstep + W'(1);
    end
  end

  // While idle the counter rests in c-step 0.
  a_idle_step0: assert property (@(posedge clk) disable iff (!rst_n)
                                 !busy |-> cstep == '0);
  // A started evaluation is busy for exactly N_CSTEPS cycles.
  a_busy_len: assert property (@(posedge clk) disable iff (!rst_n)
                               (!busy && start) |=> busy [*N_CSTEPS] ##1 !busy);

endmodule
