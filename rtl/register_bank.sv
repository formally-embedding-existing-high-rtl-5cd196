// register_bank: the registers r1..r4 that carry values between c-steps.
//
// NUM_REGS registers of WIDTH bits. On a rising clock edge with 'en' high
// every register takes its next value d[i]; with 'en' low all keep their
// value. The synchronous active-low reset clears them (the contents are
// don't-care until the first c-step 0 writes them; reset and enable are
// this design's choices).
module register_bank #(
  parameter int unsigned WIDTH    = 32,
  parameter int unsigned NUM_REGS = 4
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           en,
  input  logic [NUM_REGS-1:0][WIDTH-1:0] d,
  output logic [NUM_REGS-1:0][WIDTH-1:0] q
);

  always_ff @(posedge clk) begin
    if (!rst_n)  q <= '0;
    else if (en) q <= d;
  end

endmodule
