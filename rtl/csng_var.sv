// csng_var: variable correlated stochastic number generator (CSNG).
//
// Same generator as csng_const, but the number of ones per stream is the run-time
// input value_in, sampled on the first bit of each stream into the local down
// counter LCTR. At every bit: LCTR = 0 gives X = 0; LCTR equal to the bits left in
// the stream (gctr) gives X = 1; otherwise X = Y. LCTR decrements with every 1 of X.
// The result holds exactly value_in ones and is fully correlated with Y.
//
// Interface: value_in, gctr and first must be valid and aligned with y on the first
// bit of a stream; x is combinational.
module csng_var #(
  parameter int unsigned N = sc_pkg::SC_N
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic         first,
  input  logic [N-1:0] gctr,
  input  logic [N-1:0] value_in,
  input  logic         y,
  output logic         x,
  output logic         forced
);
  logic [N-1:0] lctr_q, lctr;
  logic         lzero, dec;

  assign lctr   = first ? value_in : lctr_q;
  assign lzero  = (lctr == '0);
  assign dec    = (lctr == gctr) | y;
  assign x      = lzero ? 1'b0 : dec;
  assign forced = ~lzero & (lctr == gctr) & ~y;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  lctr_q <= '0;
    else if (en) lctr_q <= lctr - N'(x);
  end
endmodule
