// csng_const: constant correlated stochastic number generator (CSNG).
//
// Generates an SN X holding exactly P ones in a stream of L = 2**N bits, placed so
// that X is fully correlated with a given SN Y. A local down counter LCTR holds the
// number of ones still to be produced; it is loaded with P at the first bit of each
// stream. At every bit:
//   - LCTR = 0: X = 0.
//   - LCTR equals the bits left in the stream (gctr, from the global counter): the
//     rest of X must be all ones, so X = 1 and LCTR decrements.
//   - otherwise X = Y, and LCTR decrements when Y = 1.
// So X follows the ones of Y while it may, and fills the tail with ones when Y has
// fewer ones than X needs. gctr counts the bits left modulo L (0 on the first
// bit), so the equality is an N-bit compare; at the first bit only LCTR = 0 could
// match, and that case already forces 0.
//
// Interface: gctr and first must be aligned with y. x is combinational.
module csng_const #(
  parameter int unsigned  N = sc_pkg::SC_N,
  parameter logic [N-1:0] P = 8'd26            // ones per stream (0.1 * 256)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic         first,
  input  logic [N-1:0] gctr,
  input  logic         y,
  output logic         x,
  output logic         forced     // 1 when the tail-filling branch produced the bit
);
  logic [N-1:0] lctr_q, lctr;
  logic         lzero, dec;

  assign lctr   = first ? P : lctr_q;
  assign lzero  = (lctr == '0);
  assign dec    = (lctr == gctr) | y;
  assign x      = lzero ? 1'b0 : dec;
  assign forced = ~lzero & (lctr == gctr) & ~y;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  lctr_q <= P;
    else if (en) lctr_q <= lctr - N'(x);
  end
endmodule
