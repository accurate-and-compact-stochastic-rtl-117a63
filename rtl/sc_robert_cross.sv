// sc_robert_cross: SC Robert-Cross edge detector.
//
// z = 1/2 (|x(i,j) - x(i+1,j+1)| + |x(i+1,j) - x(i,j+1)|). For fully correlated
// SNs an XOR gate gives exactly the absolute difference, so each diagonal is one
// XOR, and a MUX with a selector of probability 1/2 adds the two halves. The MUX
// inputs may have any correlation; its selector must be uncorrelated with them and
// is made by an SNG on the shared random value rotated by ROT bits. The default 7
// is a rotation no other selector of the pipeline uses (the Gaussian filters use
// 3, 4, 5 and 6, the pixels 0); the amount is this design's choice. The XORs need fully correlated pairs: feed them through
// correlators when the previous stage changed the correlation.
//
// Interface: combinational; rnd is the shared random value.
module sc_robert_cross #(
  parameter int unsigned  N   = sc_pkg::SC_N,
  parameter int unsigned  ROT = 7,
  parameter logic [N-1:0] SEL = 8'd128         // 1/2
) (
  input  logic [N-1:0] rnd,
  input  logic         x00,   // x(i,j)
  input  logic         x11,   // x(i+1,j+1)
  input  logic         x10,   // x(i+1,j)
  input  logic         x01,   // x(i,j+1)
  output logic         z
);
  logic s, a, b;

  sc_sng #(.N(N), .ROT(ROT)) u_sel (.rnd(rnd), .x(SEL), .sn(s));

  assign a = x00 ^ x11;
  assign b = x10 ^ x01;
  assign z = s ? a : b;
endmodule
