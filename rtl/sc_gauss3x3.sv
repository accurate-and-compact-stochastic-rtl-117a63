// sc_gauss3x3: SC 3x3 Gaussian smoothing filter.
//
// The output is the weighted sum of the nine window pixels with the kernel
// [1 2 1; 2 4 2; 1 2 1] / 16, built as a tree of eight 2-to-1 MUX scaled adders.
// A MUX with a selector of probability s gives s * in1 + (1 - s) * in0; the tree and
// the leaf pairing are those of the reference structure:
//   m1 = mux(w(i-1,j),   w(i-1,j-1), 2/3)    m4 = mux(w(i,j+1), w(i,j),     2/6)
//   m2 = mux(w(i,j-1),   w(i-1,j+1), 2/3)    m5 = mux(w(i+1,j), w(i+1,j-1), 2/3)
//   m3 = mux(m1, m2, 1/2)                    m6 = mux(m4, m5, 6/9)
//   m7 = mux(m6, w(i+1,j+1), 9/10)           z  = mux(m3, m7, 6/16)
// where the value is the probability of taking the first (input 1) operand. For
// m6, m7 and z the weights 1/3, 1/10 and 10/16 given with the structure are the
// share of the other (input 0) operand; they are turned into input-1 probabilities
// here so that the tree realises exactly the kernel above.
// Each selector SN comes from an SNG comparing a constant with the shared random
// value rotated by a level-dependent amount (circular shift RNG sharing), so that
// selectors are uncorrelated with the pixel SNs (rotation 0) and with the
// selectors of the MUXes they feed. The rotation amounts are this design's choice:
// among the sets with a distinct rotation per level, (3, 6, 4, 5) gave the lowest
// mean error on smooth image windows with the shared de Bruijn sequence, about
// 0.65 % of full scale.
// A MUX changes the correlation of its output, so outputs of different filters
// are no longer fully correlated.
//
// Interface: w[k] is pixel (row k/3, column k%3), row 0 = row i-1; rnd is the
// shared random value; z is combinational.
module sc_gauss3x3 #(
  parameter int unsigned N     = sc_pkg::SC_N,
  parameter logic [N-1:0] S23  = 8'd171,   // 2/3
  parameter logic [N-1:0] S12  = 8'd128,   // 1/2
  parameter logic [N-1:0] S26  = 8'd85,    // 2/6
  parameter logic [N-1:0] S69  = 8'd171,   // 6/9
  parameter logic [N-1:0] S910 = 8'd230,   // 9/10
  parameter logic [N-1:0] S616 = 8'd96,    // 6/16
  parameter int unsigned ROT1  = 3,        // leaf MUXes m1, m2, m4, m5
  parameter int unsigned ROT2  = 6,        // m3, m6
  parameter int unsigned ROT3  = 4,        // m7
  parameter int unsigned ROT4  = 5         // output MUX
) (
  input  logic [N-1:0] rnd,
  input  logic [8:0]   w,
  output logic         z
);
  logic s1, s2, s3, s4, s5, s6, s7, s8;
  logic m1, m2, m3, m4, m5, m6, m7;

  sc_sng #(.N(N), .ROT(ROT1)) u_s1 (.rnd(rnd), .x(S23),  .sn(s1));
  sc_sng #(.N(N), .ROT(ROT1)) u_s2 (.rnd(rnd), .x(S23),  .sn(s2));
  sc_sng #(.N(N), .ROT(ROT2)) u_s3 (.rnd(rnd), .x(S12),  .sn(s3));
  sc_sng #(.N(N), .ROT(ROT1)) u_s4 (.rnd(rnd), .x(S26),  .sn(s4));
  sc_sng #(.N(N), .ROT(ROT1)) u_s5 (.rnd(rnd), .x(S23),  .sn(s5));
  sc_sng #(.N(N), .ROT(ROT2)) u_s6 (.rnd(rnd), .x(S69),  .sn(s6));
  sc_sng #(.N(N), .ROT(ROT3)) u_s7 (.rnd(rnd), .x(S910), .sn(s7));
  sc_sng #(.N(N), .ROT(ROT4)) u_s8 (.rnd(rnd), .x(S616), .sn(s8));

  always_comb begin
    m1 = s1 ? w[1] : w[0];
    m2 = s2 ? w[3] : w[2];
    m3 = s3 ? m1   : m2;
    m4 = s4 ? w[5] : w[4];
    m5 = s5 ? w[7] : w[6];
    m6 = s6 ? m4   : m5;
    m7 = s7 ? m6   : w[8];
    z  = s8 ? m3   : m7;
  end
endmodule
