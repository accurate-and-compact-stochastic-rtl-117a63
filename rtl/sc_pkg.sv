// sc_pkg: constants shared by the correlated stochastic computing (CSC) design.
//
// A stochastic number (SN) is a bit-stream whose value is the fraction of ones in
// it. The design uses unipolar encoding: a binary value v of SC_N bits becomes a
// stream of SC_L = 2**SC_N bits that holds exactly v ones when the random source
// visits every value once per stream. SC_N = 8 and SC_L = 256 are the precision and
// stream length used for the image pipeline; the correlator counter width of 6 bits
// is log2(1-SCC) + log2(L) - 2 for the worst case SCC = 0.
package sc_pkg;
  localparam int unsigned SC_N     = 8;            // binary precision
  localparam int unsigned SC_L     = 1 << SC_N;    // bit-stream length
  localparam int unsigned SC_CTR_W = SC_N - 2;     // correlator counter width, worst case

endpackage
