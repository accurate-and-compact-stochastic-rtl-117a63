// sc_sng: stochastic number generator (binary to stochastic converter).
//
// The SNG is a comparator: the output bit is 1 when the random value is below the
// binary input x, so over a stream in which the random value visits every value
// once, the stream holds exactly x ones. All SNGs share one random source. An SNG
// that must be uncorrelated with the others (a MUX selector) uses the circular
// shift sharing scheme: it compares against the shared value rotated left by ROT
// bit positions, a new random sequence that costs only wiring. ROT = 0 gives the
// plain SNG whose streams are fully correlated with each other.
//
// Interface: purely combinational; sn is valid in the same cycle as rnd and x.
module sc_sng #(
  parameter int unsigned N   = sc_pkg::SC_N,
  parameter int unsigned ROT = 0
) (
  input  logic [N-1:0] rnd,   // shared random value
  input  logic [N-1:0] x,     // binary value to encode
  output logic         sn     // stochastic bit
);
  logic [N-1:0] r;

  // r = rnd rotated left by ROT: bit k of r is bit (k - ROT) mod N of rnd.
  always_comb begin
    for (int unsigned k = 0; k < N; k++) r[k] = rnd[(k + N - (ROT % N)) % N];
  end

  assign sn = (r < x);
endmodule
