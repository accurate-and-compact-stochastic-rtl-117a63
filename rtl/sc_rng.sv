// sc_rng: the single shared random number source of the CSC system.
//
// Every SNG of the system compares its binary input with this value (or with a
// circular rotation of it), so all generated SNs are correlated with each other.
// The source is an N-bit Fibonacci LFSR extended to a de Bruijn counter: the extra
// term in the feedback inserts the all-zero state, so the sequence has period
// exactly 2**N and visits every value 0 .. 2**N-1 once per stream. That removes
// the quantisation and fluctuation error, which is what a "uniform RNG" is used for.
// The choice of LFSR and its taps (x^8+x^6+x^5+x^4+1 for N=8) is this design's own.
//
// Interface: en advances the sequence by one step per clock; rnd is the current
// value. Reset loads SEED. The sequence restarts at SEED every 2**N steps, so a
// stream that starts when rnd == SEED always sees the same ordering.
module sc_rng #(
  parameter int unsigned N    = sc_pkg::SC_N,
  parameter logic [N-1:0] TAPS = 8'hB8,           // feedback taps, bit k = stage k+1
  parameter logic [N-1:0] SEED = '0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  output logic [N-1:0] rnd
);
  logic fb;

  // Feedback of the maximal LFSR, corrected so that 0...01 -> 0 -> 1...0 closes
  // the missing all-zero state into the cycle.
  always_comb begin
    fb = ^(rnd & TAPS);
    if (rnd[N-2:0] == '0) fb = ~fb;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  rnd <= SEED;
    else if (en) rnd <= {rnd[N-2:0], fb};
  end
endmodule
