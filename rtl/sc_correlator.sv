// sc_correlator: restores full correlation (SCC = 1) between two SNs.
//
// Two SNs that came out of processing of correlated inputs are still highly
// correlated but not completely. The correlator works in two parts.
//  1. Min finder (SC comparator): up to the first bit where x and y differ, the
//     two streams are equal and already correlated. At that first differing bit
//     the SN that is 0 is taken as the smaller one; the decision is held until the
//     end of the stream.
//  2. Relocate circuit: where the min SN has a 1 that the max SN lacks, the 1 is
//     removed and an up/down counter CTR is incremented; where the max SN has a 1,
//     the min SN a 0 and CTR > 0, a 1 is inserted and CTR is decremented. So the
//     ones of the min SN are moved under ones of the max SN and the min SN becomes
//     a subset of the max SN. The max SN passes unchanged.
// The counter is CTR_W bits wide; the default 6 follows BW = log2(1-SCC) +
// log2(L) - 2 with SCC = 0 and L = 256. When the counter is full a 1 that would
// have to be removed is kept instead, so the value is preserved and only the
// correlation of that bit is lost (this design's choice; the document does not say
// what happens on overflow). Ones still held in CTR at the end of a stream are
// lost, and the counter restarts at 0 with each stream.
//
// Interface: first marks the first bit of the input streams. xo and yo are
// registered: they carry the corrected x and y one clock after the inputs, the
// single cycle of latency the correlator adds. moved_out / moved_in pulse with
// each removed / inserted 1, y_min tells which input was taken as the min.
module sc_correlator #(
  parameter int unsigned CTR_W = sc_pkg::SC_CTR_W
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  logic first,
  input  logic x,
  input  logic y,
  output logic xo,
  output logic yo,
  output logic moved_out,
  output logic moved_in,
  output logic y_min
);
  logic             found_q, ymin_q;
  logic             found, ymin;
  logic [CTR_W-1:0] ctr_q, ctr_base, ctr_d;
  logic             mn, mx, grt0, full, corr_min;
  logic             inc, dec;

  // Algorithm 1: first differing bit decides which SN is the minimum.
  always_comb begin
    found = found_q & ~first;
    ymin  = ymin_q;
    if (!found && (x ^ y)) begin
      found = 1'b1;
      ymin  = x & ~y;
    end
  end

  // Algorithm 2: relocate the ones of the min SN.
  always_comb begin
    mn       = ymin ? y : x;
    mx       = ymin ? x : y;
    ctr_base = first ? '0 : ctr_q;
    grt0     = (ctr_base != '0);
    full     = (ctr_base == '1);
    inc      = mn & ~mx & ~full;
    dec      = mx & ~mn & grt0;
    corr_min = (mn & mx) | dec | (mn & ~mx & full);
    ctr_d    = ctr_base;
    if (inc) ctr_d = ctr_base + 1'b1;
    if (dec) ctr_d = ctr_base - 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      found_q <= 1'b0;
      ymin_q  <= 1'b0;
      ctr_q   <= '0;
      xo      <= 1'b0;
      yo      <= 1'b0;
    end else if (en) begin
      found_q <= found;
      ymin_q  <= ymin;
      ctr_q   <= ctr_d;
      xo      <= ymin ? mx : corr_min;
      yo      <= ymin ? corr_min : mx;
    end
  end

  assign moved_out = en & inc;
  assign moved_in  = en & dec;
  assign y_min     = ymin;
endmodule
