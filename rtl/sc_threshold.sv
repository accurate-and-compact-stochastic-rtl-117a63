// sc_threshold: SC comparator used as the threshold stage.
//
// For two fully correlated SNs X and Y, the larger one has a 1 wherever the
// smaller one does, plus some extra ones. So X > Y exactly when some bit has
// X_i = 1 and Y_i = 0. The comparator output stays 0 until the first such bit and
// is 1 from that bit to the end of the stream; if X <= Y it stays 0 throughout.
// Y is the threshold SN and must be fully correlated with X, which is what the CSNG
// provides. A later binary counter turns the stream into a one-bit pixel.
//
// Interface: first marks the first bit of the stream and clears the sticky flag;
// gt is combinational, in the same cycle as x and y. Whether the triggering bit
// itself is already 1 is not fixed by the document; here it is.
module sc_threshold (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  logic first,
  input  logic x,      // value SN
  input  logic y,      // threshold SN, correlated with x
  output logic gt      // 1 from the first bit where x=1 and y=0
);
  logic seen_q;
  logic seen;

  assign seen = (seen_q & ~first) | (x & ~y);
  assign gt   = seen;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  seen_q <= 1'b0;
    else if (en) seen_q <= seen;
  end
endmodule
