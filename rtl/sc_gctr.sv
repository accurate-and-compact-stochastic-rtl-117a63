// sc_gctr: global bit-stream counter.
//
// A free-running N-bit down counter that frames the bit-streams: position i of a
// stream (i = 1 .. L, L = 2**N) is marked by gctr = (L - (i-1)) mod L, that is 0 at
// the first bit and then L-1, L-2, ... 1. So gctr equals the number of bits left in
// the stream, counted modulo L, which is what the CSNG compares against. first is 1
// on the first bit of a stream and last on the final one. The counter steps when en
// is 1; reset puts it at the first bit. Encoding and reset value are this design's
// choice; the document only asks for a down counter over the stream length.
module sc_gctr #(
  parameter int unsigned N = sc_pkg::SC_N
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  output logic [N-1:0] gctr,
  output logic         first,
  output logic         last
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  gctr <= '0;
    else if (en) gctr <= gctr - 1'b1;
  end

  assign first = (gctr == '0);
  assign last  = (gctr == N'(1));
endmodule
