// sc_bin_counter: binary output counter of the CSC system.
//
// The threshold stage produces a stream that is not all-zero or all-one, so the
// final conversion is a one-bit "counter": the output pixel is 0 when every bit of
// the stream was 0 and 1 otherwise, an OR over the stream. first and last frame the
// stream as in sc_counter; pixel and done are updated one clock after the last bit.
module sc_bin_counter (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  logic first,
  input  logic last,
  input  logic sn,
  output logic pixel,
  output logic done
);
  logic seen;
  logic nxt;

  assign nxt = sn | (seen & ~first);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      seen  <= 1'b0;
      pixel <= 1'b0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (en) begin
        seen <= nxt;
        if (last) begin
          pixel <= nxt;
          done  <= 1'b1;
        end
      end
    end
  end
endmodule
