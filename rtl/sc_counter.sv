// sc_counter: stochastic to binary converter.
//
// Counts the ones of an SN over one stream. first and last (from the global
// counter, aligned with the stream) mark its ends: the count restarts on first and
// on last the total is copied to value with done high for one cycle, one clock after
// the last bit. A stream of L = 2**N bits could hold L ones, one more than N bits
// can show; the count then saturates at 2**N - 1 (this design's choice).
module sc_counter #(
  parameter int unsigned N = sc_pkg::SC_N
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic         first,
  input  logic         last,
  input  logic         sn,
  output logic [N-1:0] value,
  output logic         done
);
  logic [N-1:0] acc;
  logic [N-1:0] base;
  logic [N-1:0] nxt;

  assign base = first ? '0 : acc;
  assign nxt  = (sn && base != '1) ? base + 1'b1 : base;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc   <= '0;
      value <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (en) begin
        acc <= nxt;
        if (last) begin
          value <= nxt;
          done  <= 1'b1;
        end
      end
    end
  end
endmodule
