// tb_sc_counter: streams with a known number of ones (random positions, and the
// all-ones stream that must saturate) go into the SC-to-binary counter; value must
// equal the count and done must come one clock after the last bit.
module tb_sc_counter;
  localparam int unsigned N = 8;
  localparam int unsigned L = 1 << N;
  logic clk = 1'b0, rst_n = 1'b0;
  logic first = 1'b0, last = 1'b0, sn = 1'b0;
  logic [N-1:0] value;
  logic done;
  int checks = 0, failures = 0;

  sc_counter dut (.clk(clk), .rst_n(rst_n), .en(1'b1), .first(first), .last(last),
                           .sn(sn), .value(value), .done(done));

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int s = 0; s < 40; s++) begin
      int ones, expv;
      ones = 0;
      for (int i = 0; i < L; i++) begin
        first = (i == 0);
        last  = (i == L-1);
        case (s)
          0:       sn = 1'b0;
          1:       sn = 1'b1;
          default: sn = ($urandom_range(0, 99) < (s * 2));
        endcase
        ones += int'(sn);
        @(posedge clk); #1;
        checks++;
        if (done !== (i == L-1)) begin failures++; $display("FAIL done at i=%0d", i); end
      end
      expv = (ones > L-1) ? L-1 : ones;
      checks++;
      if (value != expv) begin failures++; $display("FAIL s=%0d value=%0d exp=%0d", s, value, expv); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
