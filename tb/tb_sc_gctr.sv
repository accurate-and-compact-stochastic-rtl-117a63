// tb_sc_gctr: checks the global stream counter: 0 on the first bit of a stream,
// then L-1 down to 1, first/last markers, and hold when en = 0.
module tb_sc_gctr;
  localparam int unsigned N = 8;
  localparam int unsigned L = 1 << N;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [N-1:0] gctr;
  logic first, last;
  int checks = 0, failures = 0;

  sc_gctr dut (.clk(clk), .rst_n(rst_n), .en(en), .gctr(gctr), .first(first), .last(last));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk); #1;
    checks++; if (!(first && gctr == 0)) failures++;
    en = 1'b1;
    for (int t = 0; t < 3*L; t++) begin
      int pos, expv;
      pos  = t % L;                         // 0-based position in the stream
      expv = (L - pos) % L;
      checks++;
      if (gctr != expv || first != (pos == 0) || last != (pos == L-1)) begin
        failures++;
        $display("FAIL t=%0d gctr=%0d first=%b last=%b", t, gctr, first, last);
      end
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
