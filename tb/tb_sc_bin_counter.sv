// tb_sc_bin_counter: the binary output counter must give 0 for an all-zero stream
// and 1 for any stream with at least one 1 (also a single 1 on the first or the
// last bit), independently of the previous stream.
module tb_sc_bin_counter;
  localparam int unsigned L = 256;
  logic clk = 1'b0, rst_n = 1'b0;
  logic first = 1'b0, last = 1'b0, sn = 1'b0;
  logic pixel, done;
  int checks = 0, failures = 0;

  sc_bin_counter dut (.clk(clk), .rst_n(rst_n), .en(1'b1), .first(first), .last(last),
                      .sn(sn), .pixel(pixel), .done(done));

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
    for (int s = 0; s < 30; s++) begin
      int pos;
      bit any;
      any = 1'b0;
      // even streams all zero, odd streams have ones at a chosen position
      pos = (s == 1) ? 0 : (s == 3) ? L-1 : $urandom_range(0, L-1);
      for (int i = 0; i < L; i++) begin
        first = (i == 0);
        last  = (i == L-1);
        sn    = (s % 2 == 1) && (i == pos || (s > 10 && $urandom_range(0, 9) == 0));
        any  |= sn;
        @(posedge clk); #1;
      end
      checks++;
      if (!done || pixel != any) begin
        failures++;
        $display("FAIL s=%0d pixel=%b exp=%b done=%b", s, pixel, any, done);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
