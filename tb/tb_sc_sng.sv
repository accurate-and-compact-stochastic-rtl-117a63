// tb_sc_sng: exhaustive check of the SNG comparator, plain and with circular
// rotation of the random value: the bit must be (rotated random < x), and over all
// 256 random values the stream must hold exactly x ones.
module tb_sc_sng;
  localparam int unsigned N = 8;
  logic [N-1:0] rnd, x;
  logic sn0, sn3;
  int checks = 0, failures = 0;

  sc_sng #(.ROT(0)) dut0 (.rnd(rnd), .x(x), .sn(sn0));
  sc_sng #(.ROT(3)) dut3 (.rnd(rnd), .x(x), .sn(sn3));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int xv = 0; xv < 256; xv += 5) begin
      int ones0, ones3;
      ones0 = 0; ones3 = 0;
      x = xv[N-1:0];
      for (int r = 0; r < 256; r++) begin
        int rr;
        rr = ((r << 3) | (r >> 5)) & 255;
        rnd = r[N-1:0];
        #1;
        checks++;
        if (sn0 !== (r < xv) || sn3 !== (rr < xv)) begin
          failures++;
          $display("FAIL x=%0d r=%0d sn0=%b sn3=%b", xv, r, sn0, sn3);
        end
        ones0 += int'(sn0);
        ones3 += int'(sn3);
      end
      checks++;
      if (ones0 != xv || ones3 != xv) begin
        failures++;
        $display("FAIL x=%0d ones %0d %0d", xv, ones0, ones3);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
