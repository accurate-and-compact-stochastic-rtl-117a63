// tb_sc_median3x3: nine pixel values are turned into fully correlated SNs with one
// random permutation. For such streams the median stream must, bit by bit, be the
// majority of the nine bits, and over the stream it must hold exactly the median
// value (no error at all). Windows with equal values and extreme values included.
module tb_sc_median3x3;
  localparam int unsigned L = 256;
  logic [8:0] p;
  logic med;
  int checks = 0, failures = 0;
  int perm [L];

  sc_median3x3 dut (.p(p), .med(med));

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < L; i++) perm[i] = i;
    for (int s = 0; s < 200; s++) begin
      int v [9], srt [9], ones;
      perm.shuffle();
      for (int k = 0; k < 9; k++) begin
        case (s % 4)
          0: v[k] = $urandom_range(0, L-1);
          1: v[k] = ($urandom_range(0, 1) == 1) ? 255 : 0;          // salt and pepper
          2: v[k] = 100 + $urandom_range(0, 3);                       // near-flat
          default: v[k] = (k == 4) ? 255 : $urandom_range(50, 60);    // impulse
        endcase
        srt[k] = v[k];
      end
      srt.sort();
      ones = 0;
      for (int i = 0; i < L; i++) begin
        int cnt;
        cnt = 0;
        for (int k = 0; k < 9; k++) begin
          p[k] = (perm[i] < v[k]);
          cnt += int'(p[k]);
        end
        #1;
        checks++;
        if (med !== (cnt >= 5)) begin failures++; $display("FAIL s=%0d i=%0d", s, i); end
        ones += int'(med);
      end
      checks++;
      if (ones != srt[4]) begin failures++; $display("FAIL s=%0d ones=%0d median=%0d", s, ones, srt[4]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
