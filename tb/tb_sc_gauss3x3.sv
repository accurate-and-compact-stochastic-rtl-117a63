// tb_sc_gauss3x3: 3x3 windows are turned into correlated SNs from one random
// sequence, which also feeds the filter's selector SNGs. The sequence is the
// 256-step de Bruijn sequence of the shared source (LFSR x^8+x^6+x^5+x^4+1 with the
// zero state inserted), generated here on its own. The output bit must match an independent model of the MUX tree, and the
// filtered value must be close to the exact Gaussian
// (w0 + 2 w1 + w2 + 2 w3 + 4 w4 + 2 w5 + w6 + 2 w7 + w8) / 16. Smooth windows
// (a base value +-20, as in natural images) must have a mean absolute error below
// 1 % of full scale, windows of unrelated random pixels below 3 %.
module tb_sc_gauss3x3;
  localparam int unsigned N = 8;
  localparam int unsigned L = 1 << N;
  logic [N-1:0] rnd;
  logic [8:0] w;
  logic z;
  int checks = 0, failures = 0;
  real err_sum [2] = '{0.0, 0.0};
  int  seq [L];

  sc_gauss3x3 dut (.rnd(rnd), .w(w), .z(z));

  function automatic int rotl(input int v, input int k);
    return ((v << k) | (v >> (8 - k))) & 255;
  endfunction

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int NS = 300;
  initial begin
    begin
      int st;
      st = 0;
      for (int i = 0; i < L; i++) begin
        int fb;
        seq[i] = st;
        fb = ((st >> 7) ^ (st >> 5) ^ (st >> 4) ^ (st >> 3)) & 1;
        if ((st & 127) == 0) fb = fb ^ 1;
        st = ((st << 1) | fb) & 255;
      end
    end
    for (int s = 0; s < NS; s++) begin
      int base;
      int v [9], ones, dc;
      real e;
      base = $urandom_range(20, 235);
      for (int k = 0; k < 9; k++) begin
        v[k] = (s % 2 == 0) ? $urandom_range(0, L-1) : base + $urandom_range(0, 40) - 20;
      end
      dc = v[0] + 2*v[1] + v[2] + 2*v[3] + 4*v[4] + 2*v[5] + v[6] + 2*v[7] + v[8];
      ones = 0;
      for (int i = 0; i < L; i++) begin
        bit s1, s2, s3, s4, s5, s6, s7, s8, m1, m2, m3, m4, m5, m6, m7, ez;
        int r;
        r = seq[i];
        rnd = r[N-1:0];
        for (int k = 0; k < 9; k++) w[k] = (r < v[k]);
        s1 = rotl(r, 3) < 171; s2 = rotl(r, 3) < 171; s4 = rotl(r, 3) < 85; s5 = rotl(r, 3) < 171;
        s3 = rotl(r, 6) < 128; s6 = rotl(r, 6) < 171;
        s7 = rotl(r, 4) < 230;
        s8 = rotl(r, 5) < 96;
        m1 = s1 ? w[1] : w[0];
        m2 = s2 ? w[3] : w[2];
        m3 = s3 ? m1 : m2;
        m4 = s4 ? w[5] : w[4];
        m5 = s5 ? w[7] : w[6];
        m6 = s6 ? m4 : m5;
        m7 = s7 ? m6 : w[8];
        ez = s8 ? m3 : m7;
        #1;
        checks++;
        if (z !== ez) begin failures++; $display("FAIL s=%0d i=%0d", s, i); end
        ones += int'(z);
      end
      e = (ones > dc / 16.0) ? (ones - dc / 16.0) : (dc / 16.0 - ones);
      e = e / L;
      err_sum[s % 2] += e;
    end
    $display("gaussian mean abs error: random windows %f, smooth windows %f",
             err_sum[0] / (NS / 2), err_sum[1] / (NS / 2));
    checks++;
    if (err_sum[0] / (NS / 2) > 0.03 || err_sum[1] / (NS / 2) > 0.01) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
