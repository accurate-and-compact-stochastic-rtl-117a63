// tb_sc_robert_cross: fully correlated input SNs from one random sequence, which
// also feeds the selector SNG (rotated by 7). Odd streams use a random permutation
// of 0..255, even ones the 256-step de Bruijn sequence of the shared source
// (LFSR x^8+x^6+x^5+x^4+1 with the zero state inserted), generated here on its own. The output bit must match an
// independent model, and the value must be close to
// (|x00 - x11| + |x10 - x01|) / 2: mean absolute error below 2 % of full scale
// for pixels over the full range (the MUX adds a sampling error that grows with
// the size of the two differences).
module tb_sc_robert_cross;
  localparam int unsigned N = 8;
  localparam int unsigned L = 1 << N;
  logic [N-1:0] rnd;
  logic x00, x11, x10, x01, z;
  int checks = 0, failures = 0;
  int perm [L];
  int seq [L];
  real err_sum = 0.0;

  sc_robert_cross dut (.rnd(rnd), .x00(x00), .x11(x11), .x10(x10), .x01(x01), .z(z));

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int NS = 300;
  initial begin
    for (int i = 0; i < L; i++) perm[i] = i;
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
      int a, b, c, d, ones, da, db;
      real dc;
      perm.shuffle();
      a = $urandom_range(0, L-1); b = $urandom_range(0, L-1);
      c = $urandom_range(0, L-1); d = (s % 3 == 0) ? c : $urandom_range(0, L-1);
      ones = 0;
      for (int i = 0; i < L; i++) begin
        int r, rr;
        bit sel, ez;
        r = (s % 2 == 1) ? perm[i] : seq[i];
        rr = ((r << 7) | (r >> 1)) & 255;
        rnd = r[N-1:0];
        x00 = r < a; x11 = r < b; x10 = r < c; x01 = r < d;
        sel = rr < 128;
        ez  = sel ? (x00 ^ x11) : (x10 ^ x01);
        #1;
        checks++;
        if (z !== ez) begin failures++; $display("FAIL s=%0d i=%0d", s, i); end
        ones += int'(z);
      end
      da = (a > b) ? a - b : b - a;
      db = (c > d) ? c - d : d - c;
      dc = (da + db) / 2.0;
      err_sum += ((ones > dc) ? ones - dc : dc - ones) / L;
    end
    $display("edge mean abs error %f", err_sum / NS);
    checks++;
    if (err_sum / NS > 0.02) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
