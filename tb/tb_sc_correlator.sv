// tb_sc_correlator: two SNs X (a ones) and Y (b ones) start fully correlated and
// are then de-correlated by random swaps of bit positions of Y, which keeps their
// values. Checks:
//  - outputs, one clock later, equal an independent model of the min-find and
//    relocate algorithms (counter of CTR_W bits that keeps a 1 when full);
//  - the max SN passes unchanged and, when nothing is left in the counter at the
//    end, both values are preserved and the outputs are fully correlated
//    (ones(xo & yo) = min(ones(xo), ones(yo)), i.e. SCC = 1);
//  - a second instance with a 2-bit counter reaches the full-counter case.
module tb_sc_correlator;
  localparam int unsigned L = 256;
  logic clk = 1'b0, rst_n = 1'b0;
  logic first = 1'b0, x = 1'b0, y = 1'b0;
  logic xo6, yo6, mo6, mi6, ym6;
  logic xo2, yo2, mo2, mi2, ym2;
  int checks = 0, failures = 0;
  int perm [L];
  bit xs [L], ys [L];
  int n_moved = 0, n_full = 0, n_xmin = 0, n_ymin = 0, n_exact = 0;

  sc_correlator dut6 (.clk(clk), .rst_n(rst_n), .en(1'b1), .first(first), .x(x), .y(y),
    .xo(xo6), .yo(yo6), .moved_out(mo6), .moved_in(mi6), .y_min(ym6));
  sc_correlator #(.CTR_W(2)) dut2 (.clk(clk), .rst_n(rst_n), .en(1'b1), .first(first), .x(x), .y(y),
    .xo(xo2), .yo(yo2), .moved_out(mo2), .moved_in(mi2), .y_min(ym2));

  always #5 clk = ~clk;

  // Reference: returns corrected streams and the counter left at the end.
  task automatic model(input int w, output bit xr [L], output bit yr [L], output int left,
                       output int full_hits);
    bit decided, ymin;
    int ctr, maxc;
    decided = 0; ymin = 0; ctr = 0; left = 0; full_hits = 0;
    maxc = (1 << w) - 1;
    for (int i = 0; i < L; i++) begin
      bit mn, mx, cm;
      if (!decided && xs[i] != ys[i]) begin decided = 1; ymin = xs[i] && !ys[i]; end
      mn = ymin ? ys[i] : xs[i];
      mx = ymin ? xs[i] : ys[i];
      cm = mn;
      if (mn && !mx) begin
        if (ctr < maxc) begin cm = 0; ctr++; end
        else full_hits++;
      end else if (!mn && mx && ctr > 0) begin
        cm = 1; ctr--;
      end
      xr[i] = ymin ? mx : cm;
      yr[i] = ymin ? cm : mx;
    end
    left = ctr;
  endtask

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < L; i++) perm[i] = i;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int s = 0; s < 80; s++) begin
      int a, b, nsw, left6, left2, fh6, fh2;
      int ox, oy, oxy, o6x, o6y;
      bit r6x [L], r6y [L], r2x [L], r2y [L];
      perm.shuffle();
      a = $urandom_range(0, L-1);
      b = $urandom_range(0, L-1);
      for (int i = 0; i < L; i++) begin xs[i] = perm[i] < a; ys[i] = perm[i] < b; end
      nsw = (s % 4 == 0) ? 0 : $urandom_range(1, 30);
      for (int k = 0; k < nsw; k++) begin
        int p, q;
        bit t;
        p = $urandom_range(0, L-1); q = $urandom_range(0, L-1);
        t = ys[p]; ys[p] = ys[q]; ys[q] = t;
      end
      model(6, r6x, r6y, left6, fh6);
      model(2, r2x, r2y, left2, fh2);
      if (fh2 > 0) n_full++;
      o6x = 0; o6y = 0; oxy = 0;
      for (int i = 0; i <= L; i++) begin
        if (i < L) begin
          first = (i == 0);
          x = xs[i];
          y = ys[i];
        end else begin
          first = 1'b0; x = 1'b0; y = 1'b0;
        end
        #1;
        if (i < L && (mo6 || mi6)) n_moved++;
        @(posedge clk); #1;
        if (i < L) begin
          checks++;
          if (xo6 !== r6x[i] || yo6 !== r6y[i] || xo2 !== r2x[i] || yo2 !== r2y[i]) begin
            failures++;
            $display("FAIL s=%0d i=%0d got %b%b/%b%b exp %b%b/%b%b", s, i, xo6, yo6, xo2, yo2,
                     r6x[i], r6y[i], r2x[i], r2y[i]);
          end
          o6x += int'(xo6); o6y += int'(yo6); oxy += int'(xo6 & yo6);
        end
      end
      if (ym6) n_ymin++; else n_xmin++;
      // Properties independent of the model.
      checks++;
      if (!(o6x == a || o6y == b)) begin failures++; $display("FAIL s=%0d max changed", s); end
      if (left6 == 0 && fh6 == 0) begin
        n_exact++;
        checks++;
        if (o6x != a || o6y != b || oxy != ((o6x < o6y) ? o6x : o6y)) begin
          failures++;
          $display("FAIL s=%0d a=%0d b=%0d -> %0d %0d and %0d", s, a, b, o6x, o6y, oxy);
        end
      end
    end
    checks++;
    if (n_moved == 0 || n_full == 0 || n_xmin == 0 || n_ymin == 0 || n_exact < 20) begin
      failures++;
      $display("FAIL coverage moved=%0d full=%0d xmin=%0d ymin=%0d exact=%0d",
               n_moved, n_full, n_xmin, n_ymin, n_exact);
    end
    $display("coverage moved=%0d full=%0d xmin=%0d ymin=%0d exact=%0d", n_moved, n_full, n_xmin, n_ymin, n_exact);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
