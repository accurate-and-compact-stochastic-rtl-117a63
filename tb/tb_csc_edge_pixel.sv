// tb_csc_edge_pixel: end-to-end test of the CSC edge pipeline at its default size
// (8-bit pixels, 256-bit streams, 6-bit correlator counters).
//
// A stream of 6x6 windows from synthetic noisy images (flat areas, vertical,
// horizontal and diagonal step edges, ramps; Gaussian-like noise and salt-and-
// pepper impulses) goes through the pipeline, with a bubble frame now and then.
// An independent integer model of the same pipeline (median, kernel
// [1 2 1; 2 4 2; 1 2 1]/16, Robert-Cross, threshold) gives the reference.
// Checks:
//  - every one of the 16 median streams holds exactly the model's median (no error);
//  - edge_value is close to the model's edge strength (per pixel within 12 %, mean
//    within 2 % of full scale);
//  - out_pixel is exactly (edge_value > thr), and thr_value > 0 exactly then;
//  - out_valid comes exactly L+1 clocks after the accepting edge, none for bubbles;
//  - in_ready is 1 on the last bit of every stream only.
// Mechanisms that must each occur at least once: relocation of a 1 out of and
// into the min SN in each correlator, each correlator input taken as the min,
// the CSNG tail-filling case, pixels on both sides of the threshold, a bubble.
module tb_csc_edge_pixel;
  import sc_pkg::*;
  localparam int unsigned N = SC_N;
  localparam int unsigned L = SC_L;
  localparam int LAT = L + 1;
  localparam int NW  = 160;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_ready;
  logic [5:0][5:0][N-1:0] pix = '0;
  logic [N-1:0] thr = '0;
  logic out_valid, out_pixel;
  logic [N-1:0] edge_value, thr_value;

  csc_edge_pixel dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready), .pix(pix), .thr(thr),
    .out_valid(out_valid), .out_pixel(out_pixel), .edge_value(edge_value), .thr_value(thr_value));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  typedef struct {
    longint acc;
    int     thr;
    real    edge_ref;
  } exp_t;
  exp_t q [$];

  int n_out = 0, n_bubble = 0, n_pix1 = 0, n_pix0 = 0, n_forced = 0;
  int n_mo [2] = '{0, 0};
  int n_mi [2] = '{0, 0};
  int n_ymin [2] = '{0, 0};
  int n_xmin [2] = '{0, 0};
  real err_sum = 0.0, err_max = 0.0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cyc, what);
    end
  endtask

  initial begin
    #((NW + 8) * L * 10 + 100000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- reference
  function automatic int med9(input int v [9]);
    int s [9];
    s = v;
    s.sort();
    return s[4];
  endfunction

  function automatic int clip(input int v);
    return (v < 0) ? 0 : (v > 255) ? 255 : v;
  endfunction

  // Synthetic noisy image window.
  task automatic make_window(input int kind, output int w [6][6]);
    int lo, hi, pos;
    lo  = $urandom_range(10, 120);
    hi  = lo + $urandom_range(20, 130);
    pos = $urandom_range(1, 4);
    for (int r = 0; r < 6; r++) begin
      for (int c = 0; c < 6; c++) begin
        int v;
        case (kind)
          0: v = lo;
          1: v = (c >= pos) ? hi : lo;
          2: v = (r >= pos) ? hi : lo;
          3: v = (r + c >= pos + 2) ? hi : lo;
          default: v = lo + (hi - lo) * c / 5;
        endcase
        v += $urandom_range(0, 12) - 6;
        if ($urandom_range(0, 99) < 6) v = ($urandom_range(0, 1) == 1) ? 255 : 0;
        w[r][c] = clip(v);
      end
    end
  endtask

  // ---------------------------------------------------------------- monitor
  always @(posedge clk) begin
    #2;
    if (rst_n) begin
      if (dut.u_corr0.moved_out) n_mo[0]++;
      if (dut.u_corr0.moved_in)  n_mi[0]++;
      if (dut.u_corr1.moved_out) n_mo[1]++;
      if (dut.u_corr1.moved_in)  n_mi[1]++;
      if (dut.g_var.u_csng.forced) n_forced++;
      if (dut.gctr == N'(2)) begin  // decision of the min is final by the end of a stream
        if (dut.u_corr0.found_q) begin if (dut.u_corr0.ymin_q) n_ymin[0]++; else n_xmin[0]++; end
        if (dut.u_corr1.found_q) begin if (dut.u_corr1.ymin_q) n_ymin[1]++; else n_xmin[1]++; end
      end
      if (out_valid) begin
        exp_t e;
        real err;
        n_out++;
        check(q.size() > 0, "out_valid without an accepted window");
        if (q.size() > 0) begin
          e = q.pop_front();
          check(cyc - e.acc == LAT, $sformatf("latency %0d, expected %0d", cyc - e.acc, LAT));
          err = (edge_value > e.edge_ref) ? edge_value - e.edge_ref : e.edge_ref - edge_value;
          err = err / L;
          err_sum += err;
          if (err > err_max) err_max = err;
          check(err <= 0.12, $sformatf("edge %0d vs reference %f", edge_value, e.edge_ref));
          check(out_pixel == (int'(edge_value) > e.thr),
                $sformatf("pixel %b for edge %0d thr %0d", out_pixel, edge_value, e.thr));
          check((thr_value != 0) == out_pixel, "threshold stream and pixel disagree");
          if (out_pixel) n_pix1++; else n_pix0++;
        end
      end
    end
  end

  // ---------------------------------------------------------------- driver
  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    while (!in_ready) begin @(posedge clk); #1; end
    for (int n = 0; n < NW + 2; n++) begin
      int w [6][6];
      int m [4][4];
      int tv;
      bit valid;
      real g [2][2];
      int mcnt [4][4];
      valid = (n < NW) && (n % 17 != 5);
      make_window(n % 5, w);
      tv = (n % 3 == 0) ? $urandom_range(0, 60) : 26;    // 0.1 of full scale
      for (int r = 0; r < 6; r++) for (int c = 0; c < 6; c++) pix[r][c] = w[r][c][N-1:0];
      thr = tv[N-1:0];
      in_valid = valid;
      // model
      for (int a = 0; a < 4; a++) for (int b = 0; b < 4; b++) begin
        int v [9];
        for (int k = 0; k < 9; k++) v[k] = w[a + k/3][b + k%3];
        m[a][b] = med9(v);
        mcnt[a][b] = 0;
      end
      for (int u = 0; u < 2; u++) for (int v = 0; v < 2; v++) begin
        g[u][v] = (m[u][v] + 2*m[u][v+1] + m[u][v+2] + 2*m[u+1][v] + 4*m[u+1][v+1]
                   + 2*m[u+1][v+2] + m[u+2][v] + 2*m[u+2][v+1] + m[u+2][v+2]) / 16.0;
      end
      @(posedge clk);        // accepting edge
      #1;
      in_valid = 1'b0;
      if (valid) begin
        exp_t e;
        real d0, d1;
        d0 = g[0][0] - g[1][1]; if (d0 < 0) d0 = -d0;
        d1 = g[1][0] - g[0][1]; if (d1 < 0) d1 = -d1;
        e.acc = cyc; e.thr = tv; e.edge_ref = (d0 + d1) / 2.0;
        q.push_back(e);
      end else if (n < NW) n_bubble++;
      for (int j = 0; j < L; j++) begin
        for (int a = 0; a < 4; a++) for (int b = 0; b < 4; b++) mcnt[a][b] += int'(dut.med[a][b]);
        check(in_ready == (j == L-1), "in_ready only on the last bit");
        if (j < L-1) begin @(posedge clk); #1; end
      end
      if (valid) begin
        for (int a = 0; a < 4; a++) for (int b = 0; b < 4; b++)
          check(mcnt[a][b] == m[a][b], $sformatf("median %0d,%0d: %0d ones, expected %0d",
                                                 a, b, mcnt[a][b], m[a][b]));
      end
    end
    repeat (L + 4) @(posedge clk);
    #3;
    $display("windows out=%0d bubbles=%0d pixels 1/0=%0d/%0d", n_out, n_bubble, n_pix1, n_pix0);
    $display("edge error: mean %f max %f", err_sum / (n_out > 0 ? n_out : 1), err_max);
    $display("correlator0: out %0d in %0d xmin %0d ymin %0d; correlator1: out %0d in %0d xmin %0d ymin %0d",
             n_mo[0], n_mi[0], n_xmin[0], n_ymin[0], n_mo[1], n_mi[1], n_xmin[1], n_ymin[1]);
    $display("CSNG tail-filling bits %0d", n_forced);
    check(q.size() == 0, "outputs missing");
    check(n_out > 0 && err_sum / n_out <= 0.02, "mean edge error");
    check(n_bubble > 0, "bubble frame happened");
    check(n_pix1 > 0 && n_pix0 > 0, "pixels on both sides of the threshold");
    check(n_forced > 0, "CSNG tail filling happened");
    for (int k = 0; k < 2; k++) begin
      check(n_mo[k] > 0 && n_mi[k] > 0, $sformatf("correlator %0d relocated ones", k));
      check(n_xmin[k] > 0 && n_ymin[k] > 0, $sformatf("correlator %0d took both inputs as min", k));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
