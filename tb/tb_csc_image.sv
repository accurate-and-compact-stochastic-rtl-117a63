// tb_csc_image: runs a whole synthetic noisy image through the CSC edge pipeline and
// reports the per-stage errors of the edge/threshold case study.
//
// The 24x24 input image has a smooth background, a bright disc, a dark rectangle
// and a diagonal band, with added noise of +-10 levels and 5 % salt-and-pepper
// impulses. Every output pixel (19x19, the pixels whose 6x6 window lies inside the
// image) is computed by the pipeline and by an integer model of the same
// algorithm (3x3 median, kernel [1 2 1; 2 4 2; 1 2 1]/16, Robert-Cross, threshold
// 0.1 = 26/256). Mean absolute errors over the image:
//   e_rc  edge strength (pipeline vs model)        must be below 2 %
//   e_th  threshold-stage stream vs binary model   reported only
//   e_out binary output vs binary model            must be below 6 %, and every
//         wrong pixel must have a model edge within 5 % of the threshold.
// Two pipelines run side by side on the same windows: the default one (variable
// CSNG, threshold from the port) and one with a constant CSNG of 26 ones; their
// outputs must be identical.
//
// For comparison the testbench also builds, from library blocks, the same chain
// without the correlating circuits, tapped off the default pipeline's Gaussian
// streams: Robert-Cross straight on the uncorrelated Gaussian outputs, and a
// threshold stream made by an ordinary SNG from the shared source instead of by a
// CSNG. Its errors (nc_) must be worse than the pipeline's: the edge error because
// the XORs see streams whose correlation the MUXes have lost, the threshold and
// output errors because the threshold stream is not correlated with the edge stream.
module tb_csc_image;
  import sc_pkg::*;
  localparam int unsigned N = SC_N;
  localparam int unsigned L = SC_L;
  localparam int R = 24, C = 24;
  localparam int OR = R - 5, OC = C - 5;
  localparam int THR = 26;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, rdy_v, rdy_c;
  logic [5:0][5:0][N-1:0] pix = '0;
  logic [N-1:0] thr = N'(THR);
  logic ov_v, op_v, ov_c, op_c;
  logic [N-1:0] ev_v, tv_v, ev_c, tv_c;

  csc_edge_pixel dut_v (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(rdy_v), .pix(pix), .thr(thr),
    .out_valid(ov_v), .out_pixel(op_v), .edge_value(ev_v), .thr_value(tv_v));
  csc_edge_pixel #(.VAR_THR(1'b0), .THR_CONST(N'(THR))) dut_c (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(rdy_c), .pix(pix), .thr('0),
    .out_valid(ov_c), .out_pixel(op_c), .edge_value(ev_c), .thr_value(tv_c));

  // Reference chain without correlator and CSNG, on the default pipeline's streams.
  logic nc_edge_sn, nc_thr_sn, nc_cmp, nc_edge_done, nc_thr_done, nc_pix, nc_pix_done;
  logic [N-1:0] nc_edge_v, nc_thr_v;
  sc_robert_cross nc_rc (
    .rnd(dut_v.rnd), .x00(dut_v.gs[0][0]), .x11(dut_v.gs[1][1]),
    .x10(dut_v.gs[1][0]), .x01(dut_v.gs[0][1]), .z(nc_edge_sn));
  sc_sng #(.ROT(0)) nc_sng (.rnd(dut_v.rnd), .x(dut_v.thr_q), .sn(nc_thr_sn));
  sc_threshold nc_th (
    .clk(clk), .rst_n(rst_n), .en(1'b1), .first(dut_v.first),
    .x(nc_edge_sn), .y(nc_thr_sn), .gt(nc_cmp));
  sc_counter nc_ce (
    .clk(clk), .rst_n(rst_n), .en(1'b1), .first(dut_v.first), .last(dut_v.last),
    .sn(nc_edge_sn), .value(nc_edge_v), .done(nc_edge_done));
  sc_counter nc_ct (
    .clk(clk), .rst_n(rst_n), .en(1'b1), .first(dut_v.first), .last(dut_v.last),
    .sn(nc_cmp), .value(nc_thr_v), .done(nc_thr_done));
  sc_bin_counter nc_bc (
    .clk(clk), .rst_n(rst_n), .en(1'b1), .first(dut_v.first), .last(dut_v.last),
    .sn(nc_cmp), .pixel(nc_pix), .done(nc_pix_done));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int img [R][C];
  int med [R][C];
  real gs [R][C];
  real edge_ref [OR][OC];
  int  q_r [$], q_c [$];
  real e_rc = 0.0, e_th = 0.0, e_out = 0.0;
  real nc_e_rc = 0.0, nc_e_th = 0.0, nc_e_out = 0.0;
  int  n_out = 0, n_edge = 0;

  initial begin
    #((OR * OC + 8) * L * 10 + 100000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int clip(input int v);
    return (v < 0) ? 0 : (v > 255) ? 255 : v;
  endfunction

  task automatic build_image();
    for (int r = 0; r < R; r++) for (int c = 0; c < C; c++) begin
      int v;
      v = 70 + 3 * c + 2 * r;
      if ((r - 8) * (r - 8) + (c - 15) * (c - 15) < 30) v = 200;
      if (r >= 14 && r < 21 && c >= 3 && c < 11) v = 35;
      if (r - c >= -2 && r - c <= 1 && r < 12) v = 150;
      v += $urandom_range(0, 20) - 10;
      if ($urandom_range(0, 99) < 5) v = ($urandom_range(0, 1) == 1) ? 255 : 0;
      img[r][c] = clip(v);
    end
    for (int r = 1; r < R - 1; r++) for (int c = 1; c < C - 1; c++) begin
      int s [9];
      for (int k = 0; k < 9; k++) s[k] = img[r - 1 + k/3][c - 1 + k%3];
      s.sort();
      med[r][c] = s[4];
    end
    for (int r = 2; r < R - 2; r++) for (int c = 2; c < C - 2; c++) begin
      gs[r][c] = (med[r-1][c-1] + 2*med[r-1][c] + med[r-1][c+1] + 2*med[r][c-1] + 4*med[r][c]
                  + 2*med[r][c+1] + med[r+1][c-1] + 2*med[r+1][c] + med[r+1][c+1]) / 16.0;
    end
    // output (i, j) uses the window rows i..i+5, columns j..j+5; centre (i+2, j+2)
    for (int i = 0; i < OR; i++) for (int j = 0; j < OC; j++) begin
      real d0, d1;
      d0 = gs[i+2][j+2] - gs[i+3][j+3]; if (d0 < 0) d0 = -d0;
      d1 = gs[i+3][j+2] - gs[i+2][j+3]; if (d1 < 0) d1 = -d1;
      edge_ref[i][j] = (d0 + d1) / 2.0;
    end
  endtask

  // Output side.
  always @(posedge clk) begin
    #2;
    if (rst_n && ov_v) begin
      int i, j;
      real rv, d;
      bit  dcp;
      checks++;
      if (!ov_c || op_c != op_v || tv_c != tv_v || ev_c != ev_v) begin
        failures++;
        $display("FAIL constant and variable CSNG pipelines differ");
      end
      i = q_r.pop_front(); j = q_c.pop_front();
      rv  = edge_ref[i][j];
      dcp = (rv > THR);
      d = (ev_v > rv) ? ev_v - rv : rv - ev_v;
      e_rc  += d / L;
      e_th  += ((tv_v / real'(L)) > dcp) ? (tv_v / real'(L)) - dcp : dcp - (tv_v / real'(L));
      e_out += (op_v != dcp) ? 1.0 : 0.0;
      // the reference chain finished the same stream one clock earlier
      d = (nc_edge_v > rv) ? nc_edge_v - rv : rv - nc_edge_v;
      nc_e_rc  += d / L;
      nc_e_th  += ((nc_thr_v / real'(L)) > dcp) ? (nc_thr_v / real'(L)) - dcp
                                                : dcp - (nc_thr_v / real'(L));
      nc_e_out += (nc_pix != dcp) ? 1.0 : 0.0;
      if (dcp) n_edge++;
      n_out++;
      if (op_v != dcp) begin
        checks++;
        if (rv < THR - 0.05 * L || rv > THR + 0.05 * L) begin
          failures++;
          $display("FAIL pixel %0d,%0d wrong far from the threshold (edge %f, got %0d)", i, j, rv, ev_v);
        end
      end
    end
  end

  initial begin
    build_image();
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    while (!rdy_v) begin @(posedge clk); #1; end
    for (int i = 0; i < OR; i++) for (int j = 0; j < OC; j++) begin
      for (int r = 0; r < 6; r++) for (int c = 0; c < 6; c++) pix[r][c] = img[i+r][j+c][N-1:0];
      in_valid = 1'b1;
      @(posedge clk); #1;
      in_valid = 1'b0;
      q_r.push_back(i); q_c.push_back(j);
      repeat (L - 1) @(posedge clk);
      #1;
    end
    repeat (L + 4) @(posedge clk);
    #3;
    e_rc /= n_out; e_th /= n_out; e_out /= n_out;
    $display("image %0dx%0d -> %0dx%0d outputs, %0d edge pixels in the model", R, C, OR, OC, n_edge);
    nc_e_rc /= n_out; nc_e_th /= n_out; nc_e_out /= n_out;
    $display("errors: e_rc %f  e_th %f  e_out %f", e_rc, e_th, e_out);
    $display("without correlator and CSNG: e_rc %f  e_th %f  e_out %f", nc_e_rc, nc_e_th, nc_e_out);
    checks++;
    if (!(nc_e_rc > e_rc)) begin failures++; $display("FAIL correlator does not lower the edge error"); end
    checks++;
    if (!(nc_e_th > e_th) || !(nc_e_out > e_out)) begin
      failures++;
      $display("FAIL CSNG does not lower the threshold or output error");
    end
    checks++;
    if (n_out != OR * OC) begin failures++; $display("FAIL %0d outputs", n_out); end
    checks++;
    if (e_rc > 0.02) failures++;
    checks++;
    if (e_out > 0.06) failures++;
    checks++;
    if (n_edge == 0 || n_edge == n_out) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
