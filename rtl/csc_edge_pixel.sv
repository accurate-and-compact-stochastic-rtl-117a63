// csc_edge_pixel: complete correlated stochastic computing (CSC) edge pipeline for
// one output pixel.
//
// Noisy 8-bit image pixels go through median filter -> Gaussian smoothing ->
// Robert-Cross edge detection -> threshold, all in stochastic bit-streams of L =
// 2**N bits, and a binary edge pixel comes out. Correlation is kept end to end:
//   - all 36 pixel SNGs of the 6x6 input window share one random source, so their
//     streams are fully correlated;
//   - the 16 AND/OR median filters (one per pixel of the 4x4 median window) keep
//     the correlation, so the 4 Gaussian filters read them directly;
//   - the MUX-based Gaussian filters change the correlation and the edge
//     detector's XORs need it, so two correlators re-correlate the two diagonal
//     pairs first (one clock of latency);
//   - the threshold SN is made by a variable CSNG from the edge SN itself, so the
//     SC comparator gives the threshold exactly; a binary counter makes the pixel.
// With VAR_THR = 0 a constant CSNG with THR_CONST ones replaces the variable one.
// The only conversions are the SNGs at the start and the counters at the end.
//
// Timing: a global counter frames the streams. The window pix and threshold thr are
// taken when in_valid and in_ready are both 1; in_ready is 1 on the last bit of
// each stream, so a new pixel can start every L cycles. The accepted window is
// streamed during the next L cycles; out_valid pulses L + 1 cycles after the
// accepting edge with out_pixel (1 = edge above threshold), edge_value (ones in the
// edge SN, i.e. the edge strength times L) and thr_value (ones in the threshold
// stage stream). Window layout: pix[r][c], r, c = 0..5; the output pixel is the
// one at window position (2,2); its edge uses smoothed pixels (2,2), (2,3), (3,2),
// (3,3).
module csc_edge_pixel #(
  parameter int unsigned  N         = sc_pkg::SC_N,
  parameter int unsigned  CTR_W     = sc_pkg::SC_CTR_W,
  parameter bit           VAR_THR   = 1'b1,
  parameter logic [N-1:0] THR_CONST = 8'd26
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  output logic                in_ready,
  input  logic [5:0][5:0][N-1:0] pix,
  input  logic [N-1:0]        thr,
  output logic                out_valid,
  output logic                out_pixel,
  output logic [N-1:0]        edge_value,
  output logic [N-1:0]        thr_value
);
  // ---------------------------------------------------------------- framing
  logic [N-1:0] rnd;
  logic [N-1:0] gctr, gctr_d;
  logic         first, last, first_d, last_d;

  sc_rng  #(.N(N)) u_rng  (.clk(clk), .rst_n(rst_n), .en(1'b1), .rnd(rnd));
  sc_gctr #(.N(N)) u_gctr (.clk(clk), .rst_n(rst_n), .en(1'b1), .gctr(gctr),
                           .first(first), .last(last));

  // Framing of the stage behind the correlators, one clock later.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) gctr_d <= N'(1);
    else        gctr_d <= gctr;
  end
  assign first_d = (gctr_d == '0);
  assign last_d  = (gctr_d == N'(1));

  // ---------------------------------------------------------------- input
  logic [5:0][5:0][N-1:0] win_q;
  logic [N-1:0]           thr_q;
  logic                   vld_q, vld_d, tag_q;

  assign in_ready = last;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      win_q <= '0;
      thr_q <= '0;
      vld_q <= 1'b0;
      vld_d <= 1'b0;
      tag_q <= 1'b0;
    end else begin
      if (last) begin
        vld_q <= in_valid;
        if (in_valid) begin
          win_q <= pix;
          thr_q <= thr;
        end
      end
      vld_d <= vld_q;
      if (last_d) tag_q <= vld_d;
    end
  end

  // ---------------------------------------------------------------- SNGs
  logic [5:0][5:0] xs;
  for (genvar r = 0; r < 6; r++) begin : g_sng_r
    for (genvar c = 0; c < 6; c++) begin : g_sng_c
      sc_sng #(.N(N), .ROT(0)) u_sng (.rnd(rnd), .x(win_q[r][c]), .sn(xs[r][c]));
    end
  end

  // ---------------------------------------------------------------- median
  logic [3:0][3:0] med;
  for (genvar a = 0; a < 4; a++) begin : g_med_r
    for (genvar b = 0; b < 4; b++) begin : g_med_c
      sc_median3x3 u_med (
        .p({xs[a+2][b+2], xs[a+2][b+1], xs[a+2][b],
            xs[a+1][b+2], xs[a+1][b+1], xs[a+1][b],
            xs[a][b+2],   xs[a][b+1],   xs[a][b]}),
        .med(med[a][b]));
    end
  end

  // ---------------------------------------------------------------- Gaussian
  logic [1:0][1:0] gs;
  for (genvar u = 0; u < 2; u++) begin : g_gs_r
    for (genvar v = 0; v < 2; v++) begin : g_gs_c
      sc_gauss3x3 #(.N(N)) u_gauss (
        .rnd(rnd),
        .w({med[u+2][v+2], med[u+2][v+1], med[u+2][v],
            med[u+1][v+2], med[u+1][v+1], med[u+1][v],
            med[u][v+2],   med[u][v+1],   med[u][v]}),
        .z(gs[u][v]));
    end
  end

  // ---------------------------------------------------------------- correlators
  logic c00, c11, c10, c01;

  sc_correlator #(.CTR_W(CTR_W)) u_corr0 (
    .clk(clk), .rst_n(rst_n), .en(1'b1), .first(first),
    .x(gs[0][0]), .y(gs[1][1]), .xo(c00), .yo(c11),
    .moved_out(), .moved_in(), .y_min());
  sc_correlator #(.CTR_W(CTR_W)) u_corr1 (
    .clk(clk), .rst_n(rst_n), .en(1'b1), .first(first),
    .x(gs[1][0]), .y(gs[0][1]), .xo(c10), .yo(c01),
    .moved_out(), .moved_in(), .y_min());

  // ---------------------------------------------------------------- edge
  logic [N-1:0] rnd_d;
  logic         edge_sn;

  // The random value is delayed with the streams so that the edge MUX selector
  // keeps the same relation to its inputs as without the correlator register.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rnd_d <= '0;
    else        rnd_d <= rnd;
  end

  sc_robert_cross #(.N(N)) u_rc (
    .rnd(rnd_d), .x00(c00), .x11(c11), .x10(c10), .x01(c01), .z(edge_sn));

  // ---------------------------------------------------------------- threshold
  logic thr_sn, thr_forced, thr_out;

  if (VAR_THR) begin : g_var
    csng_var #(.N(N)) u_csng (
      .clk(clk), .rst_n(rst_n), .en(1'b1), .first(first_d), .gctr(gctr_d),
      .value_in(thr_q), .y(edge_sn), .x(thr_sn), .forced(thr_forced));
  end else begin : g_const
    csng_const #(.N(N), .P(THR_CONST)) u_csng (
      .clk(clk), .rst_n(rst_n), .en(1'b1), .first(first_d), .gctr(gctr_d),
      .y(edge_sn), .x(thr_sn), .forced(thr_forced));
  end

  sc_threshold u_thr (
    .clk(clk), .rst_n(rst_n), .en(1'b1), .first(first_d),
    .x(edge_sn), .y(thr_sn), .gt(thr_out));

  // ---------------------------------------------------------------- output
  logic edge_done, thr_done, pix_done;

  sc_counter #(.N(N)) u_cnt_edge (
    .clk(clk), .rst_n(rst_n), .en(1'b1), .first(first_d), .last(last_d),
    .sn(edge_sn), .value(edge_value), .done(edge_done));
  sc_counter #(.N(N)) u_cnt_thr (
    .clk(clk), .rst_n(rst_n), .en(1'b1), .first(first_d), .last(last_d),
    .sn(thr_out), .value(thr_value), .done(thr_done));
  sc_bin_counter u_bin (
    .clk(clk), .rst_n(rst_n), .en(1'b1), .first(first_d), .last(last_d),
    .sn(thr_out), .pixel(out_pixel), .done(pix_done));

  assign out_valid = pix_done & tag_q;
endmodule
