// tb_max_example: the correlation-loss example p_Z = 1/2 max(p_A + p_B, p_C + p_D).
//
// A, B, C and D come from SNGs sharing the one random source, so they are fully
// correlated. Two MUXes with a common selector of probability 1/2 (from an
// independent source) form the scaled sums, and an OR gate should give their
// maximum, which it does only for fully correlated operands. The MUXes have
// changed the correlation, so the OR result is wrong; a correlator with a 4-bit
// counter between the MUXes and the OR restores it. Over many random inputs the
// mean absolute error of the result without and with the correlator is measured.
// Checks: the correlator must at least halve the error and bring it below 3 % of
// full scale; without it the error must be above 4 % (the loss is real).
module tb_max_example;
  import sc_pkg::*;
  localparam int unsigned N  = SC_N;
  localparam int unsigned L  = SC_L;
  localparam int          NI = 2000;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0] rnd, gctr;
  logic first, last;
  logic [N-1:0] va = '0, vb = '0, vc = '0, vd = '0;
  logic a, b, c, d, sel = 1'b0;
  logic m0, m1, c0, c1;
  int checks = 0, failures = 0;

  sc_rng  #(.N(N)) u_rng  (.clk(clk), .rst_n(rst_n), .en(1'b1), .rnd(rnd));
  sc_gctr #(.N(N)) u_gctr (.clk(clk), .rst_n(rst_n), .en(1'b1), .gctr(gctr), .first(first), .last(last));
  sc_sng  #(.N(N)) u_a (.rnd(rnd), .x(va), .sn(a));
  sc_sng  #(.N(N)) u_b (.rnd(rnd), .x(vb), .sn(b));
  sc_sng  #(.N(N)) u_c (.rnd(rnd), .x(vc), .sn(c));
  sc_sng  #(.N(N)) u_d (.rnd(rnd), .x(vd), .sn(d));

  assign m0 = sel ? a : b;
  assign m1 = sel ? c : d;

  sc_correlator #(.CTR_W(4)) u_corr (.clk(clk), .rst_n(rst_n), .en(1'b1), .first(first),
    .x(m0), .y(m1), .xo(c0), .yo(c1), .moved_out(), .moved_in(), .y_min());

  always #5 clk = ~clk;

  initial begin
    #((NI + 4) * L * 10 + 10000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real err_raw, err_cor;
    int  prev_cor;
    err_raw = 0.0; err_cor = 0.0; prev_cor = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int it = 0; it <= NI; it++) begin
      int raw, cor, ia, ib, ic, id;
      real ref_v;
      ia = $urandom_range(0, L-1); ib = $urandom_range(0, L-1);
      ic = $urandom_range(0, L-1); id = $urandom_range(0, L-1);
      va = ia[N-1:0]; vb = ib[N-1:0]; vc = ic[N-1:0]; vd = id[N-1:0];
      raw = 0; cor = 0;
      for (int j = 0; j < L; j++) begin
        sel = $urandom_range(0, 1);
        #1;
        if (j == 0) begin
          checks++;
          if (!first) begin failures++; $display("FAIL stream framing"); end
        end
        raw += int'(m0 | m1);
        @(posedge clk); #1;
        // corrected bit j of this stream is now on c0/c1
        cor += int'(c0 | c1);
      end
      ref_v = ((ia + ib > ic + id) ? (ia + ib) : (ic + id)) / 2.0;
      if (it < NI) begin
        err_raw += ((raw > ref_v) ? raw - ref_v : ref_v - raw) / L;
        err_cor += ((cor > ref_v) ? cor - ref_v : ref_v - cor) / L;
      end
    end
    err_raw /= NI; err_cor /= NI;
    $display("mean absolute error: without correlator %f, with 4-bit correlator %f", err_raw, err_cor);
    checks++;
    if (!(err_cor < err_raw / 2 && err_cor < 0.03)) failures++;
    checks++;
    if (err_raw < 0.04) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
