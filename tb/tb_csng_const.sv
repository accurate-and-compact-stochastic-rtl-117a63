// tb_csng_const: checks the constant CSNG (P = 100 ones per stream).
// Y is a random SN with a random number of ones. The output must hold exactly the
// requested number of ones in every stream, must be fully correlated with Y
// (its ones cover Y's or lie inside them), must match an independent model of
// the generation algorithm bit by bit, and the tail-filling case (Y has fewer
// ones than requested) must occur.
module tb_csng_const;
  localparam int unsigned N = 8;
  localparam int unsigned L = 1 << N;
  logic clk = 1'b0, rst_n = 1'b0;
  logic first = 1'b0, y = 1'b0, x, forced;
  logic [N-1:0] gctr = '0;
  int checks = 0, failures = 0;
  int perm [L];
  int n_forced = 0, n_cover = 0;

  csng_const #(.P(8'd100)) dut (.clk(clk), .rst_n(rst_n), .en(1'b1), .first(first), .gctr(gctr), .y(y), .x(x), .forced(forced));

  always #5 clk = ~clk;

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
    for (int s = 0; s < 60; s++) begin
      int p, b, ones, both, rem;
      bit fsd;
      p = 100;
      b = (s % 5 == 0) ? 0 : $urandom_range(0, L-1);
      perm.shuffle();
      ones = 0; both = 0; rem = p; fsd = 0;
      for (int i = 0; i < L; i++) begin
        bit ex;
        first = (i == 0);
        gctr  = N'((L - i) % L);
        y     = (perm[i] < b);
        // model of the generator: i bits already produced, L - i left
        if (rem == 0)              ex = 0;
        else if (rem == L - i)     ex = 1;
        else                       ex = y;
        if (rem != 0 && rem == L - i && !y) fsd = 1;
        if (ex) rem--;
        #1;
        checks++;
        if (x !== ex) begin failures++; $display("FAIL s=%0d i=%0d x=%b exp=%b", s, i, x, ex); end
        if (forced) n_forced++;
        ones += int'(x);
        both += int'(x & y);
        @(posedge clk); #1;
      end
      checks++;
      if (ones != p) begin failures++; $display("FAIL s=%0d ones=%0d p=%0d", s, ones, p); end
      checks++;
      if (both != ((p < b) ? p : b)) begin failures++; $display("FAIL s=%0d not correlated", s); end
      if (fsd) n_cover++;
    end
    checks++;
    if (n_forced == 0 || n_cover == 0) begin
      failures++;
      $display("FAIL coverage forced=%0d cover=%0d", n_forced, n_cover);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
