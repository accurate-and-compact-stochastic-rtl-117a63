// tb_sc_threshold: X and Y are made fully correlated by comparing two values with
// the same random permutation. The comparator output must be 0 until the first bit
// with X=1, Y=0 and 1 from there on, so it has at least one 1 exactly when x > y.
module tb_sc_threshold;
  localparam int unsigned L = 256;
  logic clk = 1'b0, rst_n = 1'b0;
  logic first = 1'b0, x = 1'b0, y = 1'b0;
  logic gt;
  int checks = 0, failures = 0;
  int perm [L];
  int n_gt = 0, n_le = 0;

  sc_threshold dut (.clk(clk), .rst_n(rst_n), .en(1'b1), .first(first), .x(x), .y(y), .gt(gt));

  always #5 clk = ~clk;

  initial begin
    #5000000;
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
      int a, b, ones;
      bit seen;
      perm.shuffle();
      a = $urandom_range(0, L-1);
      b = (s % 3 == 0) ? a : $urandom_range(0, L-1);
      seen = 1'b0;
      ones = 0;
      for (int i = 0; i < L; i++) begin
        first = (i == 0);
        x = (perm[i] < a);
        y = (perm[i] < b);
        seen |= x & ~y;
        #1;
        checks++;
        if (gt !== seen) begin failures++; $display("FAIL s=%0d i=%0d", s, i); end
        ones += int'(gt);
        @(posedge clk); #1;
      end
      checks++;
      if ((ones > 0) != (a > b)) begin failures++; $display("FAIL s=%0d a=%0d b=%0d", s, a, b); end
      if (a > b) n_gt++; else n_le++;
    end
    checks++;
    if (n_gt == 0 || n_le == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
