// tb_sc_rng: checks that the shared random source visits every 8-bit value exactly
// once in every window of 256 consecutive steps, that it has period 256, that it
// starts at its seed after reset, and that en = 0 holds the value.
module tb_sc_rng;
  localparam int unsigned N = 8;
  localparam int unsigned L = 1 << N;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [N-1:0] rnd;
  int checks = 0, failures = 0;
  logic [N-1:0] hist [4*L];

  sc_rng dut (.clk(clk), .rst_n(rst_n), .en(en), .rnd(rnd));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    check(rnd == '0, "reset value is the seed");
    @(posedge clk); #1;
    check(rnd == '0, "en=0 holds the value");
    en = 1'b1;
    for (int t = 0; t < 4*L; t++) begin
      hist[t] = rnd;
      @(posedge clk); #1;
    end
    for (int s = 0; s < 3*L; s += 37) begin
      bit [L-1:0] seen;
      seen = '0;
      for (int k = 0; k < L; k++) seen[hist[s+k]] = 1'b1;
      check(&seen, $sformatf("window at %0d covers all values", s));
    end
    for (int t = 0; t < 3*L; t++) check(hist[t] == hist[t+L], "period is 256");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
