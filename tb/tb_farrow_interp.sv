// tb_farrow_interp: checks the pipelined parabolic interpolator against the
// direct-form equation
//   Y[k] = (a*u + b)*u + X[k-2],
//   a = 0.5X[k] - 0.5X[k-1] - 0.5X[k-2] + 0.5X[k-3],
//   b = -0.5X[k] + 1.5X[k-1] - 0.5X[k-2] - 0.5X[k-3],
// evaluated in real arithmetic, for random samples and fractions, with the
// enable dropped at random. The output for the sample entered n enables ago
// must appear after exactly 8 enabled cycles (the pipeline latency) and be
// within 2 LSB of the real-valued result (truncation in the two products).
// It also checks the end points: u = 0 gives X[k-2] exactly.
module tb_farrow_interp;
  localparam int W = 16, MU_W = 12, LAT = 8;
  logic clk = 0, rst_n = 0, en = 0;
  logic signed [W-1:0] x = 0, y;
  logic [MU_W-1:0] u = 0;
  int checks = 0, failures = 0;
  int xs [$];
  int us [$];

  farrow_interp #(.W(W), .MU_W(MU_W)) dut (.clk, .rst_n, .en, .x, .u, .y);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real yref(int j);
    real a, b, uu;
    a  = 0.5*xs[j] - 0.5*xs[j-1] - 0.5*xs[j-2] + 0.5*xs[j-3];
    b  = -0.5*xs[j] + 1.5*xs[j-1] - 0.5*xs[j-2] - 0.5*xs[j-3];
    uu = real'(us[j]) / real'(1 << MU_W);
    return (a*uu + b)*uu + xs[j-2];
  endfunction

  initial begin
    int n;
    n = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 6000; t++) begin
      en = ($urandom_range(0, 3) != 0);
      x  = W'($signed($urandom_range(0, 40000)) - 20000);
      u  = (t % 97 == 5) ? '0 : MU_W'($urandom);
      if (en) begin xs.push_back(int'(x)); us.push_back(int'(u)); end
      @(posedge clk);
      #1;
      if (en) begin
        n++;
        // after n enabled samples the output shows Y[n-1-LAT+1] = Y[n-LAT]
        if (n - LAT >= 3) begin
          int j;
          real r, d;
          j = n - LAT;
          r = yref(j);
          d = real'(y) - r;
          checks++;
          if (d > 2.0 || d < -2.0) begin
            failures++;
            if (failures < 10) $display("mismatch j=%0d y=%0d ref=%f", j, y, r);
          end
          if (us[j] == 0) begin
            checks++;
            if (int'(y) != xs[j-2]) failures++;
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
