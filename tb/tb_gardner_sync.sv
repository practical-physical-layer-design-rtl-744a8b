// tb_gardner_sync: builds a 16APSK signal at four samples per symbol with a
// raised-cosine pulse (roll-off 0.43, the overall response of transmit and
// matched filtering), a fractional timing offset of 0.3 symbol and a symbol
// clock 200 ppm off the nominal rate, and runs the loop on it. After
// 30000 symbols each recovered symbol must lie within 8% of the outer radius
// of an ideal point, and the loop must deliver one symbol per 4 input samples
// on average (counted over the last 8000 symbols, +-0.1%).
module tb_gardner_sync;
  import apsk_pkg::*;
  localparam real PI = 3.14159265358979;
  localparam real ALPHA = 0.43;
  localparam int  SPAN = 8;
  localparam real R_OUT = 1000.0;
  logic clk = 0, rst_n = 0, in_valid = 0;
  iq16_t in_s = '0, sym;
  logic sym_valid;
  logic signed [15:0] ted_err;
  logic [15:0] nco_step;
  int checks = 0, failures = 0;
  real worst = 0.0;
  int n_sym = 0, n_meas = 0;
  bit measure = 0;
  real ai [int];
  real aq [int];

  gardner_sync dut (.clk, .rst_n, .in_s, .in_valid, .sym, .sym_valid, .ted_err, .nco_step);

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real rc(real t);
    real d;
    if (t > -1.0e-9 && t < 1.0e-9) return 1.0;
    d = 1.0 - (2.0*ALPHA*t)*(2.0*ALPHA*t);
    if (d > -1.0e-6 && d < 1.0e-6) return (PI/4.0) * $sin(PI*t)/(PI*t);
    return $sin(PI*t)/(PI*t) * $cos(PI*ALPHA*t) / d;
  endfunction

  function automatic void point(input int l, output real xi, output real xq);
    real rad, a;
    if (l < 12) begin rad = R_OUT; a = (15.0 + 30.0*l) * PI / 180.0; end
    else begin rad = R_OUT/2.73; a = (45.0 + 90.0*(l-12)) * PI / 180.0; end
    xi = rad*$cos(a); xq = rad*$sin(a);
  endfunction

  always @(posedge clk) if (sym_valid) begin
    real best;
    n_sym++;
    if (measure) begin
      best = 1.0e12;
      for (int l = 0; l < 16; l++) begin
        real xi, xq, d;
        point(l, xi, xq);
        d = (sym.i - xi)*(sym.i - xi) + (sym.q - xq)*(sym.q - xq);
        if (d < best) best = d;
      end
      best = $sqrt(best) / R_OUT;
      if (best > worst) worst = best;
      checks++;
      if (best > 0.08) failures++;
      n_meas++;
    end
  end

  initial begin
    real tsym;            // time in symbols of the current sample
    int  nsamp, n0;
    tsym = 0.3;
    nsamp = 0;
    for (int k = -SPAN - 2; k < 40000; k++) begin
      real xi, xq;
      point($urandom_range(0, 15), xi, xq);
      ai[k] = xi; aq[k] = xq;
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    n0 = 0;
    while (tsym < 38000.0) begin
      real si, sq;
      int kc;
      si = 0.0; sq = 0.0;
      kc = $rtoi(tsym);
      for (int k = kc - SPAN; k <= kc + SPAN; k++) begin
        real p;
        p = rc(tsym - k);
        si += ai[k] * p; sq += aq[k] * p;
      end
      @(negedge clk);
      in_s.i = 16'($rtoi(si));
      in_s.q = 16'($rtoi(sq));
      in_valid = 1'b1;
      nsamp++;
      tsym += 0.25 * (1.0 + 200.0e-6);
      if (tsym >= 30000.0 && !measure) begin measure = 1; n0 = n_sym; nsamp = 0; end
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (20) @(negedge clk);
    checks++;
    begin
      real ratio;
      ratio = real'(n_sym - n0) / (real'(nsamp) / 4.0);
      if (ratio < 0.999 + 200.0e-6 - 0.001 || ratio > 1.001 + 200.0e-6) begin
        failures++; $display("symbol rate ratio %f", ratio);
      end
    end
    $display("worst distance %f of the outer radius over %0d symbols", worst, n_meas);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
