// tb_cpr_loop: random 16APSK symbols on the receive scale with a phase offset
// of 25 degrees, a carrier frequency offset of 60 kHz at 30 Msym/s
// (0.72 degrees per symbol) and a little noise go through the loop with its
// default gains. After 40000 symbols the last 4000 outputs must lie within
// 4 degrees of an ideal point (the constellation maps onto itself under a
// quarter turn, the loop's inherent ambiguity), and the frequency word must
// match the offset within 5%. It also checks that about a quarter of the
// symbols are selected as inner-ring symbols and that the detector output has
// the sign of a small positive residual rotation.
module tb_cpr_loop;
  import apsk_pkg::*;
  localparam real PI = 3.14159265358979;
  localparam real DF = 60.0e3 / 30.0e6;        // cycles per symbol
  logic clk = 0, rst_n = 0, in_valid = 0;
  iq16_t in_s = '0, out_s;
  logic out_valid, out_inner;
  logic signed [15:0] ped_err;
  logic [31:0] phase;
  logic signed [31:0] freq;
  int checks = 0, failures = 0;
  int n_inner = 0, n_out = 0;
  real worst = 0.0;
  bit measure = 0;

  cpr_loop dut (.clk, .rst_n, .in_s, .in_valid, .out_s, .out_valid, .out_inner,
                .ped_err, .phase, .freq);

  always #5 clk = ~clk;

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void ideal(input int l, output real xi, output real xq);
    real rad, a;
    if (l < 12) begin rad = 1024.0; a = (15.0 + 30.0*l) * PI / 180.0; end
    else begin rad = 1024.0/2.73; a = (45.0 + 90.0*(l-12)) * PI / 180.0; end
    xi = rad*$cos(a); xq = rad*$sin(a);
  endfunction

  // angle error of an output to the nearest ideal point, and the rotation
  always @(posedge clk) if (out_valid && measure) begin
    real best, bi, bq, xi, xq, d, ang;
    int bl;
    best = 1.0e12; bl = 0;
    for (int r = 0; r < 4; r++)
      for (int l = 0; l < 16; l++) begin
        real c, s;
        ideal(l, xi, xq);
        c = $cos(r*PI/2.0); s = $sin(r*PI/2.0);
        bi = xi*c - xq*s; bq = xi*s + xq*c;
        d = (out_s.i - bi)*(out_s.i - bi) + (out_s.q - bq)*(out_s.q - bq);
        if (d < best) begin best = d; bl = r; end
      end
    ang = $sqrt(best) / ((out_inner ? 1024.0/2.73 : 1024.0)) * 180.0 / PI;
    if (ang > worst) worst = ang;
    checks++;
    if (ang > 4.0) failures++;
    n_out++;
    if (out_inner) n_inner++;
  end

  initial begin
    real ph;
    int l;
    ph = 25.0 / 360.0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 40000; k++) begin
      real xi, xq, c, s;
      if (k == 36000) measure = 1;
      l = $urandom_range(0, 15);
      ideal(l, xi, xq);
      c = $cos(2.0*PI*ph); s = $sin(2.0*PI*ph);
      @(negedge clk);
      in_s.i = 16'($rtoi(xi*c - xq*s) + $urandom_range(0, 20) - 10);
      in_s.q = 16'($rtoi(xi*s + xq*c) + $urandom_range(0, 20) - 10);
      in_valid = 1'b1;
      @(negedge clk);
      in_valid = 1'b0;
      repeat (2) @(negedge clk);
      ph += DF;
      if (ph >= 1.0) ph -= 1.0;
    end
    repeat (4) @(negedge clk);
    checks += 2;
    if (real'(freq) < 0.95*DF*4294967296.0 || real'(freq) > 1.05*DF*4294967296.0) begin
      failures++; $display("frequency word %0d, expected %f", freq, DF*4294967296.0);
    end
    if (n_inner < n_out/6 || n_inner > n_out/3) failures++;
    $display("worst angle error %f deg over %0d symbols, inner %0d", worst, n_out, n_inner);
    // detector sign: an inner point turned by +5 degrees gives a positive error
    measure = 0;
    rst_n = 0; @(negedge clk); rst_n = 1;
    @(negedge clk);
    in_s.i = 16'($rtoi(375.0*$cos(50.0*PI/180.0)));
    in_s.q = 16'($rtoi(375.0*$sin(50.0*PI/180.0)));
    in_valid = 1'b1;
    @(negedge clk); in_valid = 1'b0;
    repeat (3) @(negedge clk);
    checks++;
    // sqrt(2) * 375 * sin(5 deg) = 46
    if (ped_err < 40 || ped_err > 52) begin failures++; $display("ped_err %0d", ped_err); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
