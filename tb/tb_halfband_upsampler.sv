// tb_halfband_upsampler: feeds random I/Q samples every second cycle and
// compares the output stream with a reference convolution of the
// zero-stuffed input with h = [3 0 -25 0 150 256 150 0 -25 0 3]/256
// (floored after the division, as the filter does). Also checks the rate:
// two outputs per input, the first one cycle after the input.
module tb_halfband_upsampler;
  import apsk_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0;
  iq12_t in_s = '0;
  iq16_t out_s;
  logic out_valid;
  int checks = 0, failures = 0;
  int xi [$];
  int xq [$];
  int m = 0;                // output index
  int h [11] = '{3, 0, -25, 0, 150, 256, 150, 0, -25, 0, 3};

  halfband_upsampler dut (.clk, .rst_n, .in_s, .in_valid, .out_s, .out_valid);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_out(int idx, ref int xv [$]);
    int acc;
    acc = 0;
    for (int k = 0; k < 11; k++) begin
      int s;
      s = idx - k;
      if (s >= 0 && s % 2 == 0 && s / 2 < xv.size()) acc += h[k] * xv[s/2];
    end
    return acc >>> 8;
  endfunction

  always @(posedge clk) if (rst_n && out_valid) begin
    checks += 2;
    if (int'(out_s.i) != ref_out(m, xi)) begin
      failures++;
      if (failures < 10) $display("I mismatch m=%0d got %0d exp %0d", m, out_s.i, ref_out(m, xi));
    end
    if (int'(out_s.q) != ref_out(m, xq)) failures++;
    m++;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int t = 0; t < 2000; t++) begin
      in_s.i   <= 12'($urandom_range(0, 4000) - 2000);
      in_s.q   <= 12'($urandom_range(0, 4000) - 2000);
      in_valid <= 1'b1;
      @(posedge clk);
      xi.push_back(int'(in_s.i)); xq.push_back(int'(in_s.q));
      in_valid <= 1'b0;
      @(posedge clk);
    end
    repeat (4) @(posedge clk);
    checks++;
    if (m != 4000) begin failures++; $display("output count %0d", m); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
