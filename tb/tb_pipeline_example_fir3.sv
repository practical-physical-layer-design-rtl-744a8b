// tb_pipeline_example_fir3: checks the pipelined three-tap filter against the
// direct-form equation Y[k] = A*X[k] + B*X[k-1] + C*X[k-2], computed here
// from a history of the inputs, with the output expected exactly three
// enabled cycles later. Inputs are random full-scale values, including the
// extremes, and `en` is dropped at random to check that the pipeline holds.
// Non-default coefficients are used so that each tap is distinct and large.
module tb_pipeline_example_fir3;
  localparam int W = 16, CW = 16, OW = W + CW + 2;
  localparam logic signed [CW-1:0] A = -16'sd32768, B = 16'sd12345, C = -16'sd777;
  localparam int N = 5000;

  logic clk = 0, rst_n = 0, en = 0;
  logic signed [W-1:0]  x = '0;
  logic signed [OW-1:0] y;
  int checks = 0, failures = 0;

  pipeline_example_fir3 #(.W(W), .CW(CW), .A(A), .B(B), .C(C)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint hist [$];   // inputs of enabled cycles, newest last
  longint expq [$];   // expected outputs

  initial begin
    int n = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    while (n < N) begin
      @(negedge clk);
      en = ($urandom_range(0, 3) != 0);
      case ($urandom_range(0, 9))
        0: x = 16'sh7fff;
        1: x = -16'sh8000;
        default: x = W'($urandom);
      endcase
      @(posedge clk);
      if (en) begin
        longint e;
        hist.push_back(longint'(x));
        if (hist.size() > 3) void'(hist.pop_front());
        e = longint'(A) * hist[hist.size()-1];
        if (hist.size() > 1) e += longint'(B) * hist[hist.size()-2];
        if (hist.size() > 2) e += longint'(C) * hist[hist.size()-3];
        expq.push_back(e);
        n++;
      end
      #1;
      // while X[k] is presented the output is Y[k-3]; once X[k] has been
      // taken it is Y[k-2]
      if (en && expq.size() > 2) begin
        longint e;
        e = expq[expq.size()-3];
        checks++;
        if (longint'(y) != e) begin
          failures++;
          if (failures < 10) $display("mismatch at %0d: got %0d expected %0d", n, y, e);
        end
      end
      if (expq.size() > 8) void'(expq.pop_front());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
