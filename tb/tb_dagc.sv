// tb_dagc: feeds random 16APSK symbols whose amplitude is 0.4x, then 1.7x,
// the receive scale (outer ring 1024) and checks that the loop settles: the
// mean output energy over 2000 symbols is within 3% of 821588 in both cases,
// the gain ends near 1/0.4 and 1/1.7, and each output follows its input
// after one cycle with the scaling y = x*g/4096 (checked per symbol).
module tb_dagc;
  import apsk_pkg::*;
  localparam real PI = 3.14159265358979;
  logic clk = 0, rst_n = 0, in_valid = 0;
  iq16_t in_s = '0, out_s;
  logic out_valid;
  logic [15:0] gain;
  int checks = 0, failures = 0;
  real esum = 0.0;
  int  ecnt = 0;
  int  exp_i, exp_q;

  dagc dut (.clk, .rst_n, .in_s, .in_valid, .out_s, .out_valid, .gain);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(input real amp);
    int l;
    real rad, a;
    l = $urandom_range(0, 15);
    if (l < 12) begin rad = 1024.0; a = (15.0 + 30.0*l) * PI / 180.0; end
    else begin rad = 1024.0/2.73; a = (45.0 + 90.0*(l-12)) * PI / 180.0; end
    @(negedge clk);
    in_s.i = 16'($rtoi(amp*rad*$cos(a)));
    in_s.q = 16'($rtoi(amp*rad*$sin(a)));
    in_valid = 1'b1;
    exp_i = (int'(in_s.i) * int'(gain)) >>> 12;
    exp_q = (int'(in_s.q) * int'(gain)) >>> 12;
    @(negedge clk);
    in_valid = 1'b0;
    checks++;
    if (!out_valid || int'(out_s.i) != exp_i || int'(out_s.q) != exp_q) failures++;
    esum += real'(out_s.i)*out_s.i + real'(out_s.q)*out_s.q;
    ecnt++;
    @(negedge clk);
  endtask

  task automatic phase_run(input real amp);
    for (int k = 0; k < 6000; k++) send(amp);
    esum = 0.0; ecnt = 0;
    for (int k = 0; k < 2000; k++) send(amp);
    checks += 2;
    if (esum / ecnt < 0.97*821588.0 || esum / ecnt > 1.03*821588.0) begin
      failures++; $display("mean energy %f at amplitude %f", esum/ecnt, amp);
    end
    if (real'(gain)/4096.0 < 0.95/amp || real'(gain)/4096.0 > 1.05/amp) begin
      failures++; $display("gain %0d at amplitude %f", gain, amp);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    phase_run(0.4);
    phase_run(1.7);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
