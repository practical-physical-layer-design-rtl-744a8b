// farrow_interp: piecewise-parabolic (Farrow, alpha = 1/2) insert filter of
// the Gardner loop, in multi-path pipelined form. One real channel.
//
// With u in [0,1) the output interpolates between X[k-2] (u = 0) and X[k-1]
// (u = 1):
//   a = 0.5X[k] - 0.5X[k-1] - 0.5X[k-2] + 0.5X[k-3]
//   b = -0.5X[k] + 1.5X[k-1] - 0.5X[k-2] - 0.5X[k-3]
//   Y[k] = (a*u + b)*u + X[k-2]
// The direct form is one long chain of adders and two multipliers. Here every
// adder and multiplier is followed by a register, and every path that skips
// stages gets as many extra registers as the stages it skips, so all paths
// into a node carry the same delay and the output is simply Y delayed by
// LATENCY = 8 cycles: out(n) = Y[n-8] computed with u(n-8). The register
// placement follows the pipelined filter of the link design: -0.5X product
// (1 stage), tap delays of 1,2,1,1,1 on the -0.5X line, X delays of 3 and 6
// into the output adder, u delays of 4 and 2 into the two multipliers.
// Fixed point is this design's choice: the -0.5X line is kept as -X (twice
// the value, so no bit is lost) and the sum is halved at the end; u is an
// unsigned fraction of MU_W bits; products are truncated.
// Timing: fully pipelined, one sample per enabled cycle; `en` freezes all
// registers.
module farrow_interp #(
  parameter int W    = 16,
  parameter int MU_W = 12
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic signed [W-1:0] x,
  input  logic [MU_W-1:0]     u,
  output logic signed [W-1:0] y
);
  localparam int IW = W + 4;   // internal width, holds sums of the doubled taps
  typedef logic signed [IW-1:0] s_t;

  s_t m3, d1, d2a, d2, d4, d5, d6;          // -X delay line (= 2 * -0.5X)
  s_t d12 [3];                               // X delayed by 3
  s_t d13 [6];                               // then by 6 more
  s_t add2, add8, add3, add6, add9, add4, add5, mult1, add7, mult2, add1;
  logic [MU_W-1:0] d10 [4];                  // u delayed by 4
  logic [MU_W-1:0] d11 [2];                  // then by 2 more

  function automatic s_t mul_u(input s_t v, input logic [MU_W-1:0] mu);
    logic signed [IW+MU_W:0] p;
    p = v * $signed({1'b0, mu});
    return s_t'(p >>> MU_W);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {m3, d1, d2a, d2, d4, d5, d6} <= '0;
      {add2, add8, add3, add6, add9, add4, add5, mult1, add7, mult2, add1} <= '0;
      for (int k = 0; k < 3; k++) d12[k] <= '0;
      for (int k = 0; k < 6; k++) d13[k] <= '0;
      for (int k = 0; k < 4; k++) d10[k] <= '0;
      for (int k = 0; k < 2; k++) d11[k] <= '0;
    end else if (en) begin
      // -0.5X product and its tap delay line
      m3  <= -s_t'(x);
      d1  <= m3;
      d2a <= d1;
      d2  <= d2a;
      d4  <= d2;
      d5  <= d4;
      d6  <= d5;
      // direct X path to the output adder
      d12[0] <= s_t'(x);
      for (int k = 1; k < 3; k++) d12[k] <= d12[k-1];
      d13[0] <= d12[2];
      for (int k = 1; k < 6; k++) d13[k] <= d13[k-1];
      // u paths to the two multipliers
      d10[0] <= u;
      for (int k = 1; k < 4; k++) d10[k] <= d10[k-1];
      d11[0] <= d10[3];
      d11[1] <= d11[0];
      // coefficient a (squared term)
      add2 <= d1 - m3;
      add3 <= d2 + add2;
      add9 <= add3 - d5;
      // coefficient b (linear term)
      add8 <= m3 - d1;
      add6 <= add8 + (d12[2] <<< 1);
      add4 <= d4 + add6;
      add5 <= d6 + add4;
      // Horner evaluation
      mult1 <= mul_u(add9, d10[3]);
      add7  <= mult1 + add5;
      mult2 <= mul_u(add7, d11[1]);
      add1  <= mult2 + (d13[5] <<< 1);
    end
  end

  assign y = W'(add1 >>> 1);
endmodule
