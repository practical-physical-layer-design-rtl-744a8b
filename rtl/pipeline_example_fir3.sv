// pipeline_example_fir3: the three-tap filter used to explain multi-path
// pipelining, Y[k] = A*X[k] + B*X[k-1] + C*X[k-2], in its pipelined form.
//
// The direct form ends in one three-input adder. Here the adder is split in
// two and a register follows every multiplier and every adder. The path
// C*X[k-2] skips the first adder, so it gets one extra register (Z5) to stay
// aligned with A*X[k] + B*X[k-1] (Z4). All paths from X to the output then
// carry the same delay, and the output is the direct-form result delayed:
//   Z1 = A*X[k], Z2 = B*X[k-1], Z3 = C*X[k-2]   (registered products)
//   Z4 = Z1 + Z2, Z5 = Z3                       (second register stage)
//   Z6 = Z4 + Z5 = Y[k-3]                       (third register stage)
// The structure, the register names Z1..Z6 and the three-cycle delay follow
// the worked example of the method; the link's insert filter (farrow_interp)
// is built the same way. The coefficients are not given there: A, B and C
// are parameters with arbitrary defaults, and the widths are this design's
// choice. The output is full precision, 2 bits wider than a product.
// Interface: `x` with `en`; `y` = Y[k-3], where k counts enabled cycles. `en`
// freezes every register, so the delay is 3 enabled cycles.
module pipeline_example_fir3 #(
  parameter int W  = 16,              // sample width
  parameter int CW = 16,              // coefficient width
  parameter logic signed [CW-1:0] A = 16'sd3,
  parameter logic signed [CW-1:0] B = -16'sd2,
  parameter logic signed [CW-1:0] C = 16'sd5
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,
  input  logic signed [W-1:0]     x,
  output logic signed [W+CW+1:0]  y
);
  localparam int PW = W + CW;         // product width
  localparam int OW = W + CW + 2;     // output width

  logic signed [W-1:0]  x1, x2;       // X[k-1], X[k-2]
  logic signed [PW-1:0] z1, z2, z3;
  logic signed [OW-1:0] z4, z5, z6;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x1 <= '0; x2 <= '0;
      z1 <= '0; z2 <= '0; z3 <= '0;
      z4 <= '0; z5 <= '0; z6 <= '0;
    end else if (en) begin
      x1 <= x;
      x2 <= x1;
      z1 <= x  * A;
      z2 <= x1 * B;
      z3 <= x2 * C;
      z4 <= OW'(z1) + OW'(z2);
      z5 <= OW'(z3);
      z6 <= z4 + z5;
    end
  end

  assign y = z6;
endmodule
