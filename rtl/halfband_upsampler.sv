// halfband_upsampler: x2 interpolator in front of the Gardner loop.
//
// The converter delivers I/Q at 60 MS/s, only two samples per symbol; the
// timing loop wants four. Each input sample is followed by a zero and the
// result is filtered by the 11-tap half-band low-pass
//   h = [3 0 -25 0 150 256 150 0 -25 0 3] / 256
// (every second tap zero except the centre). In polyphase form, for input x[n]
//   y[2n]   = (3x[n] - 25x[n-1] + 150x[n-2] + 150x[n-3] - 25x[n-4] + 3x[n-5]) / 256
//   y[2n+1] = x[n-2]
// so only the even phase needs arithmetic; both phases have unity DC gain.
// Timing: for an input accepted in cycle t the two outputs appear with
// `out_valid` in cycles t+1 and t+2, so inputs every second cycle give a
// continuous output stream. The x2 ratio and the half-band type follow the
// link description; the tap values are this design's own choice.
module halfband_upsampler
  import apsk_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  iq12_t in_s,
  input  logic  in_valid,
  output iq16_t out_s,
  output logic  out_valid
);
  iq12_t      x [6];
  iq16_t      odd_hold;
  logic       odd_pend;

  function automatic logic signed [15:0] even_phase(input logic signed [11:0] a0, a1, a2, a3, a4, a5);
    logic signed [23:0] acc;
    acc = 24'sd3 * (24'(a0) + 24'(a5)) - 24'sd25 * (24'(a1) + 24'(a4)) + 24'sd150 * (24'(a2) + 24'(a3));
    return 16'(acc >>> 8);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < 6; k++) x[k] <= '0;
      out_s <= '0; out_valid <= 1'b0; odd_hold <= '0; odd_pend <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (odd_pend) begin
        out_s <= odd_hold; out_valid <= 1'b1; odd_pend <= 1'b0;
      end
      if (in_valid) begin
        x[0] <= in_s;
        for (int k = 1; k < 6; k++) x[k] <= x[k-1];
        out_s.i   <= even_phase(in_s.i, x[0].i, x[1].i, x[2].i, x[3].i, x[4].i);
        out_s.q   <= even_phase(in_s.q, x[0].q, x[1].q, x[2].q, x[3].q, x[4].q);
        out_valid <= 1'b1;
        odd_hold  <= '{16'(x[1].i), 16'(x[1].q)};
        odd_pend  <= 1'b1;
      end
    end
  end
endmodule
