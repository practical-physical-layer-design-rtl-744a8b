// dagc: feed-back digital automatic gain control on the symbol stream.
//
// Each symbol is scaled by a gain g (unsigned, 4 integer and 12 fraction
// bits): y = x*g. The loop compares the output energy |y|^2 with the target
// mean symbol energy E_REF and integrates the difference into g:
//   g <= g + (E_REF - |y|^2) >>> MU_SH
// so that on average |y|^2 settles at E_REF. E_REF defaults to the mean energy
// of the 4+12 APSK constellation with outer radius 1024 and ring ratio 2.73,
// (12*1024^2 + 4*375^2)/16 = 821588, which puts the outer ring at 1024 LSB
// for the phase and frame logic downstream. The feedback structure is the
// link's; the error law, the gain format and step size are this design's.
// Timing: `out_valid` one cycle after `in_valid`; g updates on that output.
module dagc
  import apsk_pkg::*;
#(
  parameter int E_REF  = 821588,
  parameter int MU_SH  = 14,
  parameter logic [15:0] G_INIT = 16'd4096   // 1.0
) (
  input  logic  clk,
  input  logic  rst_n,
  input  iq16_t in_s,
  input  logic  in_valid,
  output iq16_t out_s,
  output logic  out_valid,
  output logic [15:0] gain
);
  function automatic logic signed [15:0] scale_sat(input logic signed [15:0] v, input logic [15:0] g);
    logic signed [32:0] p;
    p = (33'(v) * $signed({1'b0, g})) >>> 12;
    if (p > 33'sd32767)       return 16'sh7FFF;
    else if (p < -33'sd32768) return 16'sh8000;
    return 16'(p);
  endfunction

  logic signed [33:0] err;

  always_comb err = 34'(E_REF) - (34'(out_s.i) * 34'(out_s.i) + 34'(out_s.q) * 34'(out_s.q));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_s <= '0; out_valid <= 1'b0; gain <= G_INIT;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_s.i <= scale_sat(in_s.i, gain);
        out_s.q <= scale_sat(in_s.q, gain);
      end
      if (out_valid) begin
        logic signed [33:0] g_next;
        g_next = $signed(34'(gain)) + (err >>> MU_SH);
        if (g_next < 34'sd16)         gain <= 16'd16;
        else if (g_next > 34'sd65535) gain <= 16'hFFFF;
        else                          gain <= 16'(g_next);
      end
    end
  end
endmodule
