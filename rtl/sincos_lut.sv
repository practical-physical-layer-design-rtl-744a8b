// sincos_lut: registered cosine/sine look-up table of the carrier loop.
//
// The phase is a PH_W-bit fraction of a full turn. The table holds one
// quarter wave of sine (2^(PH_W-2) entries + 1, amplitude 2^14) and the
// other quadrants are formed by symmetry. Table entries are computed at
// elaboration from a 9th-order Taylor series of sin(x) on [0, pi/2] in
// 64-bit integer arithmetic (error below one LSB), so no data file is needed.
// Interface: `phase` in, `cos_o`/`sin_o` out as signed 16-bit values scaled
// by 2^14. The look-up table in the carrier loop is part of the link design;
// its size, amplitude and the way it is filled are this design's choices.
// Timing: one cycle from `phase` to `cos_o`/`sin_o`.
module sincos_lut #(
  parameter int PH_W = 10
) (
  input  logic                clk,
  input  logic [PH_W-1:0]     phase,
  output logic signed [15:0]  cos_o,
  output logic signed [15:0]  sin_o
);
  localparam int Q  = 1 << (PH_W - 2);     // entries per quarter
  localparam longint ONE = 64'sd1 << 30;   // fixed-point 1.0 for the series
  localparam longint PI_HALF = 64'sd1686629713; // pi/2 * 2^30

  typedef logic [14:0] tab_t [Q+1];

  function automatic tab_t make_tab();
    tab_t t;
    for (int k = 0; k <= Q; k++) begin
      longint x, x2, term, s;
      x    = (PI_HALF * longint'(k)) / longint'(Q);
      x2   = (x * x) >>> 30;
      term = x;
      s    = x;
      for (int n = 1; n <= 4; n++) begin
        term = -((term * x2) >>> 30) / longint'((2*n) * (2*n + 1));
        s    = s + term;
      end
      s = (s + (ONE >>> 15)) >>> 16;        // round to 2^14 scale
      t[k] = (s > 16384) ? 15'd16384 : 15'(s);
    end
    return t;
  endfunction

  localparam tab_t TAB = make_tab();

  function automatic logic signed [15:0] sin_of(input logic [PH_W-1:0] p);
    logic [PH_W-3:0] off;
    logic [14:0]     mag;
    off = p[PH_W-3:0];
    mag = p[PH_W-2] ? TAB[Q - int'(off)] : TAB[int'(off)];
    return p[PH_W-1] ? -$signed({1'b0, mag}) : $signed({1'b0, mag});
  endfunction

  always_ff @(posedge clk) begin
    sin_o <= sin_of(phase);
    cos_o <= sin_of(phase + PH_W'(Q));
  end
endmodule
