// gardner_sync: non-data-aided symbol timing recovery (Gardner's algorithm).
//
// Input: one complex sample per `in_valid` at four samples per symbol (after
// the x2 upsampler). A modulo-1 counter (NCO) is decremented by W each input
// sample; W is nominally 1/2, so it underflows twice per symbol. An underflow
// at base sample m places an interpolant between x[m] and x[m+1] at the
// fraction mu = eta/W, approximated here by 2*eta. Two pipelined parabolic
// insert filters (farrow_interp, one for I and one for Q) compute that
// interpolant; the strobe travels alongside through a matching delay.
// Interpolants alternate between symbol instants and midpoints. The Gardner
// timing error detector
//   e = Re{ y_mid * conj(y[k-1] - y[k]) }
// is evaluated at each symbol strobe and drives a proportional-integral loop
// filter whose output v adjusts W = 1/2 + v. In lock the symbol strobes sit
// at the eye centres and `sym_valid` marks one symbol in `sym`.
// Gardner's detector and the insert filter follow the link design; the NCO
// form, the mu approximation, widths and loop gains (KP_SH, KI_SH as right
// shifts, in units of the top 16 bits of W) are this design's choices. The
// NCO is NCO_W = 24 bits wide, so one step of W is 0.12 ppm of the symbol
// rate: fine enough to hold the small symbol-rate error of the link (180 Hz
// at 30 Msym/s, 6 ppm) without dithering.
// Timing: symbol outputs appear about 12 cycles after the samples they come
// from.
module gardner_sync
  import apsk_pkg::*;
#(
  parameter int MU_W  = 12,
  parameter int KP_SH = 13,   // proportional gain 2^-KP_SH on e (e in LSB^2)
  parameter int KI_SH = 22,   // integral gain 2^-KI_SH
  parameter int NCO_W = 24    // NCO counter width (16 + fraction bits)
) (
  input  logic  clk,
  input  logic  rst_n,
  input  iq16_t in_s,
  input  logic  in_valid,
  output iq16_t sym,
  output logic  sym_valid,
  output logic signed [15:0] ted_err,     // last detector output (scaled)
  output logic [15:0]        nco_step     // current W (top 16 bits), 1.0 = 65536
);
  localparam int LAT = 8;                   // farrow_interp latency
  localparam int FR = NCO_W - 16;           // step bits below the 16-bit scale
  localparam logic [NCO_W:0] W_NOM = (NCO_W+1)'(1) << (NCO_W - 1); // 1/2
  localparam logic signed [31:0] V_MAX = 32'sd8192 <<< FR;          // 1/8

  logic [NCO_W-1:0] eta;
  logic [NCO_W:0]   w_step;
  logic signed [47:0] integ;        // sum of detector outputs, full precision
  logic signed [31:0] prop;
  logic [MU_W-1:0] mu_pipe [2];
  logic            stb_pipe [2];
  logic            stb_dly [LAT];
  logic [MU_W-1:0] mu_now;
  logic            under;
  logic signed [15:0] yi, yq;
  logic            phase;                   // 1: next strobe is a symbol
  iq16_t           prev_sym, mid;
  logic signed [33:0] e_full;

  // NCO: underflow when eta < W
  assign under  = ({1'b0, eta} < w_step);
  assign mu_now = eta[NCO_W-1] ? '1 : eta[NCO_W-2 -: MU_W];   // 2*eta, saturated

  farrow_interp #(.W(16), .MU_W(MU_W)) u_fi (
    .clk, .rst_n, .en(in_valid), .x(in_s.i), .u(mu_pipe[1]), .y(yi));
  farrow_interp #(.W(16), .MU_W(MU_W)) u_fq (
    .clk, .rst_n, .en(in_valid), .x(in_s.q), .u(mu_pipe[1]), .y(yq));

  always_comb begin
    logic signed [31:0] v;
    v = -(prop + 32'(integ >>> (KI_SH - FR)));
    if (v > V_MAX)       v = V_MAX;
    else if (v < -V_MAX) v = -V_MAX;
    w_step = (NCO_W+1)'(W_NOM + (NCO_W+1)'(v));
  end
  assign nco_step = w_step[NCO_W-1 -: 16];

  // Gardner detector on the current interpolant (the new symbol)
  always_comb e_full = 34'(mid.i) * (34'(prev_sym.i) - 34'(yi))
                     + 34'(mid.q) * (34'(prev_sym.q) - 34'(yq));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      eta <= '1; integ <= '0; prop <= '0; phase <= 1'b0;
      prev_sym <= '0; mid <= '0; sym <= '0; sym_valid <= 1'b0; ted_err <= '0;
      for (int k = 0; k < 2; k++) begin mu_pipe[k] <= '0; stb_pipe[k] <= 1'b0; end
      for (int k = 0; k < LAT; k++) stb_dly[k] <= 1'b0;
    end else begin
      sym_valid <= 1'b0;
      if (in_valid) begin
        eta <= eta - w_step[NCO_W-1:0];
        // the interpolant for base m needs x[m+2] at the filter input
        mu_pipe[0]  <= mu_now;
        mu_pipe[1]  <= mu_pipe[0];
        stb_pipe[0] <= under;
        stb_pipe[1] <= stb_pipe[0];
        stb_dly[0]  <= stb_pipe[1];
        for (int k = 1; k < LAT; k++) stb_dly[k] <= stb_dly[k-1];
        if (stb_dly[LAT-1]) begin
          if (phase) begin
            // symbol strobe: run the detector
            ted_err  <= 16'(e_full >>> 12);
            prop     <= 32'(e_full >>> (KP_SH - FR));
            integ    <= integ + 48'(e_full);
            prev_sym <= '{yi, yq};
            sym      <= '{yi, yq};
            sym_valid <= 1'b1;
          end else begin
            mid <= '{yi, yq};
          end
          phase <= !phase;
        end
      end
    end
  end
endmodule
