// cpr_loop: decision-directed feedback carrier phase recovery for 16APSK.
//
// Datapath: each symbol y is rotated by the current phase estimate phi,
// z = y * exp(-j*phi), with cos/sin from sincos_lut. Only the four inner-ring
// points take part in phase detection ("constellation selection"): a symbol
// counts as inner when |z|^2 < SEL_TH, halfway between the ring radii. For
// them the fine phase detector multiplies z by the sign-conjugate of its
// ideal point, sgn(x) - j*sgn(y), and keeps the imaginary part,
//   e = y*sgn(x) - x*sgn(y)  ~  sqrt(2) * r_inner * sin(dphi),
// which needs no multiplier. A proportional-integral loop filter turns e into
// phase: the integral branch is a frequency word added to phi on every
// symbol, the proportional branch is added when an inner symbol arrives.
// The loop locks with a 90-degree ambiguity (the inner ring is 4-fold
// symmetric); frame_sync removes it using the pilot.
// Follows the link design: detection on the inner ring only, the
// sign-conjugate detector, feedback loop with loop filter and look-up table.
// This design's choices: widths, the 32-bit phase accumulator, the selection
// threshold and the gains. The detector gain is sqrt(2)*375 = 530 LSB/rad and
// about one symbol in four updates the loop. The default gains (damping about
// 0.45, noise bandwidth of some tens of kHz at 30 Msym/s) are wider than the
// 5 kHz of the original link budget: with no frequency-aided acquisition a
// narrower loop did not pull in a 60 kHz carrier offset within 40000 symbols.
// KP_SH = 11, KI_SH = 1 gives roughly the 5 kHz loop once the offset is small.
// Timing: `out_valid` two cycles after `in_valid`.
module cpr_loop
  import apsk_pkg::*;
#(
  parameter int SEL_TH = 490000,  // (700 LSB)^2, rings at 375 and 1024 LSB
  parameter int KP_SH  = 14,      // phase step = e << KP_SH (turn = 2^32)
  parameter int KI_SH  = 6        // frequency step = e << KI_SH
) (
  input  logic  clk,
  input  logic  rst_n,
  input  iq16_t in_s,
  input  logic  in_valid,
  output iq16_t out_s,
  output logic  out_valid,
  output logic  out_inner,               // symbol was used by the detector
  output logic signed [15:0] ped_err,
  output logic [31:0] phase,
  output logic signed [31:0] freq
);
  logic signed [15:0] c, s;
  iq16_t              z;
  logic               z_valid;
  logic signed [33:0] energy;
  logic               inner;
  logic signed [15:0] e;

  sincos_lut #(.PH_W(10)) u_lut (.clk, .phase(phase[31:22]), .cos_o(c), .sin_o(s));

  // derotation, registered
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      z <= '0; z_valid <= 1'b0;
    end else begin
      z_valid <= in_valid;
      if (in_valid) begin
        z.i <= 16'((32'(in_s.i) * 32'(c) + 32'(in_s.q) * 32'(s)) >>> 14);
        z.q <= 16'((32'(in_s.q) * 32'(c) - 32'(in_s.i) * 32'(s)) >>> 14);
      end
    end
  end

  // constellation selection and fine phase detector
  always_comb begin
    energy = 34'(z.i) * 34'(z.i) + 34'(z.q) * 34'(z.q);
    inner  = energy < 34'(SEL_TH);
    e      = (z.i[15] ? -z.q : z.q) - (z.q[15] ? -z.i : z.i);
  end

  // loop filter and phase accumulator
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase <= '0; freq <= '0; out_s <= '0; out_valid <= 1'b0;
      out_inner <= 1'b0; ped_err <= '0;
    end else begin
      out_valid <= z_valid;
      if (z_valid) begin
        out_s     <= z;
        out_inner <= inner;
        if (inner) begin
          ped_err <= e;
          freq    <= freq + (32'(e) <<< KI_SH);
          phase   <= phase + 32'(freq) + (32'(e) <<< KP_SH);
        end else begin
          phase   <= phase + 32'(freq);
        end
      end
    end
  end
endmodule
