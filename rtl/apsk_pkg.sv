// apsk_pkg: constants and types shared by the 16APSK link.
//
// Frame layout (256 bytes = 512 symbols of 4 bits): a 4-byte pilot, a 1-byte
// frame counter, a 219-byte valid data domain and 32 bytes of Reed-Solomon
// parity. The valid data domain starts with a 6-byte block length counter (one
// length byte per source) followed by the data of the six sources in priority
// order and idle fill. These sizes follow the frame description; the pilot
// value (the CCSDS attached sync marker 1ACFFC1D) and the one-byte-per-source
// reading of the length counter are this design's choices.
//
// Constellation: 4+12 APSK, inner ring of 4 points at 45+90k degrees, outer
// ring of 12 points at 15+30k degrees, outer/inner radius ratio 2.73. The
// label-to-point assignment (labels 0..11 walk the outer ring, 12..15 the
// inner ring, both counter-clockwise) is this design's own choice; it makes a
// 90 degree rotation a simple index shift (outer +3 mod 12, inner +1 mod 4).
package apsk_pkg;

  localparam int SAMPLE_W     = 12;   // converter sample width (I and Q)
  localparam int PILOT_BYTES  = 4;
  localparam int CNT_BYTES    = 1;
  localparam int DATA_BYTES   = 219;  // valid data domain
  localparam int PARITY_BYTES = 32;
  localparam int FRAME_BYTES  = PILOT_BYTES + CNT_BYTES + DATA_BYTES + PARITY_BYTES; // 256
  localparam int N_SRC        = 6;    // data sources, highest priority first
  localparam int BLC_BYTES    = N_SRC; // block length counter, one byte per source
  localparam int PAYLOAD_BYTES = DATA_BYTES - BLC_BYTES; // 213 bytes shared by the sources
  localparam logic [31:0] PILOT_WORD = 32'h1ACF_FC1D;
  localparam logic [7:0]  IDLE_BYTE  = 8'h55;

  typedef struct packed {
    logic signed [SAMPLE_W-1:0] i;
    logic signed [SAMPLE_W-1:0] q;
  } iq12_t;

  typedef struct packed {
    logic signed [15:0] i;
    logic signed [15:0] q;
  } iq16_t;

  // Transmit constellation, outer radius 1400 LSB, inner radius 1400/2.73.
  function automatic iq12_t apsk_point(input logic [3:0] s);
    iq12_t p;
    case (s)
      4'd0:  p = '{ 12'sd1352,  12'sd362 };
      4'd1:  p = '{ 12'sd990,   12'sd990 };
      4'd2:  p = '{ 12'sd362,   12'sd1352 };
      4'd3:  p = '{-12'sd362,   12'sd1352 };
      4'd4:  p = '{-12'sd990,   12'sd990 };
      4'd5:  p = '{-12'sd1352,  12'sd362 };
      4'd6:  p = '{-12'sd1352, -12'sd362 };
      4'd7:  p = '{-12'sd990,  -12'sd990 };
      4'd8:  p = '{-12'sd362,  -12'sd1352 };
      4'd9:  p = '{ 12'sd362,  -12'sd1352 };
      4'd10: p = '{ 12'sd990,  -12'sd990 };
      4'd11: p = '{ 12'sd1352, -12'sd362 };
      4'd12: p = '{ 12'sd363,   12'sd363 };
      4'd13: p = '{-12'sd363,   12'sd363 };
      4'd14: p = '{-12'sd363,  -12'sd363 };
      default: p = '{ 12'sd363, -12'sd363 };
    endcase
    return p;
  endfunction

  // Label of the point reached by rotating label s by r quarter turns
  // counter-clockwise.
  function automatic logic [3:0] rot_label(input logic [3:0] s, input logic [1:0] r);
    logic [4:0] t;
    if (s < 4'd12) begin
      t = {1'b0, s} + 5'd3 * {3'b0, r};
      if (t >= 5'd12) t = t - 5'd12;
      return t[3:0];
    end
    return {2'b11, s[1:0] + r};
  endfunction

endpackage
