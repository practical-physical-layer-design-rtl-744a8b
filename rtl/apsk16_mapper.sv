// apsk16_mapper: 16APSK symbol mapper.
//
// Takes frame bytes on a valid/ready stream and sends the high nibble, then
// the low nibble, as one symbol each on the cycles where `sym_en` is high
// (the symbol-rate strobe, 30 Msym/s in the link). Each nibble selects a
// point of the 4+12 APSK constellation of apsk_pkg (ring ratio 2.73). The
// registered outputs change one cycle after `sym_en`. If no byte is ready on
// a strobe the mapper sends the zero point and pulses `underrun`.
// The constellation shape follows the link description; the label-to-point
// assignment, the amplitude scaling and the handshake are this design's own.
module apsk16_mapper
  import apsk_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       sym_en,
  input  logic [7:0] in_data,
  input  logic       in_valid,
  output logic       in_ready,
  output iq12_t      sym,
  output logic [3:0] sym_label,
  output logic       sym_valid,
  output logic       underrun
);
  logic       half;     // 1: low nibble of `held` is pending
  logic [3:0] held;

  assign in_ready = sym_en && !half;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      half <= 1'b0; held <= '0; sym <= '0; sym_label <= '0;
      sym_valid <= 1'b0; underrun <= 1'b0;
    end else begin
      sym_valid <= sym_en;
      underrun  <= 1'b0;
      if (sym_en) begin
        if (half) begin
          sym <= apsk_point(held); sym_label <= held; half <= 1'b0;
        end else if (in_valid) begin
          sym <= apsk_point(in_data[7:4]); sym_label <= in_data[7:4];
          held <= in_data[3:0]; half <= 1'b1;
        end else begin
          sym <= '0; sym_label <= '0; underrun <= 1'b1;
        end
      end
    end
  end
endmodule
