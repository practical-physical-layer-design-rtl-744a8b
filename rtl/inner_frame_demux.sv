// inner_frame_demux: receive side of the inner-frame multiplexing.
//
// Takes the 220 message bytes of a decoded frame (frame counter, then the
// 219-byte valid data domain; `in_sof` on the counter byte) and sends each
// payload byte to the source it belongs to. The first 6 bytes of the domain
// are the block length counter, one length per source in priority order;
// the payload that follows is split accordingly and the rest is idle fill,
// which is dropped. A length table adding up to more than 213 bytes marks the
// frame bad (`len_error`) and its payload is dropped. A frame counter that
// does not follow the previous one is counted in `cnt_gaps`.
// Field order and sizes follow the frame description; the error handling is
// this design's own.
// Timing: `out_valid`/`out_src`/`out_data` are registered, one cycle after the
// input byte.
module inner_frame_demux
  import apsk_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] in_data,
  input  logic       in_valid,
  input  logic       in_sof,
  output logic [7:0] out_data,
  output logic       out_valid,
  output logic [2:0] out_src,
  output logic [7:0] frame_cnt,
  output logic       len_error,
  output logic [15:0] cnt_gaps,
  output logic [15:0] frames
);
  logic [7:0] pos;           // 0 = counter byte, 1..219 = data domain
  logic [7:0] len [N_SRC];
  logic [7:0] left;
  logic [2:0] src;
  logic       active, bad, have_cnt;
  logic [8:0] len_sum;

  always_comb begin
    len_sum = '0;
    for (int k = 0; k < N_SRC - 1; k++) len_sum = len_sum + 9'(len[k]);
    len_sum = len_sum + 9'(in_data);    // last length arrives now
  end

  function automatic logic [2:0] next_src(input logic [7:0] l [N_SRC], input int from);
    for (int k = 0; k < N_SRC; k++)
      if (k >= from && l[k] != 8'd0) return 3'(k);
    return 3'(N_SRC);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pos <= '0; left <= '0; src <= '0; active <= 1'b0; bad <= 1'b0; have_cnt <= 1'b0;
      out_data <= '0; out_valid <= 1'b0; out_src <= '0; frame_cnt <= '0;
      len_error <= 1'b0; cnt_gaps <= '0; frames <= '0;
      for (int k = 0; k < N_SRC; k++) len[k] <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid && in_sof) begin
        if (have_cnt && in_data != frame_cnt + 1'b1) cnt_gaps <= cnt_gaps + 1'b1;
        frame_cnt <= in_data; have_cnt <= 1'b1;
        frames <= frames + 1'b1;
        pos <= 8'd1; active <= 1'b1; bad <= 1'b0; src <= 3'(N_SRC);
      end else if (in_valid && active) begin
        pos <= pos + 1'b1;
        if (pos == 8'(DATA_BYTES)) active <= 1'b0;
        if (pos <= 8'(BLC_BYTES)) begin
          len[3'(pos - 1'b1)] <= in_data;
          if (pos == 8'(BLC_BYTES)) begin
            if (len_sum > 9'(PAYLOAD_BYTES)) begin
              bad <= 1'b1; len_error <= 1'b1;
            end else begin
              len_error <= 1'b0;
              begin
                logic [7:0] l [N_SRC];
                for (int k = 0; k < N_SRC - 1; k++) l[k] = len[k];
                l[N_SRC-1] = in_data;
                src  <= next_src(l, 0);
                if (next_src(l, 0) != 3'(N_SRC)) left <= l[next_src(l, 0)];
              end
            end
          end
        end else if (!bad && src != 3'(N_SRC)) begin
          out_data  <= in_data;
          out_src   <= src;
          out_valid <= 1'b1;
          if (left == 8'd1) begin
            src <= next_src(len, int'(src) + 1);
            if (next_src(len, int'(src) + 1) != 3'(N_SRC)) left <= len[next_src(len, int'(src) + 1)];
          end else begin
            left <= left - 1'b1;
          end
        end
      end
    end
  end
endmodule
