// tx_framer: assembles the 256-byte transmit frame.
//
// Byte order of a frame: 4 pilot bytes (PILOT_WORD, most significant byte
// first), 1 frame counter byte (incremented per frame, wrapping), the 219-byte
// valid data domain pulled from the inner-frame multiplexer, and 32
// Reed-Solomon parity bytes taken from an external encoder. The frame counter
// and the data domain are also shown on `rs_msg_*` so that a systematic
// RS encoder can compute the parity over those 220 bytes. The layout follows
// the frame structure of the link; the pilot value and the split of the
// encoder interface are this design's choices (the RS codec is an existing
// IP core and is not part of this RTL).
// Interface: valid/ready byte stream out, `out_sof` on the first pilot byte.
// The multiplexer gets a one-cycle `mux_start` when the counter byte is sent.
module tx_framer
  import apsk_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  // from the inner-frame multiplexer
  output logic       mux_start,
  input  logic [7:0] mux_data,
  input  logic       mux_valid,
  output logic       mux_ready,
  input  logic       mux_last,
  // to / from the external RS encoder
  output logic [7:0] rs_msg_data,
  output logic       rs_msg_valid,
  output logic       rs_msg_sof,        // on the frame counter byte
  input  logic [7:0] rs_par_data,
  input  logic       rs_par_valid,
  output logic       rs_par_ready,
  // frame byte stream
  output logic [7:0] out_data,
  output logic       out_valid,
  input  logic       out_ready,
  output logic       out_sof,
  output logic [7:0] frame_cnt
);
  typedef enum logic [1:0] {F_PILOT, F_CNT, F_DATA, F_PAR} fstate_t;
  fstate_t    st;
  logic [5:0] idx;
  logic       fire;

  always_comb begin
    unique case (st)
      F_PILOT: begin out_data = PILOT_WORD[8*(3-int'(idx[1:0])) +: 8]; out_valid = 1'b1; end
      F_CNT:   begin out_data = frame_cnt;   out_valid = 1'b1; end
      F_DATA:  begin out_data = mux_data;    out_valid = mux_valid; end
      default: begin out_data = rs_par_data; out_valid = rs_par_valid; end
    endcase
  end
  assign fire         = out_valid && out_ready;
  assign out_sof      = (st == F_PILOT) && (idx == 6'd0);
  assign mux_ready    = (st == F_DATA) && out_ready;
  assign rs_par_ready = (st == F_PAR) && out_ready;
  assign mux_start    = (st == F_CNT) && fire;
  assign rs_msg_valid = fire && (st == F_CNT || st == F_DATA);
  assign rs_msg_data  = out_data;
  assign rs_msg_sof   = fire && (st == F_CNT);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= F_PILOT; idx <= '0; frame_cnt <= '0;
    end else if (fire) begin
      unique case (st)
        F_PILOT: begin
          idx <= idx + 1'b1;
          if (idx == 6'(PILOT_BYTES - 1)) begin idx <= '0; st <= F_CNT; end
        end
        F_CNT:  st <= F_DATA;
        F_DATA: if (mux_last) st <= F_PAR;
        default: begin
          idx <= idx + 1'b1;
          if (idx == 6'(PARITY_BYTES - 1)) begin
            idx <= '0; st <= F_PILOT; frame_cnt <= frame_cnt + 1'b1;
          end
        end
      endcase
    end
  end
endmodule
