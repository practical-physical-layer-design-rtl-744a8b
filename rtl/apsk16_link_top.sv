// apsk16_link_top: digital part of a 120 Mbit/s 16APSK point-to-point link
// (30 Msym/s, 4 bits per symbol), transmitter and receiver side by side.
//
// Transmit path: six source buffers (byte_fifo) -> inner_frame_mux (priority
// filling of the 219-byte data domain) -> tx_framer (pilot, frame counter,
// data domain, RS parity) -> apsk16_mapper (one symbol per `tx_sym_en`).
// Receive path: 60 MS/s I/Q from the converter (two samples per symbol, after
// the converter's matched filter) -> halfband_upsampler (to 4 samples per
// symbol) -> gardner_sync (symbol timing) -> dagc (amplitude) -> cpr_loop
// (carrier phase) -> frame_sync (pilot search, 90-degree ambiguity) ->
// coded frame bytes out; decoded bytes in -> inner_frame_demux -> sources.
// The Reed-Solomon encoder and decoder are existing IP cores and are not part
// of this RTL: their connections are ports (`rs_msg_*`/`rs_par_*` on the
// transmit side, `rx_code_*` out and `rs_dec_*` in on the receive side). The
// RF transceiver, amplifiers and transmit pulse shaping are outside too.
// Everything runs on one clock (120 MHz in the link: the receive sample rate
// after upsampling); `tx_sym_en` and `adc_valid` are rate strobes. The chain
// follows the demodulator block diagram of the link; the single clock and all
// interface details are this design's choices.
// The `dbg_*` ports carry intermediate signals (transmit framing, timing and
// phase detector outputs, phase-corrected symbols) for an external debug
// link that sends them to a PC, as the link design does over Ethernet; that
// link itself is not part of this RTL.
// Beside the link, with its own `ex_*` ports, sits pipeline_example_fir3: the
// three-tap filter that illustrates the multi-path pipelining used in the
// timing-recovery interpolator (output 3 enabled cycles after the input).
module apsk16_link_top
  import apsk_pkg::*;
#(
  parameter int FIFO_DEPTH = 512
) (
  input  logic        clk,
  input  logic        rst_n,
  // transmit: sources (0 = fibre channel ... 5 = Ethernet 2)
  input  logic        src_wr_en   [N_SRC],
  input  logic [7:0]  src_wr_data [N_SRC],
  output logic        src_overflow[N_SRC],
  // transmit: RS encoder connection
  output logic [7:0]  rs_msg_data,
  output logic        rs_msg_valid,
  output logic        rs_msg_sof,
  input  logic [7:0]  rs_par_data,
  input  logic        rs_par_valid,
  output logic        rs_par_ready,
  // transmit: symbols to the DAC
  input  logic        tx_sym_en,
  output iq12_t       tx_sym,
  output logic        tx_sym_valid,
  output logic        tx_underrun,
  // receive: samples from the ADC
  input  iq12_t       adc_s,
  input  logic        adc_valid,
  // receive: coded frame bytes to the RS decoder
  output logic [7:0]  rx_code_data,
  output logic        rx_code_valid,
  output logic        rx_code_sof,
  output logic [7:0]  rx_code_idx,
  // receive: decoded message bytes from the RS decoder
  input  logic [7:0]  rs_dec_data,
  input  logic        rs_dec_valid,
  input  logic        rs_dec_sof,
  // receive: demultiplexed source bytes
  output logic [7:0]  rx_data,
  output logic        rx_valid,
  output logic [2:0]  rx_src,
  // status
  output logic        rx_locked,
  output logic [1:0]  rx_rotation,
  output logic [15:0] rx_lock_count,
  output logic [15:0] rx_pilot_miss_count,
  output logic [15:0] rx_agc_gain,
  output logic signed [31:0] rx_cpr_freq,
  output logic [15:0] rx_timing_step,
  output logic        rx_len_error,
  output logic [15:0] rx_cnt_gaps,
  output logic [15:0] rx_frames,
  // intermediate signals for an external debug link
  output logic        dbg_mux_busy,
  output logic        dbg_tx_sof,
  output logic [7:0]  dbg_tx_frame_cnt,
  output logic [3:0]  dbg_tx_label,
  output logic signed [15:0] dbg_ted_err,
  output iq16_t       dbg_cpr_sym,
  output logic        dbg_cpr_valid,
  output logic        dbg_cpr_inner,
  output logic signed [15:0] dbg_ped_err,
  output logic [31:0] dbg_cpr_phase,
  output logic [7:0]  dbg_rx_frame_cnt,
  // worked example of multi-path pipelining, independent of the link
  input  logic               ex_en,
  input  logic signed [15:0] ex_x,
  output logic signed [33:0] ex_y
);
  localparam int LW = $clog2(FIFO_DEPTH) + 1;

  // ---------------- transmit ----------------
  logic [LW-1:0] lvl   [N_SRC];
  logic [7:0]    head  [N_SRC];
  logic          pop   [N_SRC];
  logic          mux_start, mux_valid, mux_ready, mux_last;
  logic [7:0]    mux_data;
  logic [7:0]    fr_data;
  logic          fr_valid, fr_ready;

  for (genvar k = 0; k < N_SRC; k++) begin : g_src
    byte_fifo #(.W(8), .DEPTH(FIFO_DEPTH)) u_fifo (
      .clk, .rst_n, .wr_en(src_wr_en[k]), .wr_data(src_wr_data[k]),
      .rd_en(pop[k]), .rd_data(head[k]), .level(lvl[k]), .overflow(src_overflow[k]));
  end

  inner_frame_mux #(.LEVEL_W(LW)) u_mux (
    .clk, .rst_n, .start(mux_start), .src_level(lvl), .src_data(head), .src_pop(pop),
    .out_data(mux_data), .out_valid(mux_valid), .out_ready(mux_ready),
    .out_last(mux_last), .busy(dbg_mux_busy));

  tx_framer u_framer (
    .clk, .rst_n, .mux_start, .mux_data, .mux_valid, .mux_ready, .mux_last,
    .rs_msg_data, .rs_msg_valid, .rs_msg_sof, .rs_par_data, .rs_par_valid, .rs_par_ready,
    .out_data(fr_data), .out_valid(fr_valid), .out_ready(fr_ready), .out_sof(dbg_tx_sof),
    .frame_cnt(dbg_tx_frame_cnt));

  apsk16_mapper u_map (
    .clk, .rst_n, .sym_en(tx_sym_en), .in_data(fr_data), .in_valid(fr_valid),
    .in_ready(fr_ready), .sym(tx_sym), .sym_label(dbg_tx_label), .sym_valid(tx_sym_valid),
    .underrun(tx_underrun));

  // ---------------- receive ----------------
  iq16_t up_s, tr_s, agc_s, cpr_s;
  logic  up_v, tr_v, agc_v, cpr_v;

  assign dbg_cpr_sym   = cpr_s;
  assign dbg_cpr_valid = cpr_v;

  halfband_upsampler u_up (
    .clk, .rst_n, .in_s(adc_s), .in_valid(adc_valid), .out_s(up_s), .out_valid(up_v));

  gardner_sync u_tr (
    .clk, .rst_n, .in_s(up_s), .in_valid(up_v), .sym(tr_s), .sym_valid(tr_v),
    .ted_err(dbg_ted_err), .nco_step(rx_timing_step));

  dagc u_agc (
    .clk, .rst_n, .in_s(tr_s), .in_valid(tr_v), .out_s(agc_s), .out_valid(agc_v),
    .gain(rx_agc_gain));

  cpr_loop u_cpr (
    .clk, .rst_n, .in_s(agc_s), .in_valid(agc_v), .out_s(cpr_s), .out_valid(cpr_v),
    .out_inner(dbg_cpr_inner), .ped_err(dbg_ped_err), .phase(dbg_cpr_phase), .freq(rx_cpr_freq));

  frame_sync u_fs (
    .clk, .rst_n, .in_s(cpr_s), .in_valid(cpr_v), .out_data(rx_code_data),
    .out_valid(rx_code_valid), .out_sof(rx_code_sof), .out_idx(rx_code_idx),
    .locked(rx_locked), .rotation(rx_rotation), .lock_count(rx_lock_count),
    .pilot_miss_count(rx_pilot_miss_count));

  inner_frame_demux u_demux (
    .clk, .rst_n, .in_data(rs_dec_data), .in_valid(rs_dec_valid), .in_sof(rs_dec_sof),
    .out_data(rx_data), .out_valid(rx_valid), .out_src(rx_src), .frame_cnt(dbg_rx_frame_cnt),
    .len_error(rx_len_error), .cnt_gaps(rx_cnt_gaps), .frames(rx_frames));

  // The three-tap example of the pipelining method stands beside the link
  // with its own ports; it shares only the clock and reset.
  pipeline_example_fir3 u_ex (
    .clk, .rst_n, .en(ex_en), .x(ex_x), .y(ex_y));
endmodule
