// tb_link_ser: symbol error rate of the complete link at its default
// parameters, at Es/N0 = 21, 20, 19 and 18 dB (the range over which the
// link's demodulation loss is quoted).
//
// One source (fibre channel) writes a random byte every 8 cycles, more than
// a frame can carry, so every payload is random data; the RS encoder is
// replaced by random parity bytes. The channel is the one of the end-to-end
// test (raised-cosine pulse with roll-off 0.43, 2 samples per symbol, timing
// offset 0.37 symbol, clock 50 ppm slow, 60 kHz carrier offset, gain 0.6)
// plus white Gaussian noise on every sample, scaled so that at the symbol
// instants Es/N0 has the wanted value. The first ACQ frames run at 30 dB so
// that the loops acquire; then each Es/N0 point lasts PT frames.
//
// Symbol errors of the receiver are counted by comparing each received coded
// byte (the 252 bytes after the pilot) nibble by nibble with the byte sent.
// Frames are matched by the frame counter when the receiver (re)locks and by
// position while it stays locked. As a reference, every transmitted symbol is
// also given independent noise at the same Es/N0 and at 1 dB less and sliced
// to the nearest point with perfect timing, phase and gain (the ideal
// receiver). Checks:
//  - each point measures at least 80% of its symbols (lock is kept);
//  - the receiver's errors summed over all points are no more than the ideal
//    receiver's at 1 dB less Es/N0 (implementation loss below 1 dB);
//  - the SER at 18 dB is below 1e-2.
module tb_link_ser;
  import apsk_pkg::*;
  localparam real PI = 3.14159265358979;
  localparam real ALPHA = 0.43;
  localparam real GAIN = 0.6;
  localparam int  SPAN = 8;
  localparam int  ACQ = 100;                // frames at high SNR to acquire
  localparam int  PT  = 60;                 // frames per Es/N0 point
  localparam int  NP  = 4;
  localparam real SNR_DB [NP] = '{21.0, 20.0, 19.0, 18.0};
  localparam int  N_FRAMES = ACQ + NP * PT + 4;

  logic clk = 0, rst_n = 0;
  logic src_wr_en [N_SRC];
  logic [7:0] src_wr_data [N_SRC];
  logic src_overflow [N_SRC];
  logic [7:0] rs_msg_data, rs_par_data = '0;
  logic rs_msg_valid, rs_msg_sof, rs_par_valid, rs_par_ready;
  logic tx_sym_en = 0;
  iq12_t tx_sym, adc_s = '0;
  logic tx_sym_valid, tx_underrun, adc_valid = 0;
  logic [7:0] rx_code_data, rx_code_idx, rs_dec_data, rx_data;
  logic rx_code_valid, rx_code_sof, rs_dec_valid, rs_dec_sof, rx_valid;
  logic [2:0] rx_src;
  logic rx_locked;
  logic [1:0] rx_rotation;
  logic [15:0] rx_lock_count, rx_pilot_miss_count, rx_agc_gain, rx_timing_step, rx_cnt_gaps, rx_frames;
  logic signed [31:0] rx_cpr_freq;
  logic rx_len_error;
  logic ex_en = 0;
  logic signed [15:0] ex_x = '0;
  logic signed [33:0] ex_y;

  logic dbg_mux_busy, dbg_tx_sof, dbg_cpr_valid, dbg_cpr_inner;
  logic [7:0] dbg_tx_frame_cnt, dbg_rx_frame_cnt;
  logic [3:0] dbg_tx_label;
  logic signed [15:0] dbg_ted_err, dbg_ped_err;
  iq16_t dbg_cpr_sym;
  logic [31:0] dbg_cpr_phase;

  apsk16_link_top dut (.*);

  int checks = 0, failures = 0;
  always #4 clk = ~clk;

  initial begin
    repeat (N_FRAMES * 2048 + 200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Es/N0 point of a frame: -1 while acquiring, then 0..NP-1, NP after
  function automatic int point_of(int frame);
    if (frame < ACQ) return -1;
    return (frame - ACQ) / PT;
  endfunction
  function automatic real snr_of(int frame);
    int p = point_of(frame);
    if (p < 0 || p >= NP) return 30.0;
    return SNR_DB[p];
  endfunction

  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom) + 1.0) / 4294967297.0;
    u2 = real'($urandom) / 4294967296.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(2.0 * PI * u2);
  endfunction

  // mean symbol energy at the receiver (before noise)
  real es_rx;
  initial begin
    es_rx = 0.0;
    for (int s = 0; s < 16; s++) begin
      iq12_t p = apsk_point(4'(s));
      es_rx += (real'(p.i) * real'(p.i) + real'(p.q) * real'(p.q)) / 16.0;
    end
    es_rx *= GAIN * GAIN;
  end
  function automatic real sigma_of(real snr_db);
    return $sqrt(es_rx / (2.0 * (10.0 ** (snr_db / 10.0))));
  endfunction

  // ---------------- source, parity and transmit log ----------------
  int cyc = 0;
  always @(negedge clk) begin
    cyc++;
    for (int s = 0; s < N_SRC; s++) begin
      src_wr_en[s] = rst_n && (s == 0) && (cyc % 8 == 0);
      src_wr_data[s] = 8'($urandom);
    end
  end

  int tx_code [$][$];           // coded bytes (counter .. parity) per frame
  assign rs_par_valid = 1'b1;
  always @(posedge clk) begin
    if (rs_msg_valid) begin
      if (rs_msg_sof) begin
        int empty [$];
        tx_code.push_back(empty);
      end
      tx_code[tx_code.size()-1].push_back(int'(rs_msg_data));
    end
    if (rs_par_valid && rs_par_ready) begin
      tx_code[tx_code.size()-1].push_back(int'(rs_par_data));
      rs_par_data <= 8'($urandom);
    end
  end

  // ---------------- channel and ideal receiver ----------------
  real ai [$];
  real aq [$];
  int  g_err [NP], g_err_lo [NP], g_sym [NP];
  int  tx_phase = 0;

  // nearest constellation point (at receive scale) to (x, y)
  function automatic int slice(real x, real y);
    real best, d;
    int bs;
    best = 1.0e30; bs = 0;
    for (int s = 0; s < 16; s++) begin
      iq12_t p = apsk_point(4'(s));
      d = (x - GAIN * real'(p.i)) ** 2 + (y - GAIN * real'(p.q)) ** 2;
      if (d < best) begin best = d; bs = s; end
    end
    return bs;
  endfunction

  always @(posedge clk) begin
    tx_phase <= (tx_phase + 1) % 4;
    tx_sym_en <= (tx_phase == 3) && rst_n;
    if (tx_sym_valid) begin
      int n, p, s0;
      real xi, xq, sg;
      ai.push_back(real'(tx_sym.i));
      aq.push_back(real'(tx_sym.q));
      n = ai.size() - 1;
      p = point_of(n / 512);
      if (p >= 0 && p < NP) begin
        xi = GAIN * ai[n]; xq = GAIN * aq[n];
        s0 = slice(xi, xq);
        g_sym[p]++;
        sg = sigma_of(SNR_DB[p]);
        if (slice(xi + sg * gauss(), xq + sg * gauss()) != s0) g_err[p]++;
        sg = sigma_of(SNR_DB[p] - 1.0);
        if (slice(xi + sg * gauss(), xq + sg * gauss()) != s0) g_err_lo[p]++;
      end
    end
  end

  function automatic real rc(real t);
    real d;
    if (t > -1.0e-9 && t < 1.0e-9) return 1.0;
    d = 1.0 - (2.0*ALPHA*t)*(2.0*ALPHA*t);
    if (d > -1.0e-6 && d < 1.0e-6) return (PI/4.0) * $sin(PI*t)/(PI*t);
    return $sin(PI*t)/(PI*t) * $cos(PI*ALPHA*t) / d;
  endfunction

  real tsym = 0.37 + SPAN;      // receive time in symbols
  real cph = 30.0 / 360.0;      // carrier phase in turns
  int  adc_phase = 0;
  always @(negedge clk) begin
    adc_valid = 1'b0;
    adc_phase = (adc_phase + 1) % 2;
    if (rst_n && adc_phase == 0 && $rtoi(tsym) + SPAN + 1 < ai.size()) begin
      real si, sq, c, s, sg;
      int kc;
      si = 0.0; sq = 0.0;
      kc = $rtoi(tsym);
      for (int k = kc - SPAN; k <= kc + SPAN; k++) begin
        real p;
        p = rc(tsym - k);
        si += ai[k] * p; sq += aq[k] * p;
      end
      c = GAIN * $cos(2.0*PI*cph); s = GAIN * $sin(2.0*PI*cph);
      sg = sigma_of(snr_of(kc / 512));
      adc_s.i = 12'($rtoi(si*c - sq*s + sg * gauss()));
      adc_s.q = 12'($rtoi(si*s + sq*c + sg * gauss()));
      adc_valid = 1'b1;
      tsym += 0.5 * (1.0 - 50.0e-6);
      cph  += 60.0e3 / 60.0e6;
      if (cph >= 1.0) cph -= 1.0;
    end
  end

  // ---------------- receiver symbol errors ----------------
  assign rs_dec_valid = 1'b0;
  assign rs_dec_sof   = 1'b0;
  assign rs_dec_data  = '0;

  int r_err [NP], r_sym [NP];
  int rx_frame = -1;
  bit tracking = 0;
  int n_resync = 0;
  logic [15:0] last_miss = 0;

  function automatic int find_frame(int cnt_byte);
    for (int n = tx_code.size() - 1; n >= 0; n--)
      if (tx_code[n][0] == cnt_byte) return n;
    return -1;
  endfunction

  always @(posedge clk) begin
    if (!rx_locked || rx_pilot_miss_count != last_miss) tracking = 0;
    last_miss = rx_pilot_miss_count;
    if (rx_code_valid) begin
      if (rx_code_sof) begin
        if (tracking) rx_frame++;
        else begin
          rx_frame = find_frame(int'(rx_code_data));
          tracking = (rx_frame >= 0);
          n_resync++;
        end
      end
      if (tracking && rx_frame >= 0 && rx_frame < tx_code.size() &&
          int'(rx_code_idx) < tx_code[rx_frame].size()) begin
        int p, e;
        p = point_of(rx_frame);
        // skip the first frame of a point, whose start saw the previous level
        if (p >= 0 && p < NP && (rx_frame - ACQ) % PT != 0) begin
          e = tx_code[rx_frame][rx_code_idx];
          r_sym[p] += 2;
          if (rx_code_data[7:4] != 4'(e >> 4)) r_err[p]++;
          if (rx_code_data[3:0] != 4'(e))      r_err[p]++;
        end
      end
    end
  end

  initial begin
    int sum_r, sum_lo;
    for (int p = 0; p < NP; p++) begin
      g_err[p] = 0; g_err_lo[p] = 0; g_sym[p] = 0; r_err[p] = 0; r_sym[p] = 0;
    end
    repeat (4) @(negedge clk);
    rst_n = 1;
    wait (tx_code.size() >= N_FRAMES);
    repeat (4096) @(posedge clk);
    sum_r = 0; sum_lo = 0;
    $display("Es/N0  symbols  errors  SER       ideal SER  ideal SER at -1 dB");
    for (int p = 0; p < NP; p++) begin
      $display("%4.1f  %7d  %6d  %.2e  %.2e   %.2e", SNR_DB[p], r_sym[p], r_err[p],
               real'(r_err[p]) / real'(r_sym[p] > 0 ? r_sym[p] : 1),
               real'(g_err[p]) / real'(g_sym[p]), real'(g_err_lo[p]) / real'(g_sym[p]));
      checks++;
      if (r_sym[p] < (PT - 1) * 504 * 8 / 10) begin
        failures++; $display("point %0d: only %0d symbols measured", p, r_sym[p]);
      end
      sum_r += r_err[p]; sum_lo += g_err_lo[p];
    end
    $display("receiver resynchronisations: %0d, lock count %0d", n_resync, rx_lock_count);
    checks++;
    if (sum_r > sum_lo) begin
      failures++;
      $display("implementation loss above 1 dB: %0d errors against %0d", sum_r, sum_lo);
    end
    checks++;
    if (r_sym[NP-1] == 0 || real'(r_err[NP-1]) / real'(r_sym[NP-1]) > 1.0e-2) begin
      failures++; $display("SER at 18 dB too high");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
