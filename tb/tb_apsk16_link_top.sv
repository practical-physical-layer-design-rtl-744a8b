// tb_apsk16_link_top: end-to-end run of the whole link at its default
// parameters. Transmit and receive sides are joined by a channel model made
// here: the transmitted symbols are shaped with a raised-cosine pulse
// (roll-off 0.43, standing for transmit and matched filtering) and sampled at
// two samples per symbol (60 MS/s, every second 120 MHz cycle) with a timing
// offset of 0.37 symbol, a symbol clock 50 ppm slow, a carrier offset of
// 60 kHz, a phase of 30 degrees, a gain of 0.6 and a little noise. In frame
// 160 the carrier phase jumps by a quarter turn, which the carrier loop
// cannot see and the frame synchroniser must correct at the next pilot.
// The RS encoder is replaced by a parity pattern and the RS decoder by a
// pass-through of the 220 message bytes (no errors are expected).
// Checks:
//  - after 100 frames for acquisition (the carrier loop needs about 70 to
//    pull in 60 kHz), every coded byte received equals the byte sent in the
//    frame with the same counter (counter, data domain, parity), except in
//    the frame hit by the phase jump, and no pilot is missed;
//  - from then on every source byte delivered equals the next byte that
//    source wrote, starting at the position given by the frames sent before;
//  - each mechanism happened: frame lock, 90-degree ambiguity correction,
//    a full-frame grant to the top-priority source, idle fill, several
//    sources in one frame, timing-loop and carrier-loop tracking, AGC
//    gain change; and no source buffer overflow or symbol underrun.
module tb_apsk16_link_top;
  import apsk_pkg::*;
  localparam real PI = 3.14159265358979;
  localparam real ALPHA = 0.43;
  localparam int  SPAN = 8;
  localparam int  N_FRAMES = 220;
  localparam int  SETTLE = 100;    // frames allowed for acquisition
  localparam int  JUMP_FRAME = 160; // frame in which the carrier phase jumps

  logic clk = 0, rst_n = 0;
  logic src_wr_en [N_SRC];
  logic [7:0] src_wr_data [N_SRC];
  logic src_overflow [N_SRC];
  logic [7:0] rs_msg_data, rs_par_data;
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
  always #4 clk = ~clk;   // 120 MHz-like, 8 time units per cycle

  // The pipelining example beside the link: random input on random enabled
  // cycles; the output must equal 3*X[k] - 2*X[k-1] + 5*X[k-2] (its default
  // coefficients) three enabled cycles after X[k] was presented.
  int n_ex = 0;
  longint ex_hist [$], ex_exp [$];
  always @(negedge clk) begin
    if (rst_n) begin
      ex_en <= ($urandom_range(0, 1) != 0);
      ex_x  <= 16'($urandom);
    end
  end
  always @(posedge clk) begin
    if (rst_n && ex_en) begin
      longint e;
      if (ex_exp.size() >= 3) begin
        e = ex_exp[ex_exp.size()-3];
        checks++; n_ex++;
        if (longint'(ex_y) != e) begin
          failures++;
          if (failures < 20) $display("example filter: got %0d expected %0d", ex_y, e);
        end
      end
      ex_hist.push_back(longint'(ex_x));
      if (ex_hist.size() > 3) void'(ex_hist.pop_front());
      e = 3 * ex_hist[ex_hist.size()-1];
      if (ex_hist.size() > 1) e += -2 * ex_hist[ex_hist.size()-2];
      if (ex_hist.size() > 2) e += 5 * ex_hist[ex_hist.size()-3];
      ex_exp.push_back(e);
      if (ex_exp.size() > 8) void'(ex_exp.pop_front());
    end
  end

  initial begin
    repeat (N_FRAMES * 2048 + 200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // symbols that reach the carrier phase detector (inner ring); idle fill
  // maps to outer-ring points, so their share here is below a quarter
  int n_inner = 0, n_cpr = 0;
  always @(posedge clk) if (dbg_cpr_valid) begin
    n_cpr++;
    if (dbg_cpr_inner) n_inner++;
  end

  // ---------------- sources ----------------
  int src_seq [N_SRC][$];       // every byte written, per source
  int n_overflow = 0;
  function automatic int src_byte(int s, int i);
    return (i * 37 + s * 101 + (i >> 8) * 13) & 255;
  endfunction

  int cyc = 0;
  always @(negedge clk) begin
    cyc++;
    for (int s = 0; s < N_SRC; s++) begin
      bit w;
      if (!rst_n) w = 0;
      else if (s == 0) w = ((cyc % 40000) < 700) && (cyc % 2 == 0);   // fibre channel burst
      else        w = ($urandom_range(0, 999) < 8);
      src_wr_en[s] = w;
      if (w) begin
        src_wr_data[s] = 8'(src_byte(s, src_seq[s].size()));
        src_seq[s].push_back(int'(src_wr_data[s]));
      end
    end
  end
  always @(posedge clk) for (int s = 0; s < N_SRC; s++) if (src_overflow[s]) n_overflow++;

  // ---------------- RS encoder stand-in and transmit log ----------------
  int tx_msg [$][$];            // message bytes (counter + data domain) per frame
  int tx_cum [$][N_SRC];        // source bytes sent before each frame
  int cur_msg [$];
  int cum [N_SRC];
  int par_k = 0;
  int n_full = 0, n_idle = 0, n_multi = 0, n_underrun = 0;
  assign rs_par_valid = 1'b1;
  assign rs_par_data  = 8'((par_k * 29) ^ (tx_msg.size() > 0 ? tx_msg[tx_msg.size()-1][0] : 0));

  function automatic int parity_byte(int frame_counter, int k);
    return ((k * 29) ^ frame_counter) & 255;
  endfunction

  always @(posedge clk) begin
    if (rs_msg_valid) begin
      if (rs_msg_sof) begin
        int c [N_SRC];
        int empty [$];
        cur_msg.delete();
        c = cum;
        tx_cum.push_back(c);
        tx_msg.push_back(empty);
      end
      cur_msg.push_back(int'(rs_msg_data));
      tx_msg[tx_msg.size()-1].push_back(int'(rs_msg_data));
      if (cur_msg.size() == 1 + DATA_BYTES) begin
        int tot, nsrc;
        tot = 0; nsrc = 0;
        // the transmitted payload must be the sources' bytes in order
        begin
          int p;
          p = 1 + BLC_BYTES;
          for (int s = 0; s < N_SRC; s++)
            for (int b = 0; b < cur_msg[1+s]; b++) begin
              checks++;
              if (cur_msg[p] != src_seq[s][cum[s] + b]) begin
                failures++;
                if (failures < 10) $display("tx frame %0d source %0d byte %0d wrong", tx_msg.size()-1, s, cum[s]+b);
              end
              p++;
            end
        end
        for (int s = 0; s < N_SRC; s++) begin
          cum[s] += cur_msg[1+s];
          tot += cur_msg[1+s];
          if (cur_msg[1+s] > 0) nsrc++;
        end
        if (cur_msg[1] == PAYLOAD_BYTES) n_full++;
        if (tot < PAYLOAD_BYTES) n_idle++;
        if (nsrc > 1) n_multi++;
      end
    end
    if (rs_par_valid && rs_par_ready) par_k <= (par_k + 1) % PARITY_BYTES;
    if (tx_underrun) n_underrun++;
  end

  // ---------------- channel ----------------
  real ai [$];
  real aq [$];
  int  tx_phase = 0;
  always @(posedge clk) begin
    tx_phase <= (tx_phase + 1) % 4;
    tx_sym_en <= (tx_phase == 3) && rst_n;
    if (tx_sym_valid) begin
      ai.push_back(real'(tx_sym.i));
      aq.push_back(real'(tx_sym.q));
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
  bit  jumped = 0;
  int  adc_phase = 0;
  always @(negedge clk) begin
    adc_valid = 1'b0;
    adc_phase = (adc_phase + 1) % 2;
    if (rst_n && adc_phase == 0 && $rtoi(tsym) + SPAN + 1 < ai.size()) begin
      real si, sq, c, s;
      int kc;
      si = 0.0; sq = 0.0;
      kc = $rtoi(tsym);
      for (int k = kc - SPAN; k <= kc + SPAN; k++) begin
        real p;
        p = rc(tsym - k);
        si += ai[k] * p; sq += aq[k] * p;
      end
      c = 0.6 * $cos(2.0*PI*cph); s = 0.6 * $sin(2.0*PI*cph);
      adc_s.i = 12'($rtoi(si*c - sq*s) + $urandom_range(0, 16) - 8);
      adc_s.q = 12'($rtoi(si*s + sq*c) + $urandom_range(0, 16) - 8);
      adc_valid = 1'b1;
      tsym += 0.5 * (1.0 - 50.0e-6);
      cph  += 60.0e3 / 60.0e6;
      if (!jumped && tsym > 512.0 * JUMP_FRAME + 100.0) begin cph += 0.25; jumped = 1; end
      if (cph >= 1.0) cph -= 1.0;
    end
  end

  // ---------------- receive: RS decoder stand-in and checks ----------------
  int rx_frame = -1, first_frame = -1, miss_at_settle = -1;
  int rx_ptr [N_SRC];
  bit ptr_set = 0;
  int n_code = 0, n_code_err = 0, n_src_bytes = 0, n_rx_frames = 0, n_rot_change = 0;
  logic [1:0] last_rot = 0;
  bit had_lock = 0;

  assign rs_dec_valid = rx_code_valid && (rx_code_idx < 8'(1 + DATA_BYTES));
  assign rs_dec_sof   = rx_code_sof;
  assign rs_dec_data  = rx_code_data;

  // find the transmitted frame for a received counter: the latest one sent
  function automatic int find_frame(int cnt_byte);
    for (int n = tx_msg.size() - 1; n >= 0; n--)
      if (tx_msg[n][0] == cnt_byte) return n;
    return -1;
  endfunction

  always @(posedge clk) begin
    if (rx_locked) had_lock = 1;
    if (had_lock && rx_frame >= SETTLE && rx_rotation != last_rot) n_rot_change++;
    last_rot = rx_rotation;
    if (rx_code_valid) begin
      int e;
      if (rx_code_sof) begin
        rx_frame = find_frame(int'(rx_code_data));
        n_rx_frames++;
        if (first_frame < 0) first_frame = rx_frame;
        if (rx_frame == SETTLE) miss_at_settle = int'(rx_pilot_miss_count);
      end
      if (rx_frame >= SETTLE && rx_frame != JUMP_FRAME) begin
        if (rx_code_idx < 8'(1 + DATA_BYTES)) e = tx_msg[rx_frame][rx_code_idx];
        else e = parity_byte(tx_msg[rx_frame][0], int'(rx_code_idx) - 1 - DATA_BYTES);
        checks++; n_code++;
        if (int'(rx_code_data) != e) begin
          failures++; n_code_err++;
          if (n_code_err < 10) $display("coded byte %0d of frame %0d: got %02x exp %02x",
                                        rx_code_idx, rx_frame, rx_code_data, e);
        end
      end else if (rx_code_sof && rx_frame < 0 && tx_msg.size() > SETTLE + 4) begin
        checks++; failures++;
        $display("received counter %0d was never sent", rx_code_data);
      end
      if (rx_code_sof && !ptr_set && rx_frame >= SETTLE) begin
        for (int s = 0; s < N_SRC; s++) rx_ptr[s] = tx_cum[rx_frame][s];
        ptr_set = 1;
      end
    end
    if (rx_valid && ptr_set && rx_frame != JUMP_FRAME) begin
      checks++; n_src_bytes++;
      if ( rx_ptr[rx_src] >= src_seq[rx_src].size() ||
          int'(rx_data) != src_seq[rx_src][rx_ptr[rx_src]]) begin
        failures++;
        if (failures < 10) $display("source %0d byte %0d wrong: %02x frame %0d", rx_src, rx_ptr[rx_src], rx_data, rx_frame);
      end
      rx_ptr[rx_src]++;
    end else if (rx_valid && ptr_set) begin
      rx_ptr[rx_src]++;
    end
  end

  task automatic need(input string what, input int count);
    checks++;
    if (count == 0) begin failures++; $display("mechanism never seen: %s", what); end
    else $display("%-36s %0d", what, count);
  endtask

  initial begin
    for (int s = 0; s < N_SRC; s++) begin src_wr_en[s] = 0; src_wr_data[s] = 0; cum[s] = 0; end
    repeat (4) @(negedge clk);
    rst_n = 1;
    wait (tx_msg.size() >= N_FRAMES);
    repeat (4000) @(posedge clk);
    need("frame locks", int'(rx_lock_count));
    need("ambiguity corrections (rotation)", n_rot_change);
    need("full-frame grants to fibre channel", n_full);
    need("frames with idle fill", n_idle);
    need("symbols used by the carrier phase detector", n_inner);
    need("pipelined example filter outputs compared", n_ex);
    need("frames carrying several sources", n_multi);
    need("coded bytes compared", n_code);
    need("source bytes delivered and compared", n_src_bytes);
    need("timing loop off nominal step", int'(rx_timing_step != 16'h8000));
    need("carrier frequency word", int'(rx_cpr_freq > 0));
    need("AGC gain moved from 1.0", int'(rx_agc_gain != 16'd4096));
    checks += 3;
    if (n_overflow != 0) begin failures++; $display("source overflow"); end
    if (n_underrun != 0) begin failures++; $display("symbol underrun %0d", n_underrun); end
    if (n_code < (N_FRAMES - SETTLE - 4) * (FRAME_BYTES - PILOT_BYTES)) begin
      failures++; $display("only %0d coded bytes checked", n_code);
    end
    checks++;
    if (miss_at_settle < 0 || int'(rx_pilot_miss_count) != miss_at_settle) begin
      failures++; $display("pilots missed after acquisition");
    end
    $display("frames sent %0d, received after lock %0d (first: %0d), pilot misses %0d",
             tx_msg.size(), n_rx_frames, first_frame, rx_pilot_miss_count);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
