// tb_tx_framer: runs the framer against a modelled multiplexer (219 bytes per
// data domain, released by `mux_start`) and a modelled RS encoder that
// supplies 32 parity bytes, under a random downstream ready. Each frame must
// read: pilot 1A CF FC 1D, a counter one above the previous frame's, the 219
// domain bytes, the 32 parity bytes; `out_sof` only on the first pilot byte;
// the RS message strobe must cover exactly the counter and the domain (220
// bytes). With ready held high a frame takes 256 cycles.
module tb_tx_framer;
  import apsk_pkg::*;
  logic clk = 0, rst_n = 0;
  logic mux_start, mux_valid, mux_ready, mux_last;
  logic [7:0] mux_data;
  logic [7:0] rs_msg_data, rs_par_data, out_data, frame_cnt;
  logic rs_msg_valid, rs_msg_sof, rs_par_valid, rs_par_ready, out_valid, out_sof;
  logic out_ready = 0;
  int checks = 0, failures = 0;
  int mux_left = 0, mux_seq = 0, par_seq = 0, nmsg = 0;
  int frame [$];
  bit rand_ready = 0;

  tx_framer dut (.clk, .rst_n, .mux_start, .mux_data, .mux_valid, .mux_ready, .mux_last,
    .rs_msg_data, .rs_msg_valid, .rs_msg_sof, .rs_par_data, .rs_par_valid, .rs_par_ready,
    .out_data, .out_valid, .out_ready, .out_sof, .frame_cnt);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // multiplexer and encoder models
  assign mux_valid   = (mux_left > 0);
  assign mux_data    = 8'(mux_seq);
  assign mux_last    = (mux_left == 1);
  assign rs_par_valid = 1'b1;
  assign rs_par_data  = 8'(8'hA0 + par_seq);
  always @(posedge clk) begin
    if (mux_start) mux_left <= DATA_BYTES;
    else if (mux_valid && mux_ready) begin mux_left <= mux_left - 1; mux_seq <= mux_seq + 7; end
    if (rs_par_valid && rs_par_ready) par_seq <= (par_seq + 1) % PARITY_BYTES;
    if (rs_msg_valid) nmsg <= nmsg + 1;
    if (rs_msg_sof) begin
      checks++;
      if (rs_msg_data != frame_cnt) failures++;
    end
  end
  always @(negedge clk) out_ready <= rand_ready ? ($urandom_range(0, 3) != 0) : 1'b1;

  initial begin
    int prev_cnt, exp_seq, t0;
    prev_cnt = -1; exp_seq = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int f = 0; f < 12; f++) begin
      rand_ready = (f >= 6);
      frame.delete();
      t0 = 0;
      while (frame.size() < FRAME_BYTES) begin
        @(posedge clk);
        t0++;
        if (out_valid && out_ready) begin
          checks++;
          if (out_sof != (frame.size() == 0)) failures++;
          frame.push_back(int'(out_data));
        end
      end
      checks++;
      if (!rand_ready && t0 != FRAME_BYTES) begin
        failures++; $display("frame %0d took %0d cycles", f, t0);
      end
      for (int k = 0; k < 4; k++) begin
        checks++;
        if (frame[k] != int'(PILOT_WORD[31-8*k -: 8])) failures++;
      end
      checks++;
      if (prev_cnt >= 0 && frame[4] != ((prev_cnt + 1) & 255)) failures++;
      prev_cnt = frame[4];
      for (int k = 0; k < DATA_BYTES; k++) begin
        checks++;
        if (frame[5+k] != (exp_seq & 255)) failures++;
        exp_seq += 7;
      end
      for (int k = 0; k < PARITY_BYTES; k++) begin
        checks++;
        if (frame[5+DATA_BYTES+k] != 8'hA0 + k) failures++;
      end
    end
    @(posedge clk);
    checks++;
    if (nmsg != 12 * (1 + DATA_BYTES)) begin failures++; $display("msg bytes %0d", nmsg); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
