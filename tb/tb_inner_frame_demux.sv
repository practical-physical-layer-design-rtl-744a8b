// tb_inner_frame_demux: builds decoded frames here (counter byte, 6 length
// bytes, source payloads in priority order, idle fill to 219 bytes) with
// random lengths, feeds them with gaps between bytes, and checks that every
// payload byte comes out tagged with its source, in order, and nothing else.
// One frame skips a counter value (must count one gap) and one frame carries
// lengths adding up to more than 213 (must raise `len_error` and deliver
// nothing from that frame).
module tb_inner_frame_demux;
  import apsk_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, in_sof = 0;
  logic [7:0] in_data = 0;
  logic [7:0] out_data, frame_cnt;
  logic out_valid, len_error;
  logic [2:0] out_src;
  logic [15:0] cnt_gaps, frames;
  int checks = 0, failures = 0;
  int expq [$];            // expected {src, data}
  int errs_seen = 0;

  inner_frame_demux dut (.clk, .rst_n, .in_data, .in_valid, .in_sof, .out_data, .out_valid,
    .out_src, .frame_cnt, .len_error, .cnt_gaps, .frames);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    int e;
    checks++;
    if (expq.size() == 0) begin failures++; $display("unexpected byte"); end
    else begin
      e = expq.pop_front();
      if (e != {int'(out_src), 8'(out_data)}) begin
        failures++;
        if (failures < 10) $display("got src %0d %02x exp %0h", out_src, out_data, e);
      end
    end
  end

  task automatic send(input logic [7:0] b, input bit sof);
    // inputs change on the falling edge, away from the sampling edge
    @(negedge clk);
    in_data = b; in_sof = sof; in_valid = 1'b1;
    @(negedge clk);
    in_valid = 1'b0; in_sof = 1'b0;
    repeat ($urandom_range(0, 2)) @(negedge clk);
  endtask

  initial begin
    int cnt;
    cnt = 10;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int f = 0; f < 30; f++) begin
      int len [N_SRC];
      int rem, bytes [$];
      bit bad;
      bad = (f == 17);
      bytes.delete();
      rem = PAYLOAD_BYTES;
      for (int k = 0; k < N_SRC; k++) begin
        len[k] = (f % 4 == 0 && k == 0) ? rem : $urandom_range(0, 45);
        if (len[k] > rem) len[k] = rem;
        rem -= len[k];
      end
      if (bad) begin len[5] = 200; end
      if (f == 9) cnt += 2;        // one lost frame
      bytes.push_back(cnt & 255);
      for (int k = 0; k < N_SRC; k++) bytes.push_back(len[k]);
      for (int k = 0; k < N_SRC; k++)
        for (int b = 0; b < len[k]; b++) begin
          int v;
          v = $urandom_range(0, 255);
          bytes.push_back(v);
          if (!bad) expq.push_back({k, 8'(v)});
        end
      while (bytes.size() < 1 + DATA_BYTES) bytes.push_back(int'(IDLE_BYTE));
      while (bytes.size() > 1 + DATA_BYTES) void'(bytes.pop_back());
      for (int i = 0; i < bytes.size(); i++) send(8'(bytes[i]), i == 0);
      repeat (2) @(posedge clk);
      checks++;
      if (len_error != bad) failures++;
      if (len_error) errs_seen++;
      checks++;
      if (int'(frame_cnt) != (cnt & 255)) failures++;
      cnt++;
    end
    repeat (3) @(posedge clk);
    checks += 4;
    if (expq.size() != 0) begin failures++; $display("%0d bytes missing", expq.size()); end
    if (cnt_gaps != 1) failures++;
    if (frames != 30) failures++;
    if (errs_seen != 1) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
