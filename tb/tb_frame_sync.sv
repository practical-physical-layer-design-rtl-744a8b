// tb_frame_sync: generates a symbol stream of frames (8 pilot symbols for
// 1A CF FC 1D, then 504 symbols of random bytes) on the receive scale (outer
// ring 1024, inner 375) with a little noise, rotated by a multiple of 90
// degrees as a carrier loop may leave it, and preceded by random symbols.
// Checks: lock is found, the rotation is reported, every byte after lock
// equals the transmitted byte with `out_sof` on byte 0 and `out_idx` counting;
// a change of rotation mid-stream is followed at the next pilot; two missing
// pilots drop the lock, and it is regained afterwards.
module tb_frame_sync;
  import apsk_pkg::*;
  localparam real PI = 3.14159265358979;
  logic clk = 0, rst_n = 0, in_valid = 0;
  iq16_t in_s = '0;
  logic [7:0] out_data, out_idx;
  logic out_valid, out_sof, locked;
  logic [1:0] rotation;
  logic [15:0] lock_count, pilot_miss_count;
  int checks = 0, failures = 0;
  int expq [$];
  int exp_idx = 0, nbytes = 0, unlocks = 0;
  bit was_locked = 0, ignore = 0;

  frame_sync dut (.clk, .rst_n, .in_s, .in_valid, .out_data, .out_valid, .out_sof, .out_idx,
    .locked, .rotation, .lock_count, .pilot_miss_count);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send_sym(input int l, input int r);
    real rad, a;
    if (l < 12) begin rad = 1024.0; a = (15.0 + 30.0*l) * PI / 180.0; end
    else begin rad = 1024.0/2.73; a = (45.0 + 90.0*(l-12)) * PI / 180.0; end
    a += r * PI / 2.0;
    @(negedge clk);
    in_s.i = 16'($rtoi(rad*$cos(a)) + $urandom_range(0, 60) - 30);
    in_s.q = 16'($rtoi(rad*$sin(a)) + $urandom_range(0, 60) - 30);
    in_valid = 1'b1;
    @(negedge clk);
    in_valid = 1'b0;
    repeat (2) @(negedge clk);
  endtask

  // checks the bytes while locked
  always @(posedge clk) begin
    if (out_valid && !ignore) begin
      checks += 2;
      if (expq.size() == 0) failures++;
      else if (int'(out_data) != expq.pop_front()) begin
        failures++;
        if (failures < 10) $display("byte %0d mismatch %02x", out_idx, out_data);
      end
      if (out_sof != (out_idx == 0) || int'(out_idx) != exp_idx) failures++;
      nbytes++;
    end
    if (out_valid) begin
      exp_idx = (exp_idx + 1) % (FRAME_BYTES - PILOT_BYTES);
    end
    if (was_locked && !locked) unlocks++;
    was_locked = locked;
  end

  task automatic send_frame(input int r, input bit with_pilot, input bit expect_out);
    for (int k = 0; k < 2*PILOT_BYTES; k++)
      send_sym(with_pilot ? int'(PILOT_WORD[31-4*k -: 4]) : $urandom_range(0, 15), r);
    for (int b = 0; b < FRAME_BYTES - PILOT_BYTES; b++) begin
      int v;
      v = $urandom_range(0, 255);
      if (expect_out) expq.push_back(v);
      send_sym(v >> 4, r);
      send_sym(v & 15, r);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 100; k++) send_sym($urandom_range(0, 15), 3);
    checks++;
    if (locked) failures++;
    // rotation 3, three frames
    for (int f = 0; f < 3; f++) send_frame(3, 1, 1);
    checks += 2;
    if (!locked || rotation != 2'd3) failures++;
    if (lock_count != 1) failures++;
    // the carrier loop slips by a quarter turn: the pilot shows rotation 1;
    // the data of the slipped frame comes out rotated and is not checked
    ignore = 1;
    send_frame(1, 1, 0);
    ignore = 0;
    repeat (4) @(negedge clk);
    checks++;
    if (rotation != 2'd1) failures++;
    for (int f = 0; f < 2; f++) send_frame(1, 1, 1);
    // two pilots missing: lock is lost, found again on the next pilot
    ignore = 1;
    send_frame(1, 0, 0);
    send_frame(1, 0, 0);
    ignore = 0;
    checks++;
    if (locked || unlocks != 1) failures++;
    exp_idx = 0;
    for (int f = 0; f < 3; f++) send_frame(0, 1, 1);
    repeat (4) @(negedge clk);
    checks += 3;
    if (!locked || rotation != 2'd0) failures++;
    if (pilot_miss_count != 2) failures++;
    if (expq.size() != 0) failures++;
    $display("bytes checked %0d", nbytes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
