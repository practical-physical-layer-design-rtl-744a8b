// tb_inner_frame_mux: drives the multiplexer with six modelled source buffers
// of random fill (sometimes more than a whole frame for one source) and a
// random ready. For every data domain it predicts, independently, the
// priority grants (each source takes min(held, what is left of 213 bytes),
// highest priority first), the 6 length bytes, the source bytes in order and
// the idle fill, and compares the 219 bytes and the `out_last` position. With
// ready held high it checks one byte per cycle (219 cycles per domain).
module tb_inner_frame_mux;
  import apsk_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, out_ready = 0;
  logic [9:0] src_level [N_SRC];
  logic [7:0] src_data  [N_SRC];
  logic       src_pop   [N_SRC];
  logic [7:0] out_data;
  logic out_valid, out_last, busy;
  int checks = 0, failures = 0;
  int q [N_SRC][$];
  int expq [$];
  int nbytes, full_grants = 0, fills = 0;
  bit rand_ready = 0;

  inner_frame_mux #(.LEVEL_W(10)) dut (.clk, .rst_n, .start, .src_level, .src_data, .src_pop,
    .out_data, .out_valid, .out_ready, .out_last, .busy);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog: %0d bytes seen, %0d expected bytes left, state %0d", nbytes, expq.size(), dut.st);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Source buffer model: the handshake is sampled just before each rising
  // edge and the buffers are updated just after it.
  bit pend [N_SRC];
  always @(negedge clk) begin
    out_ready = rand_ready ? ($urandom_range(0, 2) != 0) : 1'b1;
    #1;
    if (out_valid && out_ready) begin
      int e;
      e = expq.pop_front();
      checks++;
      if (int'(out_data) != e) begin
        failures++;
        if (failures < 10) $display("byte %0d got %02x exp %02x", nbytes, out_data, e);
      end
      checks++;
      if (out_last != (expq.size() == 0)) failures++;
      nbytes++;
    end
    for (int k = 0; k < N_SRC; k++) pend[k] = src_pop[k];
  end

  always @(posedge clk) begin
    #1;
    for (int k = 0; k < N_SRC; k++) if (pend[k]) begin void'(q[k].pop_front()); pend[k] = 0; end
    for (int k = 0; k < N_SRC; k++) begin
      src_level[k] = 10'(q[k].size());
      src_data[k]  = q[k].size() > 0 ? 8'(q[k][0]) : 8'h00;
    end
  end

  initial begin
    for (int k = 0; k < N_SRC; k++) begin src_level[k] = 0; src_data[k] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 40; f++) begin
      int rem, g, t0;
      rand_ready = (f % 2 == 1);
      // fill the source buffers
      for (int k = 0; k < N_SRC; k++) begin
        int n;
        n = (f % 5 == 0 && k == 0) ? 300 : $urandom_range(0, 70);
        if (f % 7 == 3) n = 0;
        for (int b = 0; b < n; b++) q[k].push_back((k << 5) ^ (b & 8'hff) ^ f);
      end
      @(posedge clk); #2;
      // expected domain
      rem = PAYLOAD_BYTES;
      begin
        int gr [N_SRC];
        for (int k = 0; k < N_SRC; k++) begin
          g = (q[k].size() < rem) ? q[k].size() : rem;
          gr[k] = g; rem -= g;
          expq.push_back(g);
        end
        if (gr[0] == PAYLOAD_BYTES) full_grants++;
        if (rem > 0) fills++;
        for (int k = 0; k < N_SRC; k++)
          for (int b = 0; b < gr[k]; b++) expq.push_back(q[k][b]);
        for (int b = 0; b < rem; b++) expq.push_back(int'(IDLE_BYTE));
      end
      nbytes = 0;
      start = 1;
      @(posedge clk); #2 start = 0;
      t0 = 0;
      while (expq.size() > 0) begin @(posedge clk); t0++; end
      if (!rand_ready) begin
        checks++;
        if (t0 != DATA_BYTES) begin failures++; $display("domain took %0d cycles", t0); end
      end
      repeat (2) @(posedge clk);
      checks++;
      if (busy) begin failures++; $display("still busy after domain %0d, state %0d pos %0d", f, dut.st, dut.pos); end
      // drop what is left so each domain starts from fresh buffers
      for (int k = 0; k < N_SRC; k++) q[k].delete();
    end
    checks++;
    if (full_grants == 0 || fills == 0) failures++;
    $display("full-frame grants %0d, domains with idle fill %0d", full_grants, fills);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
