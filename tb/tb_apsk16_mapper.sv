// tb_apsk16_mapper: sends random bytes and checks that each byte becomes two
// symbols, high nibble first, one per symbol strobe (every 4th cycle), each
// within 1 LSB of the ideal 4+12 APSK point computed here with real
// trigonometry: labels 0..11 on the outer ring (radius 1400, 15+30k deg),
// labels 12..15 on the inner ring (radius 1400/2.73, 45+90k deg). Also checks
// the radius ratio and that a missing byte is flagged as an underrun.
module tb_apsk16_mapper;
  import apsk_pkg::*;
  logic clk = 0, rst_n = 0, sym_en = 0, in_valid = 0;
  logic [7:0] in_data = 0;
  logic in_ready, sym_valid, underrun;
  iq12_t sym;
  logic [3:0] sym_label;
  int checks = 0, failures = 0;
  int exp_lab [$];
  int nsym = 0, nund = 0;
  localparam real PI = 3.14159265358979;

  apsk16_mapper dut (.clk, .rst_n, .sym_en, .in_data, .in_valid, .in_ready,
                     .sym, .sym_label, .sym_valid, .underrun);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real fabs(real v); return v < 0.0 ? -v : v; endfunction

  function automatic void ideal(input int l, output real xi, output real xq);
    real r, a;
    if (l < 12) begin r = 1400.0; a = (15.0 + 30.0*l) * PI / 180.0; end
    else begin r = 1400.0 / 2.73; a = (45.0 + 90.0*(l-12)) * PI / 180.0; end
    xi = r * $cos(a); xq = r * $sin(a);
  endfunction

  // symbol strobe every fourth cycle
  int ph = 0;
  always @(posedge clk) begin
    ph <= (ph + 1) % 4;
    sym_en <= (ph == 3);
  end

  always @(posedge clk) if (rst_n && sym_valid) begin
    if (underrun) nund++;
    else begin
      real ei, eq;
      int l;
      l = exp_lab.pop_front();
      ideal(l, ei, eq);
      checks++;
      if (fabs(real'(sym.i) - ei) > 1.01 || fabs(real'(sym.q) - eq) > 1.01 || int'(sym_label) != l) begin
        failures++;
        if (failures < 10) $display("label %0d got (%0d,%0d) exp (%f,%f)", l, sym.i, sym.q, ei, eq);
      end
      nsym++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int b = 0; b < 600; b++) begin
      in_data  <= (b < 256) ? 8'(b) : 8'($urandom);
      in_valid <= 1'b1;
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      exp_lab.push_back(int'(in_data[7:4])); exp_lab.push_back(int'(in_data[3:0]));
    end
    in_valid <= 1'b0;
    repeat (40) @(posedge clk);
    checks++;
    if (nsym != 1200) begin failures++; $display("symbols %0d", nsym); end
    checks++;
    if (nund == 0) failures++;
    // ring ratio of the table
    begin
      iq12_t po, pi;
      real ro, ri;
      po = apsk_point(4'd0); pi = apsk_point(4'd12);
      ro = $sqrt(real'(po.i)*po.i + real'(po.q)*po.q);
      ri = $sqrt(real'(pi.i)*pi.i + real'(pi.q)*pi.q);
      checks++;
      if (fabs(ro/ri - 2.73) > 0.01) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
