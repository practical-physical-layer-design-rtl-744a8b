// byte_fifo: first-word-fall-through FIFO buffering one data source ahead of
// the inner-frame multiplexer.
//
// A plain circular buffer of DEPTH words (DEPTH a power of two). `rd_data`
// always shows the oldest word while `level` is non-zero; `rd_en` removes it.
// A write to a full FIFO is dropped and flagged on `overflow` for one cycle.
// `level` counts the words held and is what the multiplexer reads to decide
// how many bytes a source gets in the next frame. Source buffering is this
// design's own addition: the frame description only says that each source is
// served in priority order.
module byte_fifo #(
  parameter int W     = 8,
  parameter int DEPTH = 512
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       wr_en,
  input  logic [W-1:0]               wr_data,
  input  logic                       rd_en,
  output logic [W-1:0]               rd_data,
  output logic [$clog2(DEPTH):0]     level,
  output logic                       overflow
);
  localparam int AW = $clog2(DEPTH);
  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wp, rp;
  logic          do_wr, do_rd;

  assign do_rd = rd_en && (level != '0);
  assign do_wr = wr_en && (level != (AW+1)'(DEPTH) || do_rd);
  assign rd_data = mem[rp];

  always_ff @(posedge clk) begin
    if (do_wr) mem[wp] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; level <= '0; overflow <= 1'b0;
    end else begin
      if (do_wr) wp <= wp + 1'b1;
      if (do_rd) rp <= rp + 1'b1;
      level    <= level + (AW+1)'(do_wr) - (AW+1)'(do_rd);
      overflow <= wr_en && !do_wr;
    end
  end
endmodule
