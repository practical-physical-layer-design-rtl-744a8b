// inner_frame_mux: inner-frame (TDD-like) multiplexer filling the 219-byte
// valid data domain of one frame from six prioritised sources.
//
// On `start` the block samples how many bytes each source buffer holds and
// grants them in priority order (source 0 = fibre channel, highest): each
// source gets min(held, what is left of the 213 payload bytes), so the
// highest-priority source may take the whole frame. It then streams
//   6 length bytes (the block length counter, source 0 first),
//   the granted bytes of source 0, 1, ... 5, popped from the buffers,
//   idle fill bytes up to 219 bytes in total,
// on a valid/ready byte stream, with `out_last` on byte 219. The priority
// order and the field sizes follow the frame description; the grant rule's
// details, one length byte per source, the idle byte value and the handshake
// are this design's choices.
module inner_frame_mux
  import apsk_pkg::*;
#(
  parameter int LEVEL_W = 10
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,                 // begin one data domain
  input  logic [LEVEL_W-1:0] src_level [N_SRC],     // bytes held per source
  input  logic [7:0]         src_data  [N_SRC],     // head byte per source
  output logic               src_pop   [N_SRC],
  output logic [7:0]         out_data,
  output logic               out_valid,
  input  logic               out_ready,
  output logic               out_last,
  output logic               busy
);
  typedef enum logic [1:0] {S_IDLE, S_BLC, S_SRC, S_FILL} state_t;
  state_t      st;
  logic [7:0]  grant [N_SRC];
  logic [7:0]  grant_c [N_SRC];
  logic [7:0]  pos;        // byte index inside the data domain
  logic [7:0]  left;       // bytes left of the current source
  logic [2:0]  src;        // current source
  logic        fire;

  // Priority grant: walk the sources from the highest priority down.
  always_comb begin
    int rem;
    rem = PAYLOAD_BYTES;
    for (int k = 0; k < N_SRC; k++) begin
      if (int'(src_level[k]) < rem) grant_c[k] = 8'(src_level[k]);
      else                          grant_c[k] = 8'(rem);
      rem = rem - int'(grant_c[k]);
    end
  end

  assign fire      = out_valid && out_ready;
  assign out_valid = (st != S_IDLE);
  assign out_last  = (pos == 8'(DATA_BYTES - 1));
  assign busy      = (st != S_IDLE);

  always_comb begin
    unique case (st)
      S_BLC:   out_data = grant[pos[2:0]];
      S_SRC:   out_data = src_data[src];
      default: out_data = IDLE_BYTE;
    endcase
    for (int k = 0; k < N_SRC; k++) src_pop[k] = fire && (st == S_SRC) && (src == 3'(k));
  end

  // First source at or after `from` with a non-zero grant, N_SRC if none.
  function automatic logic [2:0] next_src(input logic [7:0] g [N_SRC], input int from);
    for (int k = 0; k < N_SRC; k++)
      if (k >= from && g[k] != 8'd0) return 3'(k);
    return 3'(N_SRC);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; pos <= '0; left <= '0; src <= '0;
      for (int k = 0; k < N_SRC; k++) grant[k] <= '0;
    end else begin
      unique case (st)
        S_IDLE: if (start) begin
          grant <= grant_c;
          pos   <= '0;
          st    <= S_BLC;
        end
        S_BLC: if (fire) begin
          pos <= pos + 1'b1;
          if (pos == 8'(BLC_BYTES - 1)) begin
            src <= next_src(grant, 0);
            if (next_src(grant, 0) == 3'(N_SRC)) st <= S_FILL;
            else begin
              left <= grant[next_src(grant, 0)];
              st   <= S_SRC;
            end
          end
        end
        S_SRC: if (fire) begin
          pos <= pos + 1'b1;
          if (left == 8'd1) begin
            src <= next_src(grant, int'(src) + 1);
            if (next_src(grant, int'(src) + 1) == 3'(N_SRC)) st <= (out_last ? S_IDLE : S_FILL);
            else begin
              left <= grant[next_src(grant, int'(src) + 1)];
            end
          end else begin
            left <= left - 1'b1;
          end
        end
        S_FILL: if (fire) begin
          pos <= pos + 1'b1;
          if (out_last) st <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  // The grants never exceed the payload, so source data never reaches the
  // last byte of the domain unless it exactly fills it.
  a_fill_bound: assert property (@(posedge clk) disable iff (!rst_n)
    (st == S_SRC) |-> pos < 8'(DATA_BYTES));
endmodule
