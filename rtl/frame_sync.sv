// frame_sync: pilot search, phase-ambiguity removal and byte assembly.
//
// Every phase-corrected symbol is sliced to its 4-bit label: inner ring when
// |z|^2 < SEL_TH (quadrant decides the label), otherwise the outer point with
// the largest dot product with z. The last 8 labels are compared with the
// 8-symbol pilot (PILOT_WORD, high nibble first) rotated by 0, 90, 180 and
// 270 degrees. A match in SEARCH locks the frame timing and records the
// rotation r left by the carrier loop; while locked every label is rotated
// back by r before two labels are packed into one byte. Each frame then has
// 504 data symbols (252 bytes: frame counter, 219-byte data domain, 32 parity
// bytes) followed by the next pilot, which is checked again; MISS_MAX
// consecutive missing pilots drop back to SEARCH. A pilot found at another
// rotation updates r.
// Follows the link design: frame sync after the carrier loop, resolving the
// 4-fold ambiguity, pilot of 4 bytes ahead of a 256-byte frame. The slicer,
// the lock rules and MISS_MAX are this design's choices.
// Output: `out_data` with `out_valid`; `out_sof` marks the frame counter byte
// and `out_idx` counts bytes 0..251 of the frame after the pilot. A byte is
// issued one cycle after its second symbol.
module frame_sync
  import apsk_pkg::*;
#(
  parameter int SEL_TH   = 490000,
  parameter int MISS_MAX = 2
) (
  input  logic       clk,
  input  logic       rst_n,
  input  iq16_t      in_s,
  input  logic       in_valid,
  output logic [7:0] out_data,
  output logic       out_valid,
  output logic       out_sof,
  output logic [7:0] out_idx,
  output logic       locked,
  output logic [1:0] rotation,
  output logic [15:0] lock_count,      // SEARCH -> LOCK transitions
  output logic [15:0] pilot_miss_count
);
  localparam int PSYM  = 2 * PILOT_BYTES;                  // 8
  localparam int DSYM  = 2 * (FRAME_BYTES - PILOT_BYTES);  // 504

  logic [3:0] win [PSYM];        // last PSYM labels, win[0] newest
  logic [3:0] lab;
  logic [3:0] hit;               // pilot match per rotation
  logic [9:0] cnt;               // symbol position in the frame while locked
  logic [3:0] nib_hi;
  logic [1:0] misses;

  function automatic logic [3:0] slice(input iq16_t v);
    logic signed [33:0] en, best, d;
    logic [3:0] bl;
    en = 34'(v.i) * 34'(v.i) + 34'(v.q) * 34'(v.q);
    if (en < 34'(SEL_TH)) return {2'b11, v.q[15], v.i[15] ^ v.q[15]};
    best = '1 <<< 33; bl = '0;
    for (int k = 0; k < 12; k++) begin
      iq12_t p;
      p = apsk_point(4'(k));
      d = 34'(v.i) * 34'(p.i) + 34'(v.q) * 34'(p.q);
      if (d > best) begin best = d; bl = 4'(k); end
    end
    return bl;
  endfunction

  // pilot match over the window that includes the current symbol
  always_comb begin
    lab = slice(in_s);
    for (int r = 0; r < 4; r++) begin
      hit[r] = (lab == rot_label(PILOT_WORD[3:0], 2'(r)));
      for (int k = 1; k < PSYM; k++)
        if (win[k-1] != rot_label(PILOT_WORD[4*k +: 4], 2'(r))) hit[r] = 1'b0;
    end
  end

  function automatic logic [1:0] first_hit(input logic [3:0] h);
    for (int r = 0; r < 4; r++) if (h[r]) return 2'(r);
    return 2'd0;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < PSYM; k++) win[k] <= '0;
      cnt <= '0; nib_hi <= '0; misses <= '0; locked <= 1'b0; rotation <= '0;
      out_data <= '0; out_valid <= 1'b0; out_sof <= 1'b0; out_idx <= '0;
      lock_count <= '0; pilot_miss_count <= '0;
    end else begin
      out_valid <= 1'b0;
      out_sof   <= 1'b0;
      if (in_valid) begin
        win[0] <= lab;
        for (int k = 1; k < PSYM; k++) win[k] <= win[k-1];
      end
      if (in_valid) begin
        if (!locked) begin
          if (hit != 4'b0) begin
            locked <= 1'b1; rotation <= first_hit(hit); cnt <= '0; misses <= '0;
            lock_count <= lock_count + 1'b1;
          end
        end else if (cnt < 10'(DSYM)) begin
          if (cnt[0] == 1'b0) nib_hi <= rot_label(lab, 2'd0 - rotation);
          else begin
            out_data  <= {nib_hi, rot_label(lab, 2'd0 - rotation)};
            out_valid <= 1'b1;
            out_idx   <= 8'(cnt >> 1);
            out_sof   <= (cnt == 10'd1);
          end
          cnt <= cnt + 1'b1;
        end else if (cnt < 10'(DSYM + PSYM - 1)) begin
          cnt <= cnt + 1'b1;
        end else begin
          // last pilot symbol: check the pilot
          cnt <= '0;
          if (hit != 4'b0) begin
            misses <= '0;
            if (!hit[rotation]) rotation <= first_hit(hit);
          end else begin
            pilot_miss_count <= pilot_miss_count + 1'b1;
            if (int'(misses) + 1 >= MISS_MAX) locked <= 1'b0;
            else misses <= misses + 1'b1;
          end
        end
      end
    end
  end
endmodule
