// vr_cs: motion vector selection for one current block of the vertical data
// reuse engine.
//
// When `valid` is high, the two SADs just finished by the block's PE (top
// candidate at vertical offset t, bottom candidate at t + 16, horizontal
// offset hx) are compared with the stored best; the smaller one replaces it
// if strictly smaller.  Ties keep the earlier candidate in scan order
// (horizontal offset, then top before bottom, then t).  Offsets are turned
// into motion vectors by subtracting SR (16 for the -16..+15 range).
//
// Timing: result registers update on the clock edge where valid is high;
// `clear` starts a new search.  The source shows no compare unit for this
// engine; this is the simplest one that gives one MV per current block.
module vr_cs
  import me_pkg::*;
#(
  parameter int unsigned SR = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,
  input  logic        valid,
  input  logic [15:0] sad_a,
  input  logic [15:0] sad_b,
  input  logic [5:0]  hx,
  input  logic [3:0]  t,
  output me_result_t  best
);

  logic [15:0] s;
  logic [5:0]  v;

  always_comb begin
    if (sad_b < sad_a) begin
      s = sad_b;
      v = 6'(t) + 6'd16;
    end else begin
      s = sad_a;
      v = 6'(t);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      best <= '{sad: '1, mv: '0};
    end else if (clear) begin
      best <= '{sad: '1, mv: '0};
    end else if (valid && s < best.sad) begin
      best.sad  <= s;
      best.mv.x <= mvc_t'(int'(hx) - int'(SR));
      best.mv.y <= mvc_t'(int'(v) - int'(SR));
    end
  end

endmodule
