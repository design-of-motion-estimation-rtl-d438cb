// sad_line16: one line of a 16-pixel-wide block match.
//
// Sixteen absolute-difference units compare 16 current pixels with 16
// reference pixels; a shared adder tree sums the differences.  The tree's
// intermediate sums are outputs too, because the variable block size engine
// needs them: the four 4-pixel group sums (columns 0-3, 4-7, 8-11, 12-15),
// the two 8-pixel half sums, and the whole line.
//
// Purely combinational.  Pixel j of a packed line is bits [8j+7:8j].
// The 16 AD units and the shared tree follow the source architecture; the
// exact tree shape (4 -> 2 -> 1) is the natural one for the block sizes.
module sad_line16
  import me_pkg::*;
(
  input  logic [127:0] cur,
  input  logic [127:0] ref_px,
  output logic [9:0]   g   [4],   // 4-pixel group sums
  output logic [10:0]  h   [2],   // 8-pixel half sums
  output logic [11:0]  total      // 16-pixel line sum
);

  logic [7:0] ad [16];

  always_comb begin
    for (int j = 0; j < 16; j++) ad[j] = absdiff(cur[8*j +: 8], ref_px[8*j +: 8]);
    for (int k = 0; k < 4; k++)
      g[k] = 10'(ad[4*k]) + 10'(ad[4*k+1]) + 10'(ad[4*k+2]) + 10'(ad[4*k+3]);
    h[0]  = 11'(g[0]) + 11'(g[1]);
    h[1]  = 11'(g[2]) + 11'(g[3]);
    total = 12'(h[0]) + 12'(h[1]);
  end

endmodule
