// vbs_me_unit: SAD engine of the variable block size motion estimator.
//
// One 16-pixel line of the current MB and of the candidate block enters per
// clock (line 0 first).  A sad_line16 tree gives the 4-pixel group sums g0..g3,
// the 8-pixel half sums h0,h1 and the line sum.  Sixteen accumulating
// registers build the SADs of all H.264 sub-blocks that the line belongs to:
//
//   R70..R73  12 bit  g0..g3, restart every 4 lines   -> mode 7 (4x4)
//   R60..R63  13 bit  g0..g3, restart every 8 lines   -> mode 6 (4x8)
//   R50,R51   13 bit  h0,h1,  restart every 4 lines   -> mode 5 (8x4)
//   R40,R41   14 bit  h0,h1,  restart every 8 lines   -> mode 4 (8x8)
//   R30,R31   15 bit  h0,h1,  restart every 16 lines  -> mode 3 (8x16)
//   R20       15 bit  line,   restart every 8 lines   -> mode 2 (16x8)
//   R10       16 bit  line,   restart every 16 lines  -> mode 1 (16x16)
//
// A register "restarts" by loading the new partial sum instead of adding it
// when its block begins (line index multiple of 4, 8 or 16), which is the
// "submit and reset to zero" of the source without an idle clock.
// After lines 3, 7, 11 and 15 the finished registers are flagged for the
// compare-and-select unit (sub4, sub8, sub16, valid for the clock after that
// line), matching the schedule: modes 7 and 5 every 4 clocks, modes 6, 4 and 2
// every 8, modes 3 and 1 every 16.  row4 / row8 tell which row of 4x? / ?x8
// sub-blocks the flagged values belong to.
//
// psad16 is the running 16x16 SAD including the current line (the value R10
// takes at this clock edge); the early termination test uses it so that a
// skipped candidate costs no extra clock.
//
// Register names and widths and the submit schedule follow the source; the
// per-register adders (instead of the nine shared accumulators AC0..AC8 of
// the source) are a simplification of this design.
module vbs_me_unit
  import me_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         valid,      // a line is presented this clock
  input  logic [3:0]   line,       // its index 0..15
  input  logic [127:0] cur,
  input  logic [127:0] ref_px,
  output logic [11:0]  r7 [4],
  output logic [12:0]  r6 [4],
  output logic [12:0]  r5 [2],
  output logic [13:0]  r4 [2],
  output logic [14:0]  r3 [2],
  output logic [14:0]  r2,
  output logic [15:0]  r1,
  output logic         sub4,       // r7, r5 hold finished blocks
  output logic         sub8,       // r6, r4, r2 hold finished blocks
  output logic         sub16,      // r3, r1 hold finished blocks
  output logic [1:0]   row4,       // 4-line row of the r7/r5 blocks
  output logic         row8,       // 8-line half of the r6/r4/r2 blocks
  output logic [15:0]  psad16
);

  logic [9:0]  g [4];
  logic [10:0] h [2];
  logic [11:0] total;

  sad_line16 u_tree (.cur, .ref_px, .g, .h, .total);

  logic st4, st8, st16;
  assign st4  = (line[1:0] == 2'd0);
  assign st8  = (line[2:0] == 3'd0);
  assign st16 = (line == 4'd0);

  assign psad16 = (st16 ? 16'd0 : r1) + 16'(total);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < 4; k++) begin
        r7[k] <= '0;
        r6[k] <= '0;
      end
      for (int k = 0; k < 2; k++) begin
        r5[k] <= '0;
        r4[k] <= '0;
        r3[k] <= '0;
      end
      r2    <= '0;
      r1    <= '0;
      sub4  <= 1'b0;
      sub8  <= 1'b0;
      sub16 <= 1'b0;
      row4  <= '0;
      row8  <= 1'b0;
    end else begin
      sub4  <= valid && (line[1:0] == 2'd3);
      sub8  <= valid && (line[2:0] == 3'd7);
      sub16 <= valid && (line == 4'd15);
      if (valid) begin
        row4 <= line[3:2];
        row8 <= line[3];
        for (int k = 0; k < 4; k++) begin
          r7[k] <= (st4 ? 12'd0 : r7[k]) + 12'(g[k]);
          r6[k] <= (st8 ? 13'd0 : r6[k]) + 13'(g[k]);
        end
        for (int k = 0; k < 2; k++) begin
          r5[k] <= (st4  ? 13'd0 : r5[k]) + 13'(h[k]);
          r4[k] <= (st8  ? 14'd0 : r4[k]) + 14'(h[k]);
          r3[k] <= (st16 ? 15'd0 : r3[k]) + 15'(h[k]);
        end
        r2 <= (st8 ? 15'd0 : r2) + 15'(total);
        r1 <= psad16;
      end
    end
  end

endmodule
