// vbs_cs: compare-and-select unit of the variable block size engine, with the
// adaptive early termination test.
//
// Selection: whenever the SAD engine flags finished sub-block registers, each
// is compared with the best SAD stored for that sub-block and replaces it,
// with the candidate's motion vector, if strictly smaller.  In H.264 mode
// (h264 = 1) all 41 sub-blocks of the seven modes are tracked; in MPEG-4 mode
// only the 16x16 block is.  Storage order is given in me_pkg.
//
// Early termination: the threshold follows the 16x16 parameters of the
// source algorithm.  With base = min(sad_pred, best 16x16 SAD so far) and
// min_cost = base / 16, the accumulated threshold after k lines is
//     TH(k) = error + k * (min_cost - dec)
// i.e. every line adds the per-line share of the minimum SAD and takes `dec`
// off the error margin; with error = 64 and dec = 4 the margin is used up at
// line 16, where TH(16) ~ base.  If the running 16x16 SAD (R10 after this
// line) is >= TH(k), `skip` is raised in the same clock and the controller
// moves on to the next candidate.  The test is not made on the last line
// (the candidate is complete then) nor after more than term_lines lines
// (term_lines = 15 keeps it always on).  sad_pred is the SAD of a predicted
// position used as the first threshold; 16'hFFFF disables it.
//
// The threshold formula is this design's reading of the source, which gives
// the parameters (min SAD/16, error 64, dec 4 for 16x16) and says the margin
// shrinks by dec per line, but not the exact accumulated formula.
//
// The low four bits of `base` are dropped by the division by 16, so a lint
// tool reports them as unused; that is the intended truncation.
module vbs_cs
  import me_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,        // start of a new search
  input  logic        h264,
  input  logic [15:0] sad_pred,
  input  logic [7:0]  err_margin,   // "error"
  input  logic [7:0]  dec,
  input  logic [4:0]  term_lines,
  // line being processed
  input  logic        line_valid,
  input  logic [3:0]  line,
  input  logic [15:0] psad16,
  input  mv_t         cand_mv,
  output logic        skip,
  // finished sub-blocks from the SAD engine
  input  logic        sub4,
  input  logic        sub8,
  input  logic        sub16,
  input  logic [1:0]  row4,
  input  logic        row8,
  input  logic [11:0] r7 [4],
  input  logic [12:0] r6 [4],
  input  logic [12:0] r5 [2],
  input  logic [13:0] r4 [2],
  input  logic [14:0] r3 [2],
  input  logic [14:0] r2,
  input  logic [15:0] r1,
  // results
  output me_result_t  best [NUM_SUBBLK]
);

  // ---------------- early termination ----------------
  logic [15:0]        base, best16;
  logic [11:0]        min_cost;
  logic [4:0]         k;
  logic signed [21:0] th;

  // best 16x16 SAD including a result being submitted in this very clock
  assign best16   = (sub16 && r1 < best[IDX_M1].sad) ? r1 : best[IDX_M1].sad;
  assign base     = (sad_pred < best16) ? sad_pred : best16;
  assign min_cost = base[15:4];
  assign k        = 5'(line) + 5'd1;
  assign th       = 22'sd0 + $signed({14'd0, err_margin})
                  + $signed({17'd0, k}) * ($signed({10'd0, min_cost}) - $signed({14'd0, dec}));
  assign skip     = line_valid && (line != 4'd15) && (k <= term_lines)
                 && ($signed({6'd0, psad16}) >= th);

  // ---------------- selection ----------------
  mv_t mv_q;   // candidate of the most recent line (the one flagged now)

  // Candidate SAD and enable for every storage slot, this clock.
  logic [15:0] cand_sad [NUM_SUBBLK];
  logic        cand_en  [NUM_SUBBLK];

  always_comb begin
    for (int i = 0; i < NUM_SUBBLK; i++) begin
      cand_sad[i] = '1;
      cand_en[i]  = 1'b0;
    end
    // mode 1 and 3: every 16 lines
    cand_sad[IDX_M1] = r1;
    cand_en[IDX_M1]  = sub16;
    for (int j = 0; j < 2; j++) begin
      cand_sad[IDX_M3 + j] = 16'(r3[j]);
      cand_en[IDX_M3 + j]  = sub16 && h264;
    end
    // modes 2, 4, 6: every 8 lines, row8 selects the top/bottom half
    for (int j = 0; j < 2; j++) begin
      cand_sad[IDX_M2 + j] = 16'(r2);
      cand_en[IDX_M2 + j]  = sub8 && h264 && (int'(row8) == j);
      for (int c = 0; c < 2; c++) begin
        cand_sad[IDX_M4 + 2*j + c] = 16'(r4[c]);
        cand_en[IDX_M4 + 2*j + c]  = sub8 && h264 && (int'(row8) == j);
      end
      for (int c = 0; c < 4; c++) begin
        cand_sad[IDX_M6 + 4*j + c] = 16'(r6[c]);
        cand_en[IDX_M6 + 4*j + c]  = sub8 && h264 && (int'(row8) == j);
      end
    end
    // modes 5 and 7: every 4 lines, row4 selects the row
    for (int j = 0; j < 4; j++) begin
      for (int c = 0; c < 2; c++) begin
        cand_sad[IDX_M5 + 2*j + c] = 16'(r5[c]);
        cand_en[IDX_M5 + 2*j + c]  = sub4 && h264 && (int'(row4) == j);
      end
      for (int c = 0; c < 4; c++) begin
        cand_sad[IDX_M7 + 4*j + c] = 16'(r7[c]);
        cand_en[IDX_M7 + 4*j + c]  = sub4 && h264 && (int'(row4) == j);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mv_q <= '0;
      for (int i = 0; i < NUM_SUBBLK; i++) best[i] <= '{sad: '1, mv: '0};
    end else if (clear) begin
      for (int i = 0; i < NUM_SUBBLK; i++) best[i] <= '{sad: '1, mv: '0};
    end else begin
      if (line_valid) mv_q <= cand_mv;
      for (int i = 0; i < NUM_SUBBLK; i++) begin
        if (cand_en[i] && cand_sad[i] < best[i].sad) best[i] <= '{sad: cand_sad[i], mv: mv_q};
      end
    end
  end

endmodule
