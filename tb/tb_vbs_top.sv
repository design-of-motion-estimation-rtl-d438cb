// tb_vbs_top: end-to-end test of the variable block size motion estimator.
//
// A smooth random search area (gradient plus noise) is generated and the
// current MB is cut out of it at a random position with added noise.  A
// reference model written here replays the same full-search raster scan line
// by line: it accumulates every sub-block SAD, updates the 41 minima (strictly
// smaller wins), applies the early termination rule
//     skip after k lines if SAD16(k) >= error + k * (min/16 - dec),
//     min = min(sad_pred, best 16x16 SAD), not on line 16, not after term_lines
// and counts the lines spent.  The design must match all 41 results and the
// clock count (lines + 2).  Configurations: termination off (plain full
// search, 4098 clocks), H.264 with the default parameters, MPEG-4 mode (only
// the 16x16 result), a predicted-SAD start threshold, and termination
// disabled after 10 lines.  The testbench counts skips, fully evaluated
// candidates and candidates that escaped termination because of term_lines,
// and fails if one of these never happened.
module tb_vbs_top;
  import me_pkg::*;

  localparam int NPOS = 16;
  localparam int SRW  = NPOS + 15;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        cur_we, sr_we, start, h264;
  logic [3:0]  cur_wrow;
  logic [1:0]  cur_wword;
  logic [31:0] cur_wdata, sr_wdata;
  logic [4:0]  sr_wrow;
  logic [2:0]  sr_wword;
  logic [15:0] sad_pred;
  logic [7:0]  err_margin, dec;
  logic [4:0]  term_lines;
  logic        busy, done, skip, line_valid;
  me_result_t  best [NUM_SUBBLK];

  vbs_top #(.NPOS(NPOS)) dut (.*);

  int checks = 0, failures = 0;
  int n_skip = 0, n_full = 0, n_escaped = 0, tot_lines_term = 0, n_term_runs = 0;
  int N4, N16, N41, NP, NS;

  int sr  [SRW][SRW];
  int cur [16][16];

  // reference results
  int      m_sad [NUM_SUBBLK];
  int      m_x   [NUM_SUBBLK];
  int      m_y   [NUM_SUBBLK];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic int iabs(int v);
    return v < 0 ? -v : v;
  endfunction

  task automatic make_scene();
    int ox, oy, gx, gy;
    gx = $urandom_range(6);
    gy = $urandom_range(6);
    for (int r = 0; r < SRW; r++)
      for (int c = 0; c < SRW; c++)
        sr[r][c] = (40 + gx * c + gy * r + $urandom_range(60)) % 256;
    ox = $urandom_range(NPOS - 1);
    oy = $urandom_range(NPOS - 1);
    for (int r = 0; r < N16; r++)
      for (int c = 0; c < N16; c++) begin
        int v;
        v = sr[oy + r][ox + c] + $urandom_range(8) - 4;
        cur[r][c] = v < 0 ? 0 : (v > 255 ? 255 : v);
      end
  endtask

  task automatic load();
    for (int r = 0; r < SRW; r++)
      for (int w = 0; w < (SRW + 3) / 4; w++) begin
        @(negedge clk);
        sr_we = 1'b1; sr_wrow = 5'(r); sr_wword = 3'(w);
        for (int j = 0; j < 4; j++) sr_wdata[8*j +: 8] = (4*w + j < SRW) ? 8'(sr[r][4*w + j]) : 8'd0;
        if (r < 16 && w < 4) begin
          cur_we = 1'b1; cur_wrow = 4'(r); cur_wword = 2'(w);
          for (int j = 0; j < 4; j++) cur_wdata[8*j +: 8] = 8'(cur[r][4*w + j]);
        end else cur_we = 1'b0;
      end
    @(negedge clk);
    sr_we = 1'b0; cur_we = 1'b0;
  endtask

  // Reference model of one search; returns the number of lines processed.
  function automatic int model(bit m_h264, int pred, int err, int dc, int tl, output int esc);
    int lines = 0;
    int acc [NUM_SUBBLK];
    esc = 0;
    for (int i = 0; i < N41; i++) begin
      m_sad[i] = 65535; m_x[i] = 0; m_y[i] = 0;
    end
    for (int y = 0; y < NP; y++) begin
      for (int x = 0; x < NP; x++) begin
        for (int i = 0; i < N41; i++) acc[i] = 0;
        for (int l = 0; l < N16; l++) begin
          int g [4];
          int s16, base, th, k;
          bit would_skip;
          lines++;
          for (int q = 0; q < N4; q++) begin
            g[q] = 0;
            for (int j = 0; j < N4; j++) g[q] += iabs(cur[l][4*q + j] - sr[y + l][x + 4*q + j]);
          end
          for (int q = 0; q < N4; q++) begin
            acc[IDX_M7 + 4*(l/4) + q] += g[q];
            acc[IDX_M6 + 4*(l/8) + q] += g[q];
          end
          for (int q = 0; q < 2; q++) begin
            acc[IDX_M5 + 2*(l/4) + q] += g[2*q] + g[2*q+1];
            acc[IDX_M4 + 2*(l/8) + q] += g[2*q] + g[2*q+1];
            acc[IDX_M3 + q]           += g[2*q] + g[2*q+1];
          end
          acc[IDX_M2 + l/8] += g[0] + g[1] + g[2] + g[3];
          acc[IDX_M1]       += g[0] + g[1] + g[2] + g[3];
          s16 = acc[IDX_M1];
          // completed sub-blocks
          for (int i = 0; i < N41; i++) begin
            bit fin;
            if (i == IDX_M1 || (i >= IDX_M3 && i < IDX_M4)) fin = (l == 15);
            else if (i < IDX_M3)                            fin = (l % 8 == 7) && ((i - IDX_M2) == l / 8);
            else if (i < IDX_M5)                            fin = (l % 8 == 7) && ((i - IDX_M4) / 2 == l / 8);
            else if (i < IDX_M6)                            fin = (l % 4 == 3) && ((i - IDX_M5) / 2 == l / 4);
            else if (i < IDX_M7)                            fin = (l % 8 == 7) && ((i - IDX_M6) / 4 == l / 8);
            else                                            fin = (l % 4 == 3) && ((i - IDX_M7) / 4 == l / 4);
            if (fin && (m_h264 || i == IDX_M1) && acc[i] < m_sad[i]) begin
              m_sad[i] = acc[i]; m_x[i] = x - NPOS / 2; m_y[i] = y - NPOS / 2;
            end
          end
          // early termination
          base = (pred < m_sad[IDX_M1]) ? pred : m_sad[IDX_M1];
          k    = l + 1;
          th   = err + k * ((base >> 4) - dc);
          would_skip = (l != 15) && (s16 >= th);
          if (would_skip && k <= tl) break;
          if (would_skip) esc++;
          if (l == 15) n_full++;
        end
      end
    end
    return lines;
  endfunction

  task automatic run_and_check(bit m_h264, int pred, int err, int dc, int tl, string name);
    int exp_lines, cycles, skips, esc;
    h264 = m_h264; sad_pred = 16'(pred); err_margin = 8'(err); dec = 8'(dc); term_lines = 5'(tl);
    exp_lines = model(m_h264, pred, err, dc, tl, esc);
    n_escaped += esc;
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cycles = 1; skips = 0;
    while (!done) begin
      if (skip) skips++;
      @(negedge clk);
      cycles++;
    end
    n_skip += skips;
    if (tl > 0) begin
      tot_lines_term += exp_lines;
      n_term_runs++;
    end
    for (int i = 0; i < N41; i++) begin
      check(int'(best[i].sad) == m_sad[i] && int'(best[i].mv.x) == m_x[i] && int'(best[i].mv.y) == m_y[i],
            $sformatf("%s blk %0d: sad %0d mv (%0d,%0d) exp %0d (%0d,%0d)", name, i, best[i].sad,
                      best[i].mv.x, best[i].mv.y, m_sad[i], m_x[i], m_y[i]));
    end
    check(cycles == exp_lines + 2, $sformatf("%s cycles %0d exp %0d", name, cycles, exp_lines + 2));
    if (tl == 0) check(cycles == 16 * NPOS * NPOS + 2, $sformatf("%s full search cycles %0d", name, cycles));
    $display("%s: %0d clocks, %0d skips", name, cycles, skips);
  endtask

  initial begin
    cur_we = 0; sr_we = 0; start = 0; cur_wrow = 0; cur_wword = 0; cur_wdata = 0;
    sr_wrow = 0; sr_wword = 0; sr_wdata = 0; h264 = 1; sad_pred = '1;
    err_margin = 64; dec = 4; term_lines = 15;
    N4 = 4; N16 = 16; N41 = NUM_SUBBLK; NP = NPOS; NS = 3;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < NS; s++) begin
      make_scene();
      load();
      run_and_check(1'b1, 65535, 64, 4, 0,  "full search");
      run_and_check(1'b1, 65535, 64, 4, 15, "h264 early termination");
      run_and_check(1'b0, 65535, 64, 4, 15, "mpeg4 early termination");
      run_and_check(1'b1, m_sad[IDX_M1] + 40, 64, 4, 15, "h264 with predicted SAD");
      run_and_check(1'b1, 65535, 32, 4, 10, "termination off after 10 lines");
    end
    check(n_skip > 0, "no candidate was ever skipped");
    check(n_full > 0, "no candidate was ever fully evaluated");
    check(n_escaped > 0, "term_lines never kept a candidate alive");
    $display("average clocks per search with termination: %0d", tot_lines_term / n_term_runs + 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
