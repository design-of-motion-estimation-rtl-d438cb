// tb_me_top: whole-design test.  The three engines of me_top run at the same
// time, at their default sizes, each through one complete operation per scene:
//   binary estimator    - class-skipping search (16 classes and one class per
//                         count with 2 classes overlap) and a search with every
//                         class accepted; compared with a brute-force model
//                         of the same rule, including the clock count;
//   block-size engine   - H.264 search with early termination, compared with a
//                         line-by-line model (41 results, clock count);
//   vertical reuse      - four blocks searched together, compared with a
//                         brute-force model (4 results, clock count).
// Mechanisms counted, each must occur: binary slots skipped by class, binary
// slots with several simultaneous matches, block-size candidates skipped
// early, block-size candidates evaluated to the end, vertical-reuse line
// exchanges.
module tb_me_top;
  import me_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  // binary estimator ports
  logic        bme_cur_we, bme_sr_we, bme_start;
  logic [3:0]  bme_cur_waddr;
  logic [15:0] bme_cur_wdata;
  logic [5:0]  bme_sr_waddr;
  logic [47:0] bme_sr_wdata;
  logic [2:0]  bme_class_shift;
  logic [8:0]  bme_overlap;
  logic        bme_busy, bme_done, bme_found, bme_slot_match;
  logic [8:0]  bme_best_sad, bme_cur_count;
  mv_t         bme_best_mv;
  // block-size engine ports
  logic        vbs_cur_we, vbs_sr_we, vbs_h264, vbs_start;
  logic [3:0]  vbs_cur_wrow;
  logic [1:0]  vbs_cur_wword;
  logic [31:0] vbs_cur_wdata, vbs_sr_wdata;
  logic [4:0]  vbs_sr_wrow;
  logic [2:0]  vbs_sr_wword;
  logic [15:0] vbs_sad_pred;
  logic [7:0]  vbs_err_margin, vbs_dec;
  logic [4:0]  vbs_term_lines;
  logic        vbs_busy, vbs_done, vbs_skip, vbs_line_valid;
  me_result_t  vbs_best [NUM_SUBBLK];
  // vertical reuse ports
  logic        vr_sr_we, vr_cb_we, vr_start;
  logic [2:0]  vr_sr_sel;
  logic [3:0]  vr_sr_wrow, vr_sr_wword, vr_cb_wrow;
  logic [1:0]  vr_cb_sel, vr_cb_wword;
  logic [31:0] vr_sr_wdata, vr_cb_wdata;
  logic        vr_busy, vr_done, vr_exchange;
  me_result_t  vr_best [4];

  me_top dut (.*);

  int checks = 0, failures = 0;
  int n_bme_skip = 0, n_bme_multi = 0, n_vbs_skip = 0, n_vbs_full = 0, n_vr_exch = 0;
  int N4, N5, N16, N31, N32, N41, N48, N96, NS;

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

  // =============== binary estimator ===============
  logic [47:0] b_sr  [48];
  logic [15:0] b_cur [16];

  function automatic int b_ones(int x, int y);
    int n = 0;
    for (int r = 0; r < N16; r++) for (int c = 0; c < N16; c++) n += int'(b_sr[y + r][47 - (x + c)]);
    return n;
  endfunction

  function automatic int b_sad(int x, int y);
    int n = 0;
    for (int r = 0; r < N16; r++)
      for (int c = 0; c < N16; c++) n += int'(b_sr[y + r][47 - (x + c)] ^ b_cur[r][15 - c]);
    return n;
  endfunction

  task automatic bme_scene();
    int cx, cy, rad, dx, dy;
    for (int r = 0; r < N48; r++) b_sr[r] = '0;
    for (int b = 0; b < 3; b++) begin
      cx = $urandom_range(47); cy = $urandom_range(47); rad = $urandom_range(14, 5);
      for (int r = 0; r < N48; r++)
        for (int c = 0; c < N48; c++)
          if ((r - cy) * (r - cy) + (c - cx) * (c - cx) <= rad * rad) b_sr[r][47 - c] = 1'b1;
    end
    dx = $urandom_range(31); dy = $urandom_range(31);
    for (int r = 0; r < N16; r++) for (int c = 0; c < N16; c++) b_cur[r][15 - c] = b_sr[dy + r][47 - (dx + c)];
    b_cur[$urandom_range(15)][$urandom_range(15)] ^= 1'b1;
    for (int r = 0; r < N48; r++) begin
      @(negedge clk);
      bme_sr_we = 1'b1; bme_sr_waddr = 6'(r); bme_sr_wdata = b_sr[r];
      bme_cur_we = (r < 16); bme_cur_waddr = 4'(r); bme_cur_wdata = b_cur[r % 16];
    end
    @(negedge clk);
    bme_sr_we = 1'b0; bme_cur_we = 1'b0;
  endtask

  task automatic bme_run(int sh, int ovl);
    int cur_ones = 0, eb = 1 << 20, ex = 0, ey = 0, slots = 0, cycles, m;
    for (int r = 0; r < N16; r++) for (int c = 0; c < N16; c++) cur_ones += int'(b_cur[r][c]);
    for (int p = 0; p < 2; p++)
      for (int v = 0; v < N32; v++) begin
        m = 0;
        for (int i = 0; i < N16; i++) begin
          int x, d, s;
          x = 16 * p + i;
          d = iabs(((b_ones(x, v) + (1 << sh) - 1) >> sh) - ((cur_ones + (1 << sh) - 1) >> sh));
          if (d <= ovl) begin
            m++;
            s = b_sad(x, v);
            if (s < eb) begin eb = s; ex = x - 16; ey = v - 16; end
          end
        end
        if (m > 0) slots++; else n_bme_skip++;
        if (m > 1) n_bme_multi++;
      end
    bme_class_shift = 3'(sh); bme_overlap = 9'(ovl);
    @(negedge clk);
    bme_start = 1'b1;
    @(negedge clk);
    bme_start = 1'b0;
    cycles = 1;
    while (!bme_done) begin
      @(negedge clk);
      cycles++;
    end
    check(int'(bme_cur_count) == cur_ones, "bme current count");
    check(!bme_found || (int'(bme_best_sad) == eb && int'(bme_best_mv.x) == ex && int'(bme_best_mv.y) == ey),
          $sformatf("bme result sad %0d mv (%0d,%0d) exp %0d (%0d,%0d)", bme_best_sad,
                    bme_best_mv.x, bme_best_mv.y, eb, ex, ey));
    check(bme_found == (eb < (1 << 20)), "bme found flag");
    check(cycles == 175 + 16 * slots, $sformatf("bme cycles %0d exp %0d", cycles, 175 + 16 * slots));
  endtask

  // =============== block-size engine ===============
  int v_sr  [31][31];
  int v_cur [16][16];
  int v_sad [NUM_SUBBLK];
  int v_x   [NUM_SUBBLK];
  int v_y   [NUM_SUBBLK];

  task automatic vbs_scene();
    int ox, oy, gx, gy;
    gx = $urandom_range(6); gy = $urandom_range(6);
    for (int r = 0; r < N31; r++)
      for (int c = 0; c < N31; c++) v_sr[r][c] = (40 + gx * c + gy * r + $urandom_range(60)) % 256;
    ox = $urandom_range(15); oy = $urandom_range(15);
    for (int r = 0; r < N16; r++)
      for (int c = 0; c < N16; c++) v_cur[r][c] = v_sr[oy + r][ox + c] ^ $urandom_range(3);
    for (int r = 0; r < N31; r++)
      for (int w = 0; w < 8; w++) begin
        @(negedge clk);
        vbs_sr_we = 1'b1; vbs_sr_wrow = 5'(r); vbs_sr_wword = 3'(w);
        for (int j = 0; j < 4; j++) vbs_sr_wdata[8*j +: 8] = (4*w + j < 31) ? 8'(v_sr[r][4*w + j]) : 8'd0;
        vbs_cur_we = (r < 16 && w < 4); vbs_cur_wrow = 4'(r); vbs_cur_wword = 2'(w);
        for (int j = 0; j < 4; j++) vbs_cur_wdata[8*j +: 8] = 8'(v_cur[r % 16][(4*w + j) % 16]);
      end
    @(negedge clk);
    vbs_sr_we = 1'b0; vbs_cur_we = 1'b0;
  endtask

  task automatic vbs_run();
    int lines = 0, cycles;
    int acc [NUM_SUBBLK];
    for (int i = 0; i < N41; i++) begin v_sad[i] = 65535; v_x[i] = 0; v_y[i] = 0; end
    for (int y = 0; y < N16; y++)
      for (int x = 0; x < N16; x++) begin
        for (int i = 0; i < N41; i++) acc[i] = 0;
        for (int l = 0; l < N16; l++) begin
          int g [4];
          lines++;
          for (int q = 0; q < N4; q++) begin
            g[q] = 0;
            for (int j = 0; j < N4; j++) g[q] += iabs(v_cur[l][4*q + j] - v_sr[y + l][x + 4*q + j]);
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
          for (int i = 0; i < N41; i++) begin
            bit fin;
            if (i == IDX_M1 || (i >= IDX_M3 && i < IDX_M4)) fin = (l == 15);
            else if (i < IDX_M3) fin = (l % 8 == 7) && ((i - IDX_M2) == l / 8);
            else if (i < IDX_M5) fin = (l % 8 == 7) && ((i - IDX_M4) / 2 == l / 8);
            else if (i < IDX_M6) fin = (l % 4 == 3) && ((i - IDX_M5) / 2 == l / 4);
            else if (i < IDX_M7) fin = (l % 8 == 7) && ((i - IDX_M6) / 4 == l / 8);
            else                 fin = (l % 4 == 3) && ((i - IDX_M7) / 4 == l / 4);
            if (fin && acc[i] < v_sad[i]) begin v_sad[i] = acc[i]; v_x[i] = x - 8; v_y[i] = y - 8; end
          end
          if (l == 15) n_vbs_full++;
          else if (acc[IDX_M1] >= 64 + (l + 1) * ((v_sad[IDX_M1] >> 4) - 4)) break;
        end
      end
    vbs_h264 = 1'b1; vbs_sad_pred = '1; vbs_err_margin = 64; vbs_dec = 4; vbs_term_lines = 15;
    @(negedge clk);
    vbs_start = 1'b1;
    @(negedge clk);
    vbs_start = 1'b0;
    cycles = 1;
    while (!vbs_done) begin
      if (vbs_skip) n_vbs_skip++;
      @(negedge clk);
      cycles++;
    end
    for (int i = 0; i < N41; i++)
      check(int'(vbs_best[i].sad) == v_sad[i] && int'(vbs_best[i].mv.x) == v_x[i] && int'(vbs_best[i].mv.y) == v_y[i],
            $sformatf("vbs blk %0d sad %0d exp %0d", i, vbs_best[i].sad, v_sad[i]));
    check(cycles == lines + 2, $sformatf("vbs cycles %0d exp %0d", cycles, lines + 2));
  endtask

  // =============== vertical reuse engine ===============
  int r_strip [96][48];
  int r_cb    [4][16][16];

  function automatic int r_sad(int k, int hx, int v);
    int s = 0;
    for (int r = 0; r < N16; r++)
      for (int c = 0; c < N16; c++) s += iabs(r_cb[k][r][c] - r_strip[16*k + v + r][hx + c]);
    return s;
  endfunction

  task automatic vr_scene();
    for (int r = 0; r < N96; r++)
      for (int c = 0; c < N48; c++) r_strip[r][c] = (20 + 3 * c + 2 * (r % 37) + $urandom_range(50)) % 256;
    for (int k = 0; k < N4; k++) begin
      int ox, oy;
      ox = $urandom_range(31); oy = $urandom_range(31);
      for (int r = 0; r < N16; r++)
        for (int c = 0; c < N16; c++) r_cb[k][r][c] = r_strip[16*k + oy + r][ox + c];
      r_cb[k][$urandom_range(15)][$urandom_range(15)] = $urandom_range(255);
    end
    for (int m = 0; m < 6; m++)
      for (int r = 0; r < N16; r++)
        for (int w = 0; w < 12; w++) begin
          @(negedge clk);
          vr_sr_we = 1'b1; vr_sr_sel = 3'(m); vr_sr_wrow = 4'(r); vr_sr_wword = 4'(w);
          for (int j = 0; j < 4; j++) vr_sr_wdata[8*j +: 8] = 8'(r_strip[16*m + r][4*w + j]);
          vr_cb_we = (m < 4 && w < 4); vr_cb_sel = 2'(m); vr_cb_wrow = 4'(r); vr_cb_wword = 2'(w);
          for (int j = 0; j < 4; j++) vr_cb_wdata[8*j +: 8] = 8'(r_cb[m % 4][r][(4*w + j) % 16]);
        end
    @(negedge clk);
    vr_sr_we = 1'b0; vr_cb_we = 1'b0;
  endtask

  task automatic vr_run();
    int cycles;
    int es [4];
    int ex [4];
    int ey [4];
    for (int k = 0; k < N4; k++) begin
      es[k] = 65535; ex[k] = 0; ey[k] = 0;
      for (int hx = 0; hx < N32; hx++)
        for (int t = 0; t < N16; t++) begin
          int sa, sb;
          sa = r_sad(k, hx, t);
          sb = r_sad(k, hx, t + 16);
          if (sb < sa && sb < es[k]) begin es[k] = sb; ex[k] = hx - 16; ey[k] = t; end
          else if (sb >= sa && sa < es[k]) begin es[k] = sa; ex[k] = hx - 16; ey[k] = t - 16; end
        end
    end
    @(negedge clk);
    vr_start = 1'b1;
    @(negedge clk);
    vr_start = 1'b0;
    cycles = 1;
    while (!vr_done) begin
      if (vr_exchange) n_vr_exch++;
      @(negedge clk);
      cycles++;
    end
    for (int k = 0; k < N4; k++)
      check(int'(vr_best[k].sad) == es[k] && int'(vr_best[k].mv.x) == ex[k] && int'(vr_best[k].mv.y) == ey[k],
            $sformatf("vr block %0d sad %0d mv (%0d,%0d) exp %0d (%0d,%0d)", k, vr_best[k].sad,
                      vr_best[k].mv.x, vr_best[k].mv.y, es[k], ex[k], ey[k]));
    check(cycles == 8194, $sformatf("vr cycles %0d exp 8194", cycles));
  endtask

  initial begin
    bme_cur_we = 0; bme_sr_we = 0; bme_start = 0; bme_cur_waddr = 0; bme_cur_wdata = 0;
    bme_sr_waddr = 0; bme_sr_wdata = 0; bme_class_shift = 0; bme_overlap = 0;
    vbs_cur_we = 0; vbs_sr_we = 0; vbs_h264 = 1; vbs_start = 0; vbs_cur_wrow = 0; vbs_cur_wword = 0;
    vbs_cur_wdata = 0; vbs_sr_wdata = 0; vbs_sr_wrow = 0; vbs_sr_wword = 0; vbs_sad_pred = '1;
    vbs_err_margin = 64; vbs_dec = 4; vbs_term_lines = 15;
    vr_sr_we = 0; vr_cb_we = 0; vr_start = 0; vr_sr_sel = 0; vr_sr_wrow = 0; vr_sr_wword = 0;
    vr_cb_wrow = 0; vr_cb_sel = 0; vr_cb_wword = 0; vr_sr_wdata = 0; vr_cb_wdata = 0;
    N4 = 4; N5 = 5; N16 = 16; N31 = 31; N32 = 32; N41 = NUM_SUBBLK; N48 = 48; N96 = 96; NS = 2;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < NS; s++) begin
      fork
        begin
          bme_scene();
          bme_run(4, 0);
          bme_run(0, 2);
          bme_run(0, 256);
        end
        begin
          vbs_scene();
          vbs_run();
        end
        begin
          vr_scene();
          vr_run();
        end
      join
    end
    check(n_bme_skip > 0,  "binary: no slot skipped by class");
    check(n_bme_multi > 0, "binary: no slot with several matches");
    check(n_vbs_skip > 0,  "block-size: no early termination");
    check(n_vbs_full > 0,  "block-size: no candidate evaluated to the end");
    check(n_vr_exch > 0,   "vertical reuse: no line exchange");
    $display("bme skipped slots %0d, multi-match slots %0d; vbs skips %0d, full candidates %0d; vr exchanges %0d",
             n_bme_skip, n_bme_multi, n_vbs_skip, n_vbs_full, n_vr_exch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
