// tb_bme_frame: binary motion estimation over one CIF frame's worth of
// boundary blocks, at the engine's full size.
//
// A CIF (352x288) frame has 396 alpha blocks; with half of them taken as
// boundary blocks (blocks holding both shape and background pixels) that is
// 198 searches per frame.  The testbench generates 198 synthetic blob scenes
// whose current block is a boundary block, and runs each with one class per
// count of ones and 32, 16 and 0 classes of overlap, the three settings
// whose average clock counts the architecture was rated with.  Every result
// and clock count is compared with a brute-force model of the same rule (as in
// tb_bme_top), and the average clocks per block and per frame are printed.
// The shapes are synthetic, so the averages show the mechanism at work
// rather than reproduce figures measured on real video.
module tb_bme_frame;
  import me_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        cur_we, sr_we, start;
  logic [3:0]  cur_waddr;
  logic [15:0] cur_wdata;
  logic [5:0]  sr_waddr;
  logic [47:0] sr_wdata;
  logic [2:0]  class_shift;
  logic [8:0]  overlap;
  logic        busy, done, found, slot_match;
  logic [8:0]  best_sad, cur_count;
  mv_t         best_mv;

  bme_top dut (.*);

  int checks = 0, failures = 0;
  int n_skip_slots = 0, n_multi_slots = 0, n_match_slots = 0;
  int last_cycles = 0;
  longint total_cycles [3];

  // Loop bounds held in variables (set at run time) keep the reference model
  // compact in the compiled simulation.
  int N16, N32, N48, N8, N5;
  int rule_sh [5];
  int rule_ovl [5];

  logic [47:0] sr  [48];
  logic [15:0] cur [16];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic int ones_at(int x, int y);   // ones of candidate at column x, row y
    int n = 0;
    for (int r = 0; r < N16; r++)
      for (int c = 0; c < N16; c++) n += int'(sr[y + r][47 - (x + c)]);
    return n;
  endfunction

  function automatic int sad_at(int x, int y);
    int n = 0;
    for (int r = 0; r < N16; r++)
      for (int c = 0; c < N16; c++) n += int'(sr[y + r][47 - (x + c)] ^ cur[r][15 - c]);
    return n;
  endfunction

  function automatic int cls(int n, int sh);
    return (n + (1 << sh) - 1) >> sh;
  endfunction

  task automatic make_scene(int seed_mode);
    int cx, cy, rad, dx, dy;
    // blob: union of a few discs
    for (int r = 0; r < N48; r++) sr[r] = '0;
    for (int b = 0; b < 3; b++) begin
      cx  = $urandom_range(47);
      cy  = $urandom_range(47);
      rad = $urandom_range(14, 5);
      for (int r = 0; r < N48; r++)
        for (int c = 0; c < N48; c++)
          if ((r - cy) * (r - cy) + (c - cx) * (c - cx) <= rad * rad) sr[r][47 - c] = 1'b1;
    end
    if (seed_mode == 1) for (int r = 0; r < N48; r++) sr[r] = {$urandom(), 16'($urandom())};
    dx = $urandom_range(31);
    dy = $urandom_range(31);
    for (int r = 0; r < N16; r++)
      for (int c = 0; c < N16; c++) cur[r][15 - c] = sr[dy + r][47 - (dx + c)];
    for (int f = 0; f < 3; f++) cur[$urandom_range(15)][$urandom_range(15)] ^= 1'b1;
  endtask

  task automatic load();
    for (int r = 0; r < N48; r++) begin
      @(negedge clk);
      sr_we = 1'b1; sr_waddr = 6'(r); sr_wdata = sr[r];
      if (r < 16) begin
        cur_we = 1'b1; cur_waddr = 4'(r); cur_wdata = cur[r];
      end else cur_we = 1'b0;
    end
    @(negedge clk);
    sr_we = 1'b0; cur_we = 1'b0;
  endtask

  task automatic run_and_check(int sh, int ovl);
    int cur_ones, exp_best, exp_x, exp_y, slots, cycles, m;
    bit exp_found;
    class_shift = 3'(sh);
    overlap     = 9'(ovl);
    // reference model
    cur_ones = 0;
    for (int r = 0; r < N16; r++) for (int c = 0; c < N16; c++) cur_ones += int'(cur[r][c]);
    exp_found = 0; exp_best = 1 << 20; exp_x = 0; exp_y = 0; slots = 0;
    for (int p = 0; p < 2; p++) begin
      for (int v = 0; v < N32; v++) begin
        m = 0;
        for (int i = 0; i < N16; i++) begin
          int x, d, s;
          x = 16 * p + i;
          d = cls(ones_at(x, v), sh) - cls(cur_ones, sh);
          if (d < 0) d = -d;
          if (d <= ovl) begin
            m++;
            s = sad_at(x, v);
            if (s < exp_best) begin
              exp_best = s; exp_x = x - 16; exp_y = v - 16; exp_found = 1;
            end
          end
        end
        if (m > 0) slots++; else n_skip_slots++;
        if (m > 1) n_multi_slots++;
      end
    end
    n_match_slots += slots;
    // run the design
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cycles = 1;
    while (!done) begin
      @(negedge clk);
      cycles++;
    end
    check(cur_count == 9'(cur_ones), $sformatf("cur_count %0d exp %0d", cur_count, cur_ones));
    check(found == exp_found, $sformatf("found %0d exp %0d", found, exp_found));
    if (exp_found) begin
      check(int'(best_sad) == exp_best, $sformatf("best_sad %0d exp %0d", best_sad, exp_best));
      check(int'(best_mv.x) == exp_x && int'(best_mv.y) == exp_y,
            $sformatf("mv (%0d,%0d) exp (%0d,%0d)", best_mv.x, best_mv.y, exp_x, exp_y));
    end
    last_cycles = cycles;
    check(cycles == 175 + 16 * slots,
          $sformatf("cycles %0d exp %0d (slots %0d)", cycles, 175 + 16 * slots, slots));
  endtask

  initial begin
    int ones;
    cur_we = 0; sr_we = 0; start = 0; cur_waddr = 0; cur_wdata = 0;
    sr_waddr = 0; sr_wdata = 0; class_shift = 0; overlap = 0;
    N16 = 16; N32 = 32; N48 = 48; N8 = 198; N5 = 3;
    // class rules {class_shift, overlap}: one class per count of ones with
    // 32, 16 and no classes of overlap
    rule_sh  = '{0, 0, 0, 0, 0};
    rule_ovl = '{32, 16, 0, 0, 0};
    for (int k = 0; k < N5; k++) total_cycles[k] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < N8; s++) begin
      // draw until the current block is a boundary block
      do begin
        make_scene(0);
        ones = 0;
        for (int r = 0; r < N16; r++) ones += $countones(cur[r]);
      end while (ones == 0 || ones == 256);
      load();
      for (int k = 0; k < N5; k++) begin
        run_and_check(rule_sh[k], rule_ovl[k]);
        total_cycles[k] += longint'(last_cycles);
      end
    end
    check(n_skip_slots > 0, "no slot was ever skipped");
    check(n_multi_slots > 0, "no slot ever had several matches");
    for (int k = 0; k < N5; k++)
      $display("overlap %0d classes: %0d clocks per frame of %0d blocks, %0d per block on average",
               rule_ovl[k], total_cycles[k], N8, total_cycles[k] / longint'(N8));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
