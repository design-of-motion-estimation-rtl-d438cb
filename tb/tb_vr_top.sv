// tb_vr_top: end-to-end test of the vertical data reuse motion estimator.
//
// A random smooth search strip (16*(NPE+2) rows x 48 columns) is loaded into
// the memory modules, and current block k is cut out of block k's own search
// range (strip rows 16k .. 16k+47) at a random offset, with noise.  The
// reference model computes, for every block, the SAD of all 32 x 32
// candidates directly from the strip, and selects the best with the same
// order as the hardware (horizontal offset, slot t, top candidate t before
// bottom candidate t+16 on ties).  The design must give the same SAD and
// motion vector for every block and finish in 16*16*32 + 2 clocks.  The
// testbench also counts the clocks with line exchange between the PE halves
// and fails if there were none.  At the default four blocks each search is
// one complete operation of the engine at full size.  99 searches are run,
// the number of four-block groups in a CIF (352x288, 396 macroblock) frame,
// with a fresh synthetic scene each, and the search clocks per frame are
// printed and checked against 99 * 8194.
module tb_vr_top;
  import me_pkg::*;

  localparam int NPE  = 4;
  localparam int NMOD = NPE + 2;
  localparam int ROWS = 16 * NMOD;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        sr_we, cb_we, start;
  logic [$clog2(NMOD)-1:0] sr_sel;
  logic [3:0]  sr_wrow, sr_wword, cb_wrow;
  logic [$clog2(NPE)-1:0] cb_sel;
  logic [1:0]  cb_wword;
  logic [31:0] sr_wdata, cb_wdata;
  logic        busy, done, exchange;
  me_result_t  best [NPE];

  vr_top #(.NPE(NPE)) dut (.*);

  int checks = 0, failures = 0, n_exchange = 0;
  int frame_cycles = 0;
  int N16, N32, N48, NB, NS;
  int strip [ROWS][48];
  int cb    [NPE][16][16];

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

  function automatic int sad(int k, int hx, int v);
    int s = 0;
    for (int r = 0; r < N16; r++)
      for (int c = 0; c < N16; c++) s += iabs(cb[k][r][c] - strip[16*k + v + r][hx + c]);
    return s;
  endfunction

  task automatic make_scene();
    int gx, gy;
    gx = $urandom_range(5);
    gy = $urandom_range(5);
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < N48; c++) strip[r][c] = (30 + gx * c + gy * (r % 40) + $urandom_range(50)) % 256;
    for (int k = 0; k < NB; k++) begin
      int ox, oy;
      ox = $urandom_range(31);
      oy = $urandom_range(31);
      for (int r = 0; r < N16; r++)
        for (int c = 0; c < N16; c++) begin
          int v;
          v = strip[16*k + oy + r][ox + c] + $urandom_range(6) - 3;
          cb[k][r][c] = v < 0 ? 0 : (v > 255 ? 255 : v);
        end
    end
  endtask

  task automatic load();
    for (int m = 0; m < NMOD; m++)
      for (int r = 0; r < N16; r++)
        for (int w = 0; w < 12; w++) begin
          @(negedge clk);
          sr_we = 1'b1; sr_sel = ($clog2(NMOD))'(m); sr_wrow = 4'(r); sr_wword = 4'(w);
          for (int j = 0; j < 4; j++) sr_wdata[8*j +: 8] = 8'(strip[16*m + r][4*w + j]);
        end
    @(negedge clk);
    sr_we = 1'b0;
    for (int k = 0; k < NB; k++)
      for (int r = 0; r < N16; r++)
        for (int w = 0; w < 4; w++) begin
          @(negedge clk);
          cb_we = 1'b1; cb_sel = ($clog2(NPE))'(k); cb_wrow = 4'(r); cb_wword = 2'(w);
          for (int j = 0; j < 4; j++) cb_wdata[8*j +: 8] = 8'(cb[k][r][4*w + j]);
        end
    @(negedge clk);
    cb_we = 1'b0;
  endtask

  task automatic run_and_check();
    int cycles, exch;
    int e_sad [NPE];
    int e_x   [NPE];
    int e_y   [NPE];
    for (int k = 0; k < NB; k++) begin
      e_sad[k] = 65535; e_x[k] = 0; e_y[k] = 0;
      for (int hx = 0; hx < N32; hx++)
        for (int t = 0; t < N16; t++) begin
          int sa, sb, s, v;
          sa = sad(k, hx, t);
          sb = sad(k, hx, t + 16);
          if (sb < sa) begin s = sb; v = t + 16; end
          else begin s = sa; v = t; end
          if (s < e_sad[k]) begin
            e_sad[k] = s; e_x[k] = hx - 16; e_y[k] = v - 16;
          end
        end
    end
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cycles = 1; exch = 0;
    while (!done) begin
      if (exchange) exch++;
      @(negedge clk);
      cycles++;
    end
    n_exchange += exch;
    frame_cycles += cycles;
    for (int k = 0; k < NB; k++)
      check(int'(best[k].sad) == e_sad[k] && int'(best[k].mv.x) == e_x[k] && int'(best[k].mv.y) == e_y[k],
            $sformatf("block %0d: sad %0d mv (%0d,%0d) exp %0d (%0d,%0d)", k, best[k].sad,
                      best[k].mv.x, best[k].mv.y, e_sad[k], e_x[k], e_y[k]));
    check(cycles == 16 * 16 * 32 + 2, $sformatf("cycles %0d exp %0d", cycles, 16 * 16 * 32 + 2));
    // 120 of the 256 (t, l) pairs of a slot wrap, for every horizontal offset
    check(exch == 120 * 32, $sformatf("exchange clocks %0d exp %0d", exch, 120 * 32));
  endtask

  initial begin
    sr_we = 0; cb_we = 0; start = 0; sr_sel = 0; sr_wrow = 0; sr_wword = 0; sr_wdata = 0;
    cb_sel = 0; cb_wrow = 0; cb_wword = 0; cb_wdata = 0;
    N16 = 16; N32 = 32; N48 = 48; NB = NPE; NS = 99;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < NS; s++) begin
      make_scene();
      load();
      run_and_check();
    end
    check(n_exchange > 0, "the PE halves never exchanged lines");
    check(frame_cycles == NS * (16 * 16 * 32 + 2), $sformatf("frame clocks %0d", frame_cycles));
    $display("%0d searches of %0d blocks: %0d search clocks", NS, NB, frame_cycles);
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
