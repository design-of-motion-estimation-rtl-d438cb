// tb_vbs_me_unit: streams random 16 x 16 blocks, one line per clock, through
// the block-size accumulation unit, with idle clocks between some lines, and
// checks after every line that each register holds the running sum of its own
// sub-block: the 4x4 (r7), 4x8 (r6), 8x4 (r5), 8x8 (r4), 8x16 (r3),
// 16x8 (r2) and 16x16 (r1) blocks restart at 4-, 8- and 16-line boundaries.
// Also checks the finished-block flags and the row indices that go with them,
// and the combinational running 16x16 sum offered to the termination logic.
module tb_vbs_me_unit;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic         valid = 1'b0;
  logic [3:0]   line = '0;
  logic [127:0] cur = '0, ref_px = '0;
  logic [11:0]  r7 [4];
  logic [12:0]  r6 [4];
  logic [12:0]  r5 [2];
  logic [13:0]  r4 [2];
  logic [14:0]  r3 [2];
  logic [14:0]  r2;
  logic [15:0]  r1;
  logic         sub4, sub8, sub16;
  logic [1:0]   row4;
  logic         row8;
  logic [15:0]  psad16;
  int checks = 0, failures = 0;
  int NB, N16;

  vbs_me_unit dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    int g [4];
    int e7 [4];
    int e6 [4];
    int e5 [2];
    int e4 [2];
    int e3 [2];
    int e2, e1, a, b;
    NB = 6; N16 = 16;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int blk = 0; blk < NB; blk++)
      for (int l = 0; l < N16; l++) begin
        for (int j = 0; j < 16; j++) begin
          a = (blk == 0) ? 255 : $urandom_range(255);
          b = (blk == 0) ? 0 : $urandom_range(255);
          cur[8*j +: 8] = 8'(a); ref_px[8*j +: 8] = 8'(b);
        end
        for (int k = 0; k < 4; k++) begin
          g[k] = 0;
          for (int j = 0; j < 4; j++) begin
            a = int'(cur[8*(4*k+j) +: 8]); b = int'(ref_px[8*(4*k+j) +: 8]);
            g[k] += (a > b) ? a - b : b - a;
          end
        end
        for (int k = 0; k < 4; k++) begin
          e7[k] = (l % 4 == 0 ? 0 : e7[k]) + g[k];
          e6[k] = (l % 8 == 0 ? 0 : e6[k]) + g[k];
        end
        for (int k = 0; k < 2; k++) begin
          e5[k] = (l % 4 == 0 ? 0 : e5[k]) + g[2*k] + g[2*k+1];
          e4[k] = (l % 8 == 0 ? 0 : e4[k]) + g[2*k] + g[2*k+1];
          e3[k] = (l == 0 ? 0 : e3[k]) + g[2*k] + g[2*k+1];
        end
        e2 = (l % 8 == 0 ? 0 : e2) + g[0] + g[1] + g[2] + g[3];
        e1 = (l == 0 ? 0 : e1) + g[0] + g[1] + g[2] + g[3];
        valid = 1'b1; line = 4'(l);
        #1;
        check(int'(psad16) == e1, $sformatf("blk %0d line %0d running 16x16 %0d exp %0d", blk, l, psad16, e1));
        @(negedge clk);
        valid = 1'b0;
        check(int'(r7[0]) == e7[0] && int'(r7[1]) == e7[1] && int'(r7[2]) == e7[2] && int'(r7[3]) == e7[3],
              $sformatf("blk %0d line %0d 4x4 registers", blk, l));
        check(int'(r6[0]) == e6[0] && int'(r6[1]) == e6[1] && int'(r6[2]) == e6[2] && int'(r6[3]) == e6[3],
              $sformatf("blk %0d line %0d 4x8 registers", blk, l));
        check(int'(r5[0]) == e5[0] && int'(r5[1]) == e5[1] && int'(r4[0]) == e4[0] && int'(r4[1]) == e4[1],
              $sformatf("blk %0d line %0d 8x4 / 8x8 registers", blk, l));
        check(int'(r3[0]) == e3[0] && int'(r3[1]) == e3[1] && int'(r2) == e2 && int'(r1) == e1,
              $sformatf("blk %0d line %0d 8x16 / 16x8 / 16x16 registers", blk, l));
        check(sub4 == (l % 4 == 3) && sub8 == (l % 8 == 7) && sub16 == (l == 15) &&
              int'(row4) == l / 4 && int'(row8) == l / 8,
              $sformatf("blk %0d line %0d flags", blk, l));
        // an idle clock now and then: nothing may move
        if ($urandom_range(3) == 0) begin
          @(negedge clk);
          check(int'(r1) == e1 && int'(r7[2]) == e7[2] && !sub4 && !sub8 && !sub16,
                $sformatf("blk %0d line %0d hold while idle", blk, l));
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
