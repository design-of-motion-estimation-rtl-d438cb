// tb_sad_line16: applies random and extreme 16-pixel line pairs to the line
// absolute-difference tree and compares its three levels of partial sums
// (four 4-pixel groups, two 8-pixel halves, the full line) with sums computed
// here.  The extremes (0 against 255 everywhere) exercise the widest sums.
module tb_sad_line16;
  logic [127:0] cur, ref_px;
  logic [9:0]   g [4];
  logic [10:0]  h [2];
  logic [11:0]  total;
  int checks = 0, failures = 0;
  int NT;

  sad_line16 dut (.*);

  initial begin
    NT = 500;
    for (int t = 0; t < NT; t++) begin
      int eg [4];
      int a, b;
      bit ok;
      for (int j = 0; j < 16; j++) begin
        a = (t == 0) ? 0 : (t == 1) ? 255 : $urandom_range(255);
        b = (t == 0) ? 255 : (t == 1) ? 0 : $urandom_range(255);
        cur[8*j +: 8] = 8'(a); ref_px[8*j +: 8] = 8'(b);
      end
      #1;
      for (int k = 0; k < 4; k++) begin
        eg[k] = 0;
        for (int j = 0; j < 4; j++) begin
          a = int'(cur[8*(4*k+j) +: 8]); b = int'(ref_px[8*(4*k+j) +: 8]);
          eg[k] += (a > b) ? a - b : b - a;
        end
      end
      ok = (int'(g[0]) == eg[0]) && (int'(g[1]) == eg[1]) && (int'(g[2]) == eg[2]) && (int'(g[3]) == eg[3]) &&
           (int'(h[0]) == eg[0] + eg[1]) && (int'(h[1]) == eg[2] + eg[3]) &&
           (int'(total) == eg[0] + eg[1] + eg[2] + eg[3]);
      checks++;
      if (!ok) begin
        failures++;
        $display("FAIL: vector %0d total %0d exp %0d", t, total, eg[0] + eg[1] + eg[2] + eg[3]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
