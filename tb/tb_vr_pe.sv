// tb_vr_pe: drives one vertical-reuse processing element with random module
// lines for 16 line slots per candidate pair and checks both accumulated SADs
// against sums computed here.  The slot offset t is swept so that the wrap
// point (t + l >= 16, where the PE_a half switches from M(k) to M(k+2) and
// the two results swap registers) falls at every line, including never.
module tb_vr_pe;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic         valid = 1'b0, first = 1'b0, wrap = 1'b0;
  logic [127:0] cur = '0, m_lo = '0, m_mid = '0, m_hi = '0;
  logic [15:0]  sad_a, sad_b;
  int checks = 0, failures = 0;
  int N16;

  vr_pe dut (.*);

  function automatic int lsad(logic [127:0] x, logic [127:0] y);
    int s = 0;
    for (int j = 0; j < N16; j++) begin
      int a, b;
      a = int'(x[8*j +: 8]); b = int'(y[8*j +: 8]);
      s += (a > b) ? a - b : b - a;
    end
    return s;
  endfunction

  initial begin
    N16 = 16;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < N16; t++) begin
      int ea, eb;
      ea = 0; eb = 0;
      for (int l = 0; l < N16; l++) begin
        for (int q = 0; q < 4; q++) begin
          cur[32*q +: 32] = $urandom; m_lo[32*q +: 32] = $urandom;
          m_mid[32*q +: 32] = $urandom; m_hi[32*q +: 32] = $urandom;
        end
        valid = 1'b1; first = (l == 0); wrap = (t + l >= 16);
        // top candidate (t) reads the lower module row, bottom (t+16) the next
        // one down; once the top window crosses into M(k+1) the roles swap
        if (t + l < 16) begin
          ea += lsad(cur, m_lo);
          eb += lsad(cur, m_mid);
        end else begin
          ea += lsad(cur, m_mid);
          eb += lsad(cur, m_hi);
        end
        @(negedge clk);
        valid = 1'b0;
        if ($urandom_range(4) == 0) @(negedge clk);  // idle clock: hold
      end
      checks++;
      if (int'(sad_a) != ea || int'(sad_b) != eb) begin
        failures++;
        $display("FAIL: t=%0d sad_a %0d exp %0d sad_b %0d exp %0d", t, sad_a, ea, sad_b, eb);
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
