// tb_pixel_buffer: fills a 16 x 48 pixel buffer (one vertical-reuse search
// module) through its 32-bit word port with random pixels, then reads 16-pixel
// windows at random row and column offsets, including windows that run past the
// right edge, whose missing pixels must read as 0.
module tb_pixel_buffer;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic          we = 1'b0;
  logic [3:0]    wrow = '0, rrow = '0;
  logic [3:0]    wword = '0;
  logic [31:0]   wdata = '0;
  logic [5:0]    rcol = '0;
  logic [127:0]  rdata;
  int model [16][48];
  int checks = 0, failures = 0;
  int NR, NW, NT;

  pixel_buffer #(.ROWS(16), .COLS(48), .RD_PIX(16)) dut (.*);

  initial begin
    NR = 16; NW = 12; NT = 400;
    for (int r = 0; r < NR; r++)
      for (int w = 0; w < NW; w++) begin
        @(negedge clk);
        we = 1'b1; wrow = 4'(r); wword = 4'(w);
        for (int j = 0; j < 4; j++) begin
          model[r][4*w + j] = $urandom_range(255);
          wdata[8*j +: 8] = 8'(model[r][4*w + j]);
        end
      end
    @(negedge clk);
    we = 1'b0; wrow = 4'd3; wword = 4'd2; wdata = '1;  // we low: ignored
    @(negedge clk);
    for (int t = 0; t < NT; t++) begin
      int r, c;
      bit ok;
      r = $urandom_range(15); c = (t < 8) ? 32 + 2 * t : $urandom_range(47);
      rrow = 4'(r); rcol = 6'(c);
      #1;
      ok = 1'b1;
      for (int j = 0; j < 16; j++)
        if (int'(rdata[8*j +: 8]) != ((c + j < 48) ? model[r][c + j] : 0)) ok = 1'b0;
      checks++;
      if (!ok) begin
        failures++;
        $display("FAIL: window row %0d col %0d", r, c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
