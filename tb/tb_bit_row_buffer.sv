// tb_bit_row_buffer: writes random rows into a 48 x 48 bit buffer (the binary
// search window size), then reads every row back through the asynchronous read
// port and compares with a copy kept in the testbench.  Also checks that a write
// with we low changes nothing and that addresses past the last row read as 0.
module tb_bit_row_buffer;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic        we = 1'b0;
  logic [5:0]  waddr = '0, raddr = '0;
  logic [47:0] wdata = '0, rdata;
  logic [47:0] model [48];
  int checks = 0, failures = 0;
  int NR;

  bit_row_buffer #(.ROWS(48), .WIDTH(48)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    NR = 48;
    for (int r = 0; r < NR; r++) begin
      @(negedge clk);
      model[r] = {$urandom, $urandom};
      we = 1'b1; waddr = 6'(r); wdata = model[r];
    end
    @(negedge clk);
    // a write with we low must not land
    we = 1'b0; waddr = 6'd7; wdata = ~model[7];
    @(negedge clk);
    for (int r = 0; r < NR; r++) begin
      raddr = 6'(r);
      #1;
      check(rdata == model[r], $sformatf("row %0d read %h exp %h", r, rdata, model[r]));
    end
    for (int r = NR; r < 64; r++) begin
      raddr = 6'(r);
      #1;
      check(rdata == '0, $sformatf("row %0d past the end reads %h", r, rdata));
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
