// bit_row_buffer: on-chip store for binary (1 bit per pixel) alpha data, used
// as the current BAB buffer (16 rows x 16 bits) and as the search range buffer
// (48 rows x 48 bits) of the binary motion estimator.
//
// One whole row is written per clock through the write port (the loader that
// copies data from frame memory is outside this design).  One whole row is
// read per clock; the read is combinational from the address, like a register
// file, so the row is available in the same cycle the address is presented.
// Column 0 of a row is the most significant bit.
//
// The row-wide ports and the asynchronous read are choices of this design;
// the source architecture only names the buffers and gives their sizes
// (16x16 current BAB, 48-pixel wide window for a -16..+15 search range).
module bit_row_buffer #(
  parameter int unsigned ROWS  = 48,
  parameter int unsigned WIDTH = 48,
  localparam int unsigned AW   = (ROWS > 1) ? $clog2(ROWS) : 1
) (
  input  logic             clk,
  // write port
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  // read port
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [ROWS];

  always_ff @(posedge clk) begin
    if (we && (int'(waddr) < ROWS)) mem[waddr] <= wdata;
  end

  assign rdata = (int'(raddr) < ROWS) ? mem[raddr] : '0;

endmodule
