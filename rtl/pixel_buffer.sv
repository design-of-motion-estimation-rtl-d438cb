// pixel_buffer: on-chip store for 8-bit pixels, ROWS x COLS.
//
// Used as the current MB buffer and the search range buffer of the variable
// block size engine, and as the current block buffers and the search range
// memory modules of the vertical data reuse engine.
//
// Write port: one 32-bit word (4 pixels) per clock, matching a 32-bit system
// bus; word w of a row holds columns 4w..4w+3, column 4w+j in bits
// [8j+7:8j].  Writes beyond the row end are ignored.
// Read port: RD_PIX consecutive pixels of one row starting at column rcol,
// combinational (register-file style), packed with pixel j in bits
// [8j+7:8j].  Columns beyond COLS read as zero.
//
// The 32-bit bus width comes from the source's bandwidth discussion; the
// asynchronous read and the word write port are choices of this design.
module pixel_buffer
  import me_pkg::*;
#(
  parameter int unsigned ROWS   = 16,
  parameter int unsigned COLS   = 48,
  parameter int unsigned RD_PIX = 16,
  localparam int unsigned RAW   = (ROWS > 1) ? $clog2(ROWS) : 1,
  localparam int unsigned WORDS = (COLS + 3) / 4,
  localparam int unsigned WAW   = (WORDS > 1) ? $clog2(WORDS) : 1,
  localparam int unsigned CAW   = (COLS > 1) ? $clog2(COLS) : 1
) (
  input  logic                clk,
  input  logic                we,
  input  logic [RAW-1:0]      wrow,
  input  logic [WAW-1:0]      wword,
  input  logic [31:0]         wdata,
  input  logic [RAW-1:0]      rrow,
  input  logic [CAW-1:0]      rcol,
  output logic [8*RD_PIX-1:0] rdata
);

  pixel_t mem [ROWS][COLS];

  always_ff @(posedge clk) begin
    if (we && int'(wrow) < ROWS) begin
      for (int j = 0; j < 4; j++) begin
        if (int'(wword) * 4 + j < COLS) mem[wrow][int'(wword) * 4 + j] <= wdata[8*j +: 8];
      end
    end
  end

  always_comb begin
    for (int j = 0; j < RD_PIX; j++) begin
      if (int'(rrow) < ROWS && int'(rcol) + j < COLS) rdata[8*j +: 8] = mem[rrow][int'(rcol) + j];
      else                                            rdata[8*j +: 8] = '0;
    end
  end

endmodule
