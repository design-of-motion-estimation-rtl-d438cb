// vbs_top: variable block size motion estimator for H.264 (and MPEG-4) with
// adaptive-threshold early termination.
//
// A 16x16 current MB is matched against every position of an NPOS x NPOS
// search window (default 16 x 16, motion vectors -8..+7).  One line of 16
// pixels is compared per clock (1-D array of 16 absolute-difference units),
// and the SADs of all 41 H.264 sub-blocks of the seven partition modes are
// accumulated from the same line SADs.  A candidate whose running 16x16 SAD
// exceeds the adaptive threshold is dropped at once (SKIP) and the scan moves
// to the next position, which is where the speed-up comes from.
//
// Structure: current MB buffer (16x16 pixels), search range buffer
// ((NPOS+15) x (NPOS+15) pixels), the SAD engine (vbs_me_unit), the
// compare-and-select unit with the termination test (vbs_cs) and the control
// unit (vbs_ctrl).
//
// Interface: load the buffers through the 32-bit word write ports while idle,
// set the mode inputs, pulse `start`, wait for `done`; `best` then holds the
// 41 results (order in me_pkg).  `skip` pulses for every terminated candidate
// and `line_valid` is high on every clock that processes a line, so the
// number of lines spent is observable.
// Timing: 4096 line clocks per search without termination (+2, see vbs_ctrl).
//
// The block diagram, the 16-line schedule, the register set and the skip
// mechanism follow the source architecture.  Raster order, the buffer port
// widths and the threshold formula are choices of this design.
module vbs_top
  import me_pkg::*;
#(
  parameter int unsigned NPOS = 16,
  localparam int unsigned SRW = NPOS + 15,
  localparam int unsigned PW  = $clog2(NPOS)
) (
  input  logic        clk,
  input  logic        rst_n,
  // buffer loading (32-bit words, 4 pixels)
  input  logic        cur_we,
  input  logic [3:0]  cur_wrow,
  input  logic [1:0]  cur_wword,
  input  logic [31:0] cur_wdata,
  input  logic        sr_we,
  input  logic [$clog2(SRW)-1:0]       sr_wrow,
  input  logic [$clog2((SRW+3)/4)-1:0] sr_wword,
  input  logic [31:0] sr_wdata,
  // configuration
  input  logic        h264,
  input  logic [15:0] sad_pred,
  input  logic [7:0]  err_margin,
  input  logic [7:0]  dec,
  input  logic [4:0]  term_lines,
  // command / status
  input  logic        start,
  output logic        busy,
  output logic        done,
  output logic        skip,
  output logic        line_valid,
  output me_result_t  best [NUM_SUBBLK]
);

  logic [3:0]    line;
  logic [PW-1:0] cand_x, cand_y;
  logic          clear;
  logic [127:0]  cur_line, ref_line;
  logic [15:0]   psad16;
  mv_t           cand_mv;

  logic [11:0] r7 [4];
  logic [12:0] r6 [4];
  logic [12:0] r5 [2];
  logic [13:0] r4 [2];
  logic [14:0] r3 [2];
  logic [14:0] r2;
  logic [15:0] r1;
  logic        sub4, sub8, sub16, row8;
  logic [1:0]  row4;

  pixel_buffer #(.ROWS(16), .COLS(16), .RD_PIX(16)) u_cur_buf (
    .clk, .we(cur_we), .wrow(cur_wrow), .wword(cur_wword), .wdata(cur_wdata),
    .rrow(line), .rcol('0), .rdata(cur_line)
  );

  logic [$clog2(SRW)-1:0] sr_rrow, sr_rcol;
  assign sr_rrow = $clog2(SRW)'(cand_y) + $clog2(SRW)'(line);
  assign sr_rcol = $clog2(SRW)'(cand_x);

  pixel_buffer #(.ROWS(SRW), .COLS(SRW), .RD_PIX(16)) u_sr_buf (
    .clk, .we(sr_we), .wrow(sr_wrow), .wword(sr_wword), .wdata(sr_wdata),
    .rrow(sr_rrow), .rcol(sr_rcol), .rdata(ref_line)
  );

  vbs_ctrl #(.NPOS(NPOS)) u_ctrl (
    .clk, .rst_n, .start, .skip, .busy, .done, .clear,
    .line_valid, .line, .cand_x, .cand_y
  );

  assign cand_mv.x = mvc_t'(int'(cand_x) - int'(NPOS / 2));
  assign cand_mv.y = mvc_t'(int'(cand_y) - int'(NPOS / 2));

  vbs_me_unit u_me (
    .clk, .rst_n, .valid(line_valid), .line, .cur(cur_line), .ref_px(ref_line),
    .r7, .r6, .r5, .r4, .r3, .r2, .r1, .sub4, .sub8, .sub16, .row4, .row8, .psad16
  );

  vbs_cs u_cs (
    .clk, .rst_n, .clear, .h264, .sad_pred, .err_margin, .dec, .term_lines,
    .line_valid, .line, .psad16, .cand_mv, .skip,
    .sub4, .sub8, .sub16, .row4, .row8, .r7, .r6, .r5, .r4, .r3, .r2, .r1,
    .best
  );

endmodule
