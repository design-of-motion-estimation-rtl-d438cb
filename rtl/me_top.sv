// me_top: the three motion estimation engines of this library side by side.
//
//   bme_*  binary motion estimator for MPEG-4 shape coding (bme_top):
//          16x16 binary blocks, -16..+15 range, candidates skipped by
//          class (count of ones) before any SAD is computed.
//   vbs_*  variable block size motion estimator with adaptive early
//          termination (vbs_top): 41 H.264 sub-block MVs from one scan of a
//          16x16-position window, one line per clock.
//   vr_*   vertical data reuse motion estimator (vr_top): four vertically
//          adjacent macroblocks searched together over a shared search
//          strip held in six memory modules.
//
// The engines are independent: each has its own buffer load ports, start /
// done handshake and results, brought out unchanged with the prefixes above.
// They share only clock and reset.  The frame memory that would fill the
// buffers is outside this design.
module me_top
  import me_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // ---------------- binary motion estimator ----------------
  input  logic        bme_cur_we,
  input  logic [3:0]  bme_cur_waddr,
  input  logic [15:0] bme_cur_wdata,
  input  logic        bme_sr_we,
  input  logic [5:0]  bme_sr_waddr,
  input  logic [47:0] bme_sr_wdata,
  input  logic [2:0]  bme_class_shift,
  input  logic [8:0]  bme_overlap,
  input  logic        bme_start,
  output logic        bme_busy,
  output logic        bme_done,
  output logic [8:0]  bme_best_sad,
  output mv_t         bme_best_mv,
  output logic        bme_found,
  output logic [8:0]  bme_cur_count,
  output logic        bme_slot_match,
  // ---------------- variable block size estimator ----------------
  input  logic        vbs_cur_we,
  input  logic [3:0]  vbs_cur_wrow,
  input  logic [1:0]  vbs_cur_wword,
  input  logic [31:0] vbs_cur_wdata,
  input  logic        vbs_sr_we,
  input  logic [4:0]  vbs_sr_wrow,
  input  logic [2:0]  vbs_sr_wword,
  input  logic [31:0] vbs_sr_wdata,
  input  logic        vbs_h264,
  input  logic [15:0] vbs_sad_pred,
  input  logic [7:0]  vbs_err_margin,
  input  logic [7:0]  vbs_dec,
  input  logic [4:0]  vbs_term_lines,
  input  logic        vbs_start,
  output logic        vbs_busy,
  output logic        vbs_done,
  output logic        vbs_skip,
  output logic        vbs_line_valid,
  output me_result_t  vbs_best [NUM_SUBBLK],
  // ---------------- vertical data reuse estimator ----------------
  input  logic        vr_sr_we,
  input  logic [2:0]  vr_sr_sel,
  input  logic [3:0]  vr_sr_wrow,
  input  logic [3:0]  vr_sr_wword,
  input  logic [31:0] vr_sr_wdata,
  input  logic        vr_cb_we,
  input  logic [1:0]  vr_cb_sel,
  input  logic [3:0]  vr_cb_wrow,
  input  logic [1:0]  vr_cb_wword,
  input  logic [31:0] vr_cb_wdata,
  input  logic        vr_start,
  output logic        vr_busy,
  output logic        vr_done,
  output logic        vr_exchange,
  output me_result_t  vr_best [4]
);

  bme_top u_bme (
    .clk, .rst_n,
    .cur_we(bme_cur_we), .cur_waddr(bme_cur_waddr), .cur_wdata(bme_cur_wdata),
    .sr_we(bme_sr_we), .sr_waddr(bme_sr_waddr), .sr_wdata(bme_sr_wdata),
    .class_shift(bme_class_shift), .overlap(bme_overlap),
    .start(bme_start), .busy(bme_busy), .done(bme_done),
    .best_sad(bme_best_sad), .best_mv(bme_best_mv), .found(bme_found),
    .cur_count(bme_cur_count), .slot_match(bme_slot_match)
  );

  vbs_top #(.NPOS(16)) u_vbs (
    .clk, .rst_n,
    .cur_we(vbs_cur_we), .cur_wrow(vbs_cur_wrow), .cur_wword(vbs_cur_wword),
    .cur_wdata(vbs_cur_wdata),
    .sr_we(vbs_sr_we), .sr_wrow(vbs_sr_wrow), .sr_wword(vbs_sr_wword),
    .sr_wdata(vbs_sr_wdata),
    .h264(vbs_h264), .sad_pred(vbs_sad_pred), .err_margin(vbs_err_margin),
    .dec(vbs_dec), .term_lines(vbs_term_lines),
    .start(vbs_start), .busy(vbs_busy), .done(vbs_done), .skip(vbs_skip),
    .line_valid(vbs_line_valid), .best(vbs_best)
  );

  vr_top #(.NPE(4)) u_vr (
    .clk, .rst_n,
    .sr_we(vr_sr_we), .sr_sel(vr_sr_sel), .sr_wrow(vr_sr_wrow),
    .sr_wword(vr_sr_wword), .sr_wdata(vr_sr_wdata),
    .cb_we(vr_cb_we), .cb_sel(vr_cb_sel), .cb_wrow(vr_cb_wrow),
    .cb_wword(vr_cb_wword), .cb_wdata(vr_cb_wdata),
    .start(vr_start), .busy(vr_busy), .done(vr_done), .exchange(vr_exchange),
    .best(vr_best)
  );

endmodule
