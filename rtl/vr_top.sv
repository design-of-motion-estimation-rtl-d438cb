// vr_top: motion estimator with vertical data reuse.
//
// NPE vertically adjacent current blocks (a column of 16x16 macroblocks) are
// searched at the same time, each over a -16..+15 range.  Their search
// ranges overlap vertically by two thirds, so the union - a strip
// 48 pixels wide and 16*(NPE+2) rows high - is stored once, cut into NPE+2
// memory modules M0..M(NPE+1) of 16 rows each.  Block k's search range is
// modules M(k), M(k+1), M(k+2); PE k is wired to exactly those three, and
// neighbouring PEs share modules.  Because every PE reads all its modules at
// the same row and column, each module is read at one address per clock and
// no multi-port memory is needed; the price is that a candidate's rows come
// from two modules, handled by the line exchange inside each PE (vr_pe).
//
// Structure: NPE current block buffers CB0.., NPE+2 search range modules,
// NPE PEs (each with its 128-bit input multiplexer and two SAD halves), NPE
// selection units (vr_cs) and the controller (vr_ctrl).
//
// Interface: load CB k and module m through the 32-bit word ports while
// idle (module rows are strip rows 16m .. 16m+15), pulse `start`, wait for
// `done`; best[k] then holds block k's SAD and motion vector.  `exchange` is
// high on clocks where the PEs swap their results (wrap), for observation.
// Timing: 8192 line clocks per search of NPE blocks (+2, see vr_ctrl), i.e.
// 2048 clocks per block on average with NPE = 4.
//
// The partition into NPE+2 modules of 16x48 pixels, the wiring of PE k to
// M(k)..M(k+2), the two-half PE and the shared addressing follow the source
// architecture; the load ports and the per-block selection are this design's.
module vr_top
  import me_pkg::*;
#(
  parameter int unsigned NPE = 4,
  localparam int unsigned NMOD = NPE + 2,
  localparam int unsigned SR   = 16,
  localparam int unsigned SRW  = 3 * 16,   // module width, 48 pixels
  localparam int unsigned NH   = 2 * SR    // horizontal offsets
) (
  input  logic        clk,
  input  logic        rst_n,
  // search range module loading
  input  logic        sr_we,
  input  logic [$clog2(NMOD)-1:0] sr_sel,
  input  logic [3:0]  sr_wrow,
  input  logic [3:0]  sr_wword,     // 12 words per 48-pixel row
  input  logic [31:0] sr_wdata,
  // current block loading
  input  logic        cb_we,
  input  logic [$clog2(NPE)-1:0] cb_sel,
  input  logic [3:0]  cb_wrow,
  input  logic [1:0]  cb_wword,
  input  logic [31:0] cb_wdata,
  // command / result
  input  logic        start,
  output logic        busy,
  output logic        done,
  output logic        exchange,
  output me_result_t  best [NPE]
);

  logic       clear, valid, first, wrap, cs_valid;
  logic [3:0] cur_row, mem_row;
  logic [$clog2(NH)-1:0] col, cs_hx;
  logic [3:0] cs_t;

  logic [127:0] mod_rd [NMOD];
  logic [127:0] cb_rd  [NPE];
  logic [15:0]  sad_a  [NPE];
  logic [15:0]  sad_b  [NPE];

  vr_ctrl #(.NH(NH)) u_ctrl (
    .clk, .rst_n, .start, .busy, .done, .clear, .valid, .first, .wrap,
    .cur_row, .mem_row, .col, .cs_valid, .cs_hx, .cs_t
  );

  for (genvar m = 0; m < NMOD; m++) begin : g_mod
    pixel_buffer #(.ROWS(16), .COLS(SRW), .RD_PIX(16)) u_m (
      .clk, .we(sr_we && int'(sr_sel) == m), .wrow(sr_wrow), .wword(sr_wword),
      .wdata(sr_wdata), .rrow(mem_row), .rcol(6'(col)), .rdata(mod_rd[m])
    );
  end

  for (genvar k = 0; k < NPE; k++) begin : g_blk
    pixel_buffer #(.ROWS(16), .COLS(16), .RD_PIX(16)) u_cb (
      .clk, .we(cb_we && int'(cb_sel) == k), .wrow(cb_wrow), .wword(cb_wword),
      .wdata(cb_wdata), .rrow(cur_row), .rcol('0), .rdata(cb_rd[k])
    );

    vr_pe u_pe (
      .clk, .rst_n, .valid, .first, .wrap, .cur(cb_rd[k]),
      .m_lo(mod_rd[k]), .m_mid(mod_rd[k+1]), .m_hi(mod_rd[k+2]),
      .sad_a(sad_a[k]), .sad_b(sad_b[k])
    );

    vr_cs #(.SR(SR)) u_cs (
      .clk, .rst_n, .clear, .valid(cs_valid), .sad_a(sad_a[k]), .sad_b(sad_b[k]),
      .hx(6'(cs_hx)), .t(cs_t), .best(best[k])
    );
  end

  assign exchange = valid && wrap;

endmodule
