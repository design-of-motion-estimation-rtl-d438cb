// bme_top: binary motion estimator for MPEG-4 shape coding.
//
// It finds the motion vector of a 16x16 binary alpha block (BAB) in a
// -16..+15 search range (a 48x48-pixel binary window) by comparing BABs by
// their number of one pixels first: only candidates whose class (count of
// ones, quantised to a class width) matches the current BAB's class get their
// SAD (count of differing pixels) computed.  All other positions are skipped
// after a 2-clock sliding update of their count.
//
// Structure: current BAB buffer (16x16 bit), search range buffer (48x48 bit),
// a 2:1 multiplexer that feeds either the current row or zero to the PEs,
// 16 PEs, the current-BAB count register (CurrMB), the class comparison
// circuit, the compare-and-select unit and the controller.  The 48-bit search
// row is cut to a 31-bit window per pass (columns 16p .. 16p+30), and PE i
// gets window bits for columns 16p+i .. 16p+i+15 by fixed wiring, so the 16
// PEs see 16 horizontally adjacent candidates.  Two passes cover the 32
// horizontal offsets; each pass slides down 32 rows.
//
// Interface: load the buffers through the row write ports while idle, pulse
// `start`, wait for `done`.  best_mv / best_sad / found then hold the result
// until the next start.  Cycle count: see bme_ctrl (175 + 16 * SP clocks).
//
// The buffer sizes, 16 PEs, the hard-wired data dispatch, the zero/current
// multiplexer, the per-PE count registers and the two-pass sliding scan follow
// the source architecture; the class rule parameters are run-time inputs
// here, and the exact state sequence is this design's.
//
// Bit 0 of a search row (column 47) is never read: the second pass window
// ends at column 46, because the last horizontal offset (+15) starts at
// column 31.  A lint tool reports that bit as unused; it stands by design.
module bme_top
  import me_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // buffer loading
  input  logic        cur_we,
  input  logic [3:0]  cur_waddr,
  input  logic [15:0] cur_wdata,
  input  logic        sr_we,
  input  logic [5:0]  sr_waddr,
  input  logic [47:0] sr_wdata,
  // class rule
  input  logic [2:0]  class_shift,
  input  logic [8:0]  overlap,
  // command / result
  input  logic        start,
  output logic        busy,
  output logic        done,
  output logic [8:0]  best_sad,
  output mv_t         best_mv,
  output logic        found,
  output logic [8:0]  cur_count,
  output logic        slot_match      // a matched slot is being processed (SAD)
);

  // Fixed geometry of the source design.
  localparam int unsigned NPE     = 16;
  localparam int unsigned SR_ROWS = 48;
  localparam int unsigned SR_W    = 48;
  localparam int unsigned WIN     = NPE + 15;   // 31-bit window per pass

  logic [15:0] cur_row;
  logic [47:0] sr_row;
  logic [WIN-1:0] win;
  logic [15:0] mux_cur;

  bme_op_e    pe_op;
  logic       pe0_only, sad_phase, cur_sel, ref_zero, cur_latch, cas_clear, cas_valid;
  logic [5:0] sr_raddr, vpos;
  logic [3:0] cur_raddr;
  logic       pass;

  logic [8:0] count [NPE];
  logic [8:0] sad   [NPE];
  logic [NPE-1:0] match;

  bit_row_buffer #(.ROWS(16), .WIDTH(16)) u_cur_buf (
    .clk, .we(cur_we), .waddr(cur_waddr), .wdata(cur_wdata),
    .raddr(cur_raddr), .rdata(cur_row)
  );

  bit_row_buffer #(.ROWS(SR_ROWS), .WIDTH(SR_W)) u_sr_buf (
    .clk, .we(sr_we), .waddr(sr_waddr), .wdata(sr_wdata),
    .raddr(sr_raddr), .rdata(sr_row)
  );

  // Window of the pass: pass 0 -> columns 0..30, pass 1 -> columns 16..46.
  assign win     = ref_zero ? '0 : (pass ? sr_row[SR_W-1-16 -: WIN] : sr_row[SR_W-1 -: WIN]);
  assign mux_cur = cur_sel ? cur_row : '0;

  for (genvar i = 0; i < NPE; i++) begin : g_pe
    bme_op_e op_i;
    always_comb begin
      if (pe0_only)       op_i = (i == 0) ? pe_op : BME_NOP;
      else if (sad_phase) op_i = match[i] ? pe_op : BME_NOP;
      else                op_i = pe_op;
    end
    bme_pe u_pe (
      .clk, .rst_n,
      .cur_row  (mux_cur),
      .ref_row  (win[WIN-1-i -: 16]),
      .op       (op_i),
      .count_reg(count[i]),
      .sad_reg  (sad[i])
    );
  end

  // CurrMB register.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         cur_count <= '0;
    else if (cur_latch) cur_count <= count[0];
  end

  bme_class_match #(.NPE(NPE)) u_match (
    .cur_count, .cand_count(count), .class_shift, .overlap, .match
  );

  bme_ctrl u_ctrl (
    .clk, .rst_n, .start, .any_match(|match), .busy, .done,
    .pe_op, .pe0_only, .sad_phase, .cur_sel, .ref_zero,
    .sr_raddr, .cur_raddr, .pass, .vpos, .cur_latch, .cas_clear, .cas_valid
  );

  bme_cas #(.NPE(NPE), .SR(16), .HSTEP(NPE)) u_cas (
    .clk, .rst_n, .clear(cas_clear), .valid(cas_valid), .match, .sad,
    .pass, .vpos, .best_sad, .best_mv, .found
  );

  assign slot_match = sad_phase;

endmodule
