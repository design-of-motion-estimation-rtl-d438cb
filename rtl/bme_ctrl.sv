// bme_ctrl: control and address generation of the binary motion estimator.
//
// One search (start -> done) runs these steps:
//   CUR   16 clocks  count the ones of the current BAB (rows 0..15) in PE 0,
//                    with the search-range input forced to zero.
//   per pass p = 0, 1 (candidates with x offsets 16p .. 16p+15):
//   INIT  16 clocks  count the ones of the 16 candidates at vertical position 0
//                    (search rows 0..15, current input forced to zero).
//   POS   at vertical position v the counts are valid and the class match is
//                    looked at in the same clock:
//                    - some PE matches: this clock is SAD row 0, followed by
//                      SAD rows 1..15 (matching PEs only) and one EVAL clock
//                      in which the compare-and-select unit takes the SADs;
//                    - no match: this clock adds row v+16 to every count.
//   SUB   subtract the expired row v from every count, then v = v + 1.
//   (EVAL also performs the add of row v+16, so a match costs 16 extra clocks.)
//   At v = 31 nothing slides; the pass ends after the POS (or EVAL) clock.
//   DONE  one clock with `done` high; the result is then stable.
//
// Clock count from the clock after `start` to the `done` clock inclusive:
//   16 + 2 * (16 + 2*31 + 1) + 16 * SP + 1 = 175 + 16 * SP,
// where SP is the number of (pass, row) slots in which at least one candidate
// matched.  This follows the source's schedule (16 clocks for the current
// BAB, 16 per pass for the first window, 2 clocks per slide, 16 per matched
// slot, matches in the same slot processed together); the single clocks at
// pass ends and the DONE clock are this design's.
module bme_ctrl
  import me_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic       any_match,
  output logic       busy,
  output logic       done,
  output bme_op_e    pe_op,      // operation for the PEs
  output logic       pe0_only,   // only PE 0 takes pe_op (current BAB count)
  output logic       sad_phase,  // pe_op is a SAD op: matching PEs only
  output logic       cur_sel,    // 1: current row into the XOR, 0: zero
  output logic       ref_zero,   // force the search-range input to zero
  output logic [5:0] sr_raddr,
  output logic [3:0] cur_raddr,
  output logic       pass,
  output logic [5:0] vpos,
  output logic       cur_latch,  // store PE 0's count as the current BAB count
  output logic       cas_clear,
  output logic       cas_valid
);

  typedef enum logic [2:0] {S_IDLE, S_CUR, S_INIT, S_POS, S_SAD, S_EVAL, S_SUB, S_DONE} state_e;

  state_e     state;
  logic [3:0] r;        // row counter within CUR/INIT/SAD
  logic [5:0] v;        // vertical candidate position within the pass
  logic       p;        // pass

  assign busy = (state != S_IDLE);
  assign done = (state == S_DONE);
  assign pass = p;
  assign vpos = v;

  // Datapath controls, decoded from the state.
  always_comb begin
    pe_op     = BME_NOP;
    pe0_only  = 1'b0;
    sad_phase = 1'b0;
    cur_sel   = 1'b0;
    ref_zero  = 1'b0;
    sr_raddr  = '0;
    cur_raddr = r;
    cur_latch = 1'b0;
    cas_clear = 1'b0;
    cas_valid = 1'b0;
    unique case (state)
      S_IDLE: cas_clear = start;
      S_CUR: begin
        pe_op    = (r == 0) ? BME_CNT_LD : BME_CNT_ADD;
        pe0_only = 1'b1;
        cur_sel  = 1'b1;
        ref_zero = 1'b1;
      end
      S_INIT: begin
        pe_op     = (r == 0) ? BME_CNT_LD : BME_CNT_ADD;
        sr_raddr  = 6'(r);
        cur_latch = (r == 0) && !p;
      end
      S_POS: begin
        if (any_match) begin
          pe_op     = BME_SAD_LD;
          sad_phase = 1'b1;
          cur_sel   = 1'b1;
          cur_raddr = '0;
          sr_raddr  = v;
        end else if (v != 6'd31) begin
          pe_op    = BME_CNT_ADD;
          sr_raddr = v + 6'd16;
        end
      end
      S_SAD: begin
        pe_op     = BME_SAD_ADD;
        sad_phase = 1'b1;
        cur_sel   = 1'b1;
        sr_raddr  = v + 6'(r);
      end
      S_EVAL: begin
        cas_valid = 1'b1;
        if (v != 6'd31) begin
          pe_op    = BME_CNT_ADD;
          sr_raddr = v + 6'd16;
        end
      end
      S_SUB: begin
        pe_op    = BME_CNT_SUB;
        sr_raddr = v;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      r     <= '0;
      v     <= '0;
      p     <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          state <= S_CUR;
          r     <= '0;
          p     <= 1'b0;
        end
        S_CUR: begin
          r <= r + 4'd1;
          if (r == 4'd15) state <= S_INIT;
        end
        S_INIT: begin
          r <= r + 4'd1;
          if (r == 4'd15) begin
            state <= S_POS;
            v     <= '0;
          end
        end
        S_POS: begin
          if (any_match) begin
            state <= S_SAD;
            r     <= 4'd1;
          end else if (v != 6'd31) begin
            state <= S_SUB;
          end else if (!p) begin
            state <= S_INIT;
            p     <= 1'b1;
            r     <= '0;
          end else begin
            state <= S_DONE;
          end
        end
        S_SAD: begin
          r <= r + 4'd1;
          if (r == 4'd15) state <= S_EVAL;
        end
        S_EVAL: begin
          if (v != 6'd31) begin
            state <= S_SUB;
          end else if (!p) begin
            state <= S_INIT;
            p     <= 1'b1;
            r     <= '0;
          end else begin
            state <= S_DONE;
          end
        end
        S_SUB: begin
          v     <= v + 6'd1;
          state <= S_POS;
        end
        S_DONE: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // Handshake rules: `start` is honoured only while idle, and `done` lasts a
  // single clock, after which the controller is idle again.
  a_start_idle: assert property (@(posedge clk) start |-> !busy)
    else $error("start while busy is ignored");
  a_done_pulse: assert property (@(posedge clk) done |=> !done && !busy);

endmodule
