// vbs_ctrl: control unit of the variable block size engine.
//
// Full-search raster scan (x fastest) over NPOS x NPOS candidate positions.
// For the candidate at (x, y) it presents line l = 0..15 on consecutive
// clocks: current MB row l and search range row y + l, columns x .. x+15.
// A `skip` from the compare-and-select unit, or the end of line 15, moves to
// line 0 of the next candidate on the following clock, so a candidate
// terminated after k lines costs exactly k clocks.
// After the last candidate one clock lets the final sub-blocks be taken,
// then `done` is high for one clock.
//
// Clocks from the clock after `start` to `done` inclusive: (lines processed) + 2;
// 16 * NPOS * NPOS + 2 = 4098 without any termination at NPOS = 16.
// The scan (full search, raster, one line per clock, advance on SKIP) follows
// the source; the clear/done handshake is this design's.
module vbs_ctrl #(
  parameter int unsigned NPOS = 16,
  localparam int unsigned PW  = $clog2(NPOS)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          skip,
  output logic          busy,
  output logic          done,
  output logic          clear,
  output logic          line_valid,
  output logic [3:0]    line,
  output logic [PW-1:0] cand_x,
  output logic [PW-1:0] cand_y
);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_TAIL, S_DONE} state_e;
  state_e state;

  assign busy       = (state != S_IDLE);
  assign done       = (state == S_DONE);
  assign clear      = (state == S_IDLE) && start;
  assign line_valid = (state == S_RUN);

  logic next_cand, last_cand;
  assign next_cand = line_valid && (skip || line == 4'd15);
  assign last_cand = (int'(cand_x) == NPOS - 1) && (int'(cand_y) == NPOS - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      line   <= '0;
      cand_x <= '0;
      cand_y <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          state  <= S_RUN;
          line   <= '0;
          cand_x <= '0;
          cand_y <= '0;
        end
        S_RUN: begin
          if (next_cand) begin
            line <= '0;
            if (last_cand) begin
              state <= S_TAIL;
            end else if (int'(cand_x) == NPOS - 1) begin
              cand_x <= '0;
              cand_y <= cand_y + 1'b1;
            end else begin
              cand_x <= cand_x + 1'b1;
            end
          end else begin
            line <= line + 4'd1;
          end
        end
        S_TAIL: state <= S_DONE;
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
