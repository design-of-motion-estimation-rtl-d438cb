// vr_ctrl: control and address generation of the vertical data reuse engine.
//
// Scan order is vertical first: for every horizontal offset hx = 0..NH-1 it
// runs the time slots t = 0..15, and in every slot the lines l = 0..15, one
// per clock.  All PEs, all search range modules and all current block
// buffers share the same addresses:
//   current block row  = l
//   module row         = (t + l) mod 16
//   module column      = hx (16 pixels read from there)
//   wrap               = (t + l >= 16), the PE line exchange select
// so the PEs evaluate the candidates (hx, t) and (hx, t + 16) of every block
// in the 16 clocks of slot t.  On the clock after line 15 `cs_valid` hands the
// two SADs of every PE, with the slot's hx and t, to the selection units.
//
// Clocks from the clock after `start` to `done` inclusive: 16*16*NH + 2,
// i.e. 8194 for the -16..+15 range (NH = 32) and four current blocks.
// The shared, unchanged addressing and the exchange rule follow the source's
// timing table; the scan loops' nesting order and the handshake are this
// design's.
module vr_ctrl #(
  parameter int unsigned NH = 32,
  localparam int unsigned HW = $clog2(NH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  output logic          busy,
  output logic          done,
  output logic          clear,
  output logic          valid,
  output logic          first,
  output logic          wrap,
  output logic [3:0]    cur_row,
  output logic [3:0]    mem_row,
  output logic [HW-1:0] col,
  output logic          cs_valid,
  output logic [HW-1:0] cs_hx,
  output logic [3:0]    cs_t
);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_TAIL, S_DONE} state_e;
  state_e state;

  logic [3:0]    l, t;
  logic [HW-1:0] hx;
  logic [4:0]    tl;

  assign busy    = (state != S_IDLE);
  assign done    = (state == S_DONE);
  assign clear   = (state == S_IDLE) && start;
  assign valid   = (state == S_RUN);
  assign first   = (l == 4'd0);
  assign tl      = 5'(t) + 5'(l);
  assign wrap    = tl[4];
  assign mem_row = tl[3:0];
  assign cur_row = l;
  assign col     = hx;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      l        <= '0;
      t        <= '0;
      hx       <= '0;
      cs_valid <= 1'b0;
      cs_hx    <= '0;
      cs_t     <= '0;
    end else begin
      cs_valid <= valid && (l == 4'd15);
      if (valid && l == 4'd15) begin
        cs_hx <= hx;
        cs_t  <= t;
      end
      unique case (state)
        S_IDLE: if (start) begin
          state <= S_RUN;
          l     <= '0;
          t     <= '0;
          hx    <= '0;
        end
        S_RUN: begin
          l <= l + 4'd1;
          if (l == 4'd15) begin
            t <= t + 4'd1;
            if (t == 4'd15) begin
              if (int'(hx) == NH - 1) state <= S_TAIL;
              else                    hx <= hx + 1'b1;
            end
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
