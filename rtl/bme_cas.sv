// bme_cas: compare-and-select unit of the binary motion estimator.
//
// When `valid` is high, the SADs of all candidates flagged in `match` (up to
// NPE horizontally adjacent candidates computed in the same 16-cycle slot) are
// compared, and the smallest one replaces the stored best if it is strictly
// smaller.  Ties keep the earlier candidate: earlier pass, earlier row, then
// the lower PE index (leftmost candidate).  `clear` starts a new search.
//
// Candidate i of pass p at vertical position v (0..31 within the pass) has
// the motion vector x = HSTEP*p + i - SR, y = v - SR, with SR = 16 for the
// -16..+15 search range.
//
// Timing: the result registers update on the clock edge where valid is high.
// `found` stays low if no candidate matched at all during the search.
// The function (select the MV of minimal SAD) follows the source; the tie
// rule and the `found` flag are choices of this design.
module bme_cas
  import me_pkg::*;
#(
  parameter int unsigned NPE   = 16,
  parameter int unsigned SR    = 16,
  parameter int unsigned HSTEP = 16
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           clear,
  input  logic           valid,
  input  logic [NPE-1:0] match,
  input  logic [8:0]     sad [NPE],
  input  logic           pass,
  input  logic [5:0]     vpos,
  output logic [8:0]     best_sad,
  output mv_t            best_mv,
  output logic           found
);

  logic [8:0] slot_sad;
  logic [$clog2(NPE)-1:0] slot_idx;
  logic       slot_any;

  always_comb begin
    slot_sad = '1;
    slot_idx = '0;
    slot_any = 1'b0;
    for (int i = 0; i < NPE; i++) begin
      if (match[i] && (!slot_any || sad[i] < slot_sad)) begin
        slot_sad = sad[i];
        slot_idx = ($clog2(NPE))'(i);
        slot_any = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      best_sad <= '1;
      best_mv  <= '0;
      found    <= 1'b0;
    end else if (clear) begin
      best_sad <= '1;
      best_mv  <= '0;
      found    <= 1'b0;
    end else if (valid && slot_any && (!found || slot_sad < best_sad)) begin
      best_sad  <= slot_sad;
      best_mv.x <= mvc_t'(int'(pass) * int'(HSTEP) + int'(slot_idx) - int'(SR));
      best_mv.y <= mvc_t'(int'(vpos) - int'(SR));
      found     <= 1'b1;
    end
  end

endmodule
