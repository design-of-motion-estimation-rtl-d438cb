// vr_pe: processing element of the vertical data reuse engine.
//
// A PE serves one current block and evaluates two candidates of it at the
// same time: the "top" candidate at vertical offset t (0..15) and the
// "bottom" candidate at t + 16, both at the same horizontal offset.  It has
// two halves, PE_a and PE_b, each a 16-pixel line SAD unit (sad_line16):
//   PE_a reads memory module M(k) or M(k+2) through the 128-bit input
//        multiplexer,
//   PE_b reads memory module M(k+1).
// All modules are read at the same row address, (t + l) mod 16 on line l, so
// line l of the current block meets row t + l of the search range:
//   wrap = 0 (t + l < 16): PE_a works on M(k) rows for the top candidate and
//                          PE_b on M(k+1) rows for the bottom candidate;
//   wrap = 1 (t + l >= 16): the top candidate's row now lies in M(k+1), which
//                          only PE_b sees, and the bottom candidate's row in
//                          M(k+2), which PE_a sees.  MUX_a / MUX_b swap the two
//                          results so that reg_a still accumulates the top
//                          candidate and reg_b the bottom one.
// After 16 lines reg_a and reg_b hold the two 16x16 SADs.
//
// Timing: one line per clock while `valid`; `first` marks line 0 and
// restarts both accumulators.  sad_a / sad_b are valid on the clock after
// line 15.
// The two-half structure, the line exchange and the unchanged addressing
// follow the source architecture; only the 16x16 SAD is accumulated here.
// The group and half sums that sad_line16 also offers (for smaller blocks)
// are therefore left unconnected, and a lint tool reports them as unused.
module vr_pe
  import me_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         valid,
  input  logic         first,
  input  logic         wrap,
  input  logic [127:0] cur,
  input  logic [127:0] m_lo,    // M(k)
  input  logic [127:0] m_mid,   // M(k+1)
  input  logic [127:0] m_hi,    // M(k+2)
  output logic [15:0]  sad_a,   // reg_a: top candidate
  output logic [15:0]  sad_b    // reg_b: bottom candidate
);

  logic [127:0] a_in;
  logic [11:0]  ad_a, ad_b;
  logic [9:0]   ga [4], gb [4];
  logic [10:0]  ha [2], hb [2];

  assign a_in = wrap ? m_hi : m_lo;

  sad_line16 u_ad_a (.cur, .ref_px(a_in),  .g(ga), .h(ha), .total(ad_a));
  sad_line16 u_ad_b (.cur, .ref_px(m_mid), .g(gb), .h(hb), .total(ad_b));

  logic [11:0] to_a, to_b;
  assign to_a = wrap ? ad_b : ad_a;   // MUX_a
  assign to_b = wrap ? ad_a : ad_b;   // MUX_b

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sad_a <= '0;
      sad_b <= '0;
    end else if (valid) begin
      sad_a <= (first ? 16'd0 : sad_a) + 16'(to_a);
      sad_b <= (first ? 16'd0 : sad_b) + 16'(to_b);
    end
  end

endmodule
