// bme_class_match: class comparison circuit of the binary motion estimator.
//
// Every BAB (current or candidate) is put in a class by its number of one
// pixels.  With a class width of 2**class_shift pixels, a count n belongs to
// class ceil(n / 2**class_shift): for class_shift = 4 this gives the 16-class
// table (1..16 -> class 1, 17..32 -> class 2, ..., 241..256 -> class 16);
// class_shift = 0 gives one class per count.  A candidate matches when its
// class differs from the current BAB's class by no more than `overlap`
// classes (overlap = 0: same class only).  Only matching candidates have
// their SAD computed.
//
// Purely combinational.  The classification rule and the overlap idea follow
// the source algorithm; reading "N classes overlapping" as an absolute class
// distance and making the width and overlap run-time inputs are choices of
// this design.
module bme_class_match #(
  parameter int unsigned NPE = 16
) (
  input  logic [8:0]     cur_count,          // ones in the current BAB
  input  logic [8:0]     cand_count [NPE],   // ones in each candidate BAB
  input  logic [2:0]     class_shift,        // log2 of the class width, 0..4 used
  input  logic [8:0]     overlap,            // accepted class distance
  output logic [NPE-1:0] match
);

  function automatic logic [8:0] class_of(input logic [8:0] n, input logic [2:0] sh);
    logic [9:0] rounded;
    rounded = 10'(n) + ((10'd1 << sh) - 10'd1);
    return 9'(rounded >> sh);
  endfunction

  logic [8:0] cur_class;
  assign cur_class = class_of(cur_count, class_shift);

  always_comb begin
    for (int i = 0; i < NPE; i++) begin
      logic [8:0] c, cdist;
      c    = class_of(cand_count[i], class_shift);
      cdist = (c > cur_class) ? (c - cur_class) : (cur_class - c);
      match[i] = (cdist <= overlap);
    end
  end

endmodule
