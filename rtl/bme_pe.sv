// bme_pe: processing element of the binary motion estimator.
//
// Datapath: a 16-bit XOR of one current-BAB row and one candidate row, an
// adder tree that counts the ones of the XOR result, and one accumulator that
// can add or subtract the tree output.  Two result registers sit behind the
// accumulator:
//   count_reg - number of ones in the candidate BAB.  The current-row input is
//               forced to zero by the caller, so the tree counts the candidate
//               row itself.  The count is built over 16 rows, then kept up to
//               date while the window slides down one row: add the new bottom
//               row (op CNT_ADD), subtract the expired top row (op CNT_SUB).
//   sad_reg   - binary SAD (number of differing pixels) of the candidate,
//               accumulated over 16 rows, one row per clock.
//
// The XOR / adder tree / add-subtract accumulator structure and the two
// registers follow the source architecture.  The op encoding, the 9-bit
// register width (a full BAB has 256 ones) and the synchronous clear variants
// are choices of this design.
//
// Timing: op is applied at the rising edge; the registers show the result one
// clock later.
module bme_pe
  import me_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [15:0] cur_row,   // current BAB row (or zero when counting)
  input  logic [15:0] ref_row,   // candidate BAB row
  input  bme_op_e     op,
  output logic [8:0]  count_reg,
  output logic [8:0]  sad_reg
);

  logic [4:0] tree;
  logic [8:0] acc_in, acc_out;
  logic       sub;

  assign tree = popcount16(cur_row ^ ref_row);

  // One accumulator shared by both registers.
  always_comb begin
    unique case (op)
      BME_CNT_LD, BME_SAD_LD: acc_in = '0;
      BME_CNT_ADD, BME_CNT_SUB: acc_in = count_reg;
      default: acc_in = sad_reg;
    endcase
    sub     = (op == BME_CNT_SUB);
    acc_out = sub ? (acc_in - 9'(tree)) : (acc_in + 9'(tree));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count_reg <= '0;
      sad_reg   <= '0;
    end else begin
      unique case (op)
        BME_CNT_LD, BME_CNT_ADD, BME_CNT_SUB: count_reg <= acc_out;
        BME_SAD_LD, BME_SAD_ADD:             sad_reg   <= acc_out;
        default: ;
      endcase
    end
  end

endmodule
