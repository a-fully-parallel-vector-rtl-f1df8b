// vq_ava_cell: absolute-value-and-accumulate cell, one per template.
//
// Forms |t - x| for one 8-bit element pair per cycle and adds it into a
// 12-bit accumulator, so that after 16 elements the accumulator holds the
// Manhattan distance between the input vector and this cell's template.
// The subtraction follows the original chip: the input
// element is inverted and added to the template element with a carry-in of
// 1. A carry out of 1 means t >= x and the sum is used as is; a carry out of
// 0 means the result is negative, and the sum is inverted by XOR gates. The
// XOR output and the "negative" flag are captured in the 8-bit register; the
// flag is then fed as carry-in of the accumulator adder, which supplies the
// +1 that completes the two's complement (this carry-in placement is this
// design's choice).
//
// Timing: x and t are registered memory outputs. diff_en captures |t - x|
// at the end of the cycle; acc_en adds the register one cycle later.
// acc_clr clears the accumulator (it has priority over acc_en).
module vq_ava_cell #(
  parameter int ELEM_W = 8,
  parameter int ACC_W  = 12
) (
  input  logic              clk,
  input  logic [ELEM_W-1:0] x,        // input-vector element
  input  logic [ELEM_W-1:0] t,        // template element
  input  logic              diff_en,
  input  logic              acc_clr,
  input  logic              acc_en,
  output logic [ACC_W-1:0]  acc
);

  logic [ELEM_W:0]   sum;        // {carry, sum} of t + ~x + 1
  logic              neg;        // carry out 0: t < x
  logic [ELEM_W-1:0] mag_xor;    // sum or its one's complement
  logic [ELEM_W-1:0] diff_q;     // the 8-bit register
  logic              neg_q;

  always_comb begin
    sum     = {1'b0, t} + {1'b0, ~x} + {{ELEM_W{1'b0}}, 1'b1};
    neg     = ~sum[ELEM_W];
    mag_xor = sum[ELEM_W-1:0] ^ {ELEM_W{neg}};
  end

  always_ff @(posedge clk) begin
    if (diff_en) begin
      diff_q <= mag_xor;
      neg_q  <= neg;
    end
    if (acc_clr)
      acc <= '0;
    else if (acc_en)
      acc <= acc + ACC_W'(diff_q) + ACC_W'(neg_q);
  end

endmodule
