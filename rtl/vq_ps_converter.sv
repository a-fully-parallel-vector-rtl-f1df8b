// vq_ps_converter: 12-bit parallel-to-serial register between the two
// pipeline segments.
//
// At the end of the distance segment the accumulator value is loaded here;
// during the next segment it is shifted out most significant bit first, one
// bit per cycle, into the winner-take-all circuit. Freeing the accumulator
// this way lets the next vector's distance be computed while the current
// one competes. load has priority over shift; bit_o is the current MSB.
module vq_ps_converter #(
  parameter int W = 12
) (
  input  logic         clk,
  input  logic         load,
  input  logic [W-1:0] din,
  input  logic         shift,
  output logic         bit_o
);

  logic [W-1:0] sr;

  always_ff @(posedge clk) begin
    if (load)       sr <= din;
    else if (shift) sr <= {sr[W-2:0], 1'b0};
  end

  assign bit_o = sr[W-1];

endmodule
