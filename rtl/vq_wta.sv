// vq_wta: bit-serial winner-take-all (minimum search) over N distances.
//
// Every input has a state flag: 1 = still a candidate, 0 = withdrawn. All
// flags are set by init. Then the distances arrive one bit per cycle, most
// significant bit first, on bits_i. For each input an OR gate passes the bit
// if the flag is 1 and forces a 1 otherwise, so withdrawn inputs cannot win.
// A common N-input AND of the passed bits is the bit of the minimum distance
// (min_bit_o). Each candidate whose passed bit differs from that AND output
// is withdrawn. After all distance bits, the flags that remain mark the
// minimum (several flags remain on a tie). The serial min_bit_o stream is
// the minimum distance itself and feeds the next competition stage in the
// same cycle.
//
// The flag update keeps the old flag in the product (flag & passed==min);
// this is what stops a withdrawn input from being revived on a cycle where
// the minimum bit is 1, and is this design's reading of the comparator.
// Used with N = 64 (first stage), 4 (second) and 8 (third).
module vq_wta #(
  parameter int N = 64
) (
  input  logic         clk,
  input  logic         init,      // set every flag to 1
  input  logic         en,        // compete on the bits now present
  input  logic [N-1:0] bits_i,
  output logic         min_bit_o,
  output logic [N-1:0] flags_o
);

  logic [N-1:0] passed;
  logic [N-1:0] same;

  always_comb begin
    passed    = bits_i | ~flags_o;
    min_bit_o = &passed;
    same      = ~(passed ^ {N{min_bit_o}});
  end

  always_ff @(posedge clk) begin
    if (init)    flags_o <= '1;
    else if (en) flags_o <= flags_o & same;
  end

endmodule
