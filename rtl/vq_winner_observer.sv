// vq_winner_observer: encodes where the winner flag of a WTA stage is.
//
// A ladder passes only the lowest-numbered set flag (each position is
// blocked by any set flag below it), so if a tie leaves several winners the
// one with the smaller code number is kept and the others are ignored. The
// surviving one-hot flag is then encoded into a binary code. Purely
// combinational. any is 1 when at least one flag is set.
module vq_winner_observer #(
  parameter int N = 8,
  localparam int CW = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0]  flags,
  output logic [N-1:0]  grant,    // one-hot: the lowest set flag
  output logic [CW-1:0] code,
  output logic          any
);

  logic below;                    // a flag below the current position is set

  always_comb begin
    below = 1'b0;
    for (int i = 0; i < N; i++) begin
      grant[i] = flags[i] & ~below;
      below    = below | flags[i];
    end
    any  = below;
    code = '0;
    for (int i = 0; i < N; i++)
      code |= grant[i] ? CW'(i) : '0;
  end

endmodule
