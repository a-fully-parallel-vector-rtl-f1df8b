// vq_output_fifo: FIFO of winner codes, used in the master chip only.
//
// Holds DEPTH codes of W bits (11-bit global code). Show-ahead: rdata is the
// oldest entry while valid is 1, and rd removes it. full is used as the
// hold signal that keeps every chip from starting a new segment, so a write
// while full never happens in the processor; an assertion checks it. The
// depth is this design's choice. Reset empties it.
module vq_output_fifo #(
  parameter int DEPTH = 64,
  parameter int W     = 11
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         wr,
  input  logic [W-1:0] wdata,
  output logic         full,
  input  logic         rd,
  output logic         valid,
  output logic [W-1:0] rdata,
  output logic [$clog2(DEPTH):0] count
);

  localparam int AW = $clog2(DEPTH);

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wp, rp;
  logic          do_wr, do_rd;

  assign full  = (count == (AW+1)'(DEPTH));
  assign valid = (count != '0);
  assign do_wr = wr && !full;
  assign do_rd = rd && valid;
  assign rdata = mem[rp];

  always_ff @(posedge clk) begin
    if (do_wr) mem[wp] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (do_wr) wp <= (wp == AW'(DEPTH-1)) ? '0 : wp + 1'b1;
      if (do_rd) rp <= (rp == AW'(DEPTH-1)) ? '0 : rp + 1'b1;
      count <= count + (AW+1)'(do_wr) - (AW+1)'(do_rd);
    end
  end

  a_no_write_when_full: assert property (@(posedge clk) disable iff (rst) !(wr && full))
    else $error("vq_output_fifo: write while full");

endmodule
