// vq_input_fifo: input-vector FIFO of one VQ chip.
//
// A two-port memory of 128 words x 32 bits. The host writes an input vector
// as four 32-bit words of four 8-bit elements each (element 4k+b in byte b
// of word k; the byte order is this design's choice), so the FIFO holds up
// to 64 vectors. The compute side reads the oldest (head) vector one
// element per cycle: rd_elem picks the element, the word is read from the
// memory and the byte is selected one cycle later (rd_data is valid the
// cycle after rd_en). vec_avail is 1 while at least one whole vector is
// stored; pop releases the head vector. A write while full is dropped and
// flagged by an assertion. Reset empties the FIFO (the memory itself is not
// cleared).
module vq_input_fifo
  import vq_pkg::*;
#(
  parameter int WORDS = 128,
  parameter int WIDTH = 32
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              wr,
  input  logic [WIDTH-1:0]  wdata,
  output logic              full,
  output logic              vec_avail,
  input  logic              rd_en,
  input  elem_idx_t         rd_elem,
  output logic [ELEM_W-1:0] rd_data,
  input  logic              pop
);

  localparam int EPW = WIDTH / ELEM_W;          // elements per word
  localparam int WPV = N_ELEMS / EPW;           // words per vector
  localparam int AW  = $clog2(WORDS);

  logic [WIDTH-1:0] mem [WORDS];
  logic [AW-1:0]    wp, rp;
  logic [AW:0]      count;                      // words stored
  logic [WIDTH-1:0] rd_word;
  logic [$clog2(EPW)-1:0] sel_q;
  logic             do_wr, do_pop;

  assign full      = (count == (AW+1)'(WORDS));
  assign vec_avail = (count >= (AW+1)'(WPV));
  assign do_wr     = wr && !full;
  assign do_pop    = pop && vec_avail;

  always_ff @(posedge clk) begin
    if (do_wr) mem[wp] <= wdata;
    if (rd_en) begin
      rd_word <= mem[rp + AW'(rd_elem / EPW)];
      sel_q   <= rd_elem[$clog2(EPW)-1:0];
    end
  end

  assign rd_data = rd_word[sel_q*ELEM_W +: ELEM_W];

  always_ff @(posedge clk) begin
    if (rst) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (do_wr)  wp <= wp + 1'b1;
      if (do_pop) rp <= rp + AW'(WPV);
      count <= count + (AW+1)'(do_wr) - (do_pop ? (AW+1)'(WPV) : '0);
    end
  end

  a_no_write_when_full: assert property (@(posedge clk) disable iff (rst) !(wr && full))
    else $error("vq_input_fifo: write while full");
  a_no_pop_when_empty: assert property (@(posedge clk) disable iff (rst) !(pop && !vec_avail))
    else $error("vq_input_fifo: pop without a stored vector");

endmodule
