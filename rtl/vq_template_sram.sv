// vq_template_sram: template store of one 64-vector matching block.
//
// 64 templates x 16 elements x 8 bits = 8 Kbit. Before operation the
// templates are written one element at a time (we, wr_vec, wr_elem,
// wr_data). During operation one read returns the same element of all 64
// templates at once (rd_data[j] = element rd_elem of template j), so all 64
// distance cells are fed in parallel. Read latency is one cycle. Organised
// as 16 words of 64 bytes with a byte write; written as an array, not as a
// process SRAM macro.
module vq_template_sram
  import vq_pkg::*;
#(
  parameter int N_TMPL = 64
) (
  input  logic                           clk,
  input  logic                           we,
  input  logic [$clog2(N_TMPL)-1:0]      wr_vec,
  input  elem_idx_t                      wr_elem,
  input  logic [ELEM_W-1:0]              wr_data,
  input  logic                           rd_en,
  input  elem_idx_t                      rd_elem,
  output logic [N_TMPL-1:0][ELEM_W-1:0]  rd_data
);

  logic [N_TMPL-1:0][ELEM_W-1:0] mem [N_ELEMS];

  always_ff @(posedge clk) begin
    if (we)    mem[wr_elem][wr_vec] <= wr_data;
    if (rd_en) rd_data <= mem[rd_elem];
  end

endmodule
