// vq_matching_block: 64-vector matching block, the first competition stage.
//
// Holds 64 templates in its own SRAM and computes, fully in parallel, the
// Manhattan distance between the current input vector and each of them:
// every cycle one element of the input vector (broadcast from the input
// FIFO) and the same element of all 64 templates (one SRAM read) enter 64
// absolute-value-and-accumulate cells. After 16 elements the 64 12-bit
// distances are moved into 64 parallel-to-serial registers, which frees the
// accumulators for the next vector. In the following segment the distances
// are shifted out MSB first into a 64-input bit-serial winner-take-all; its
// AND output (min_bit_o) is the block's minimum distance, one bit per cycle,
// and goes on to the chip's second stage in the same cycle. The winner
// observer turns the remaining flag into the 6-bit template number (lowest
// number on a tie).
//
// Interface: ctrl comes from the chip's sequencer; x is the input element,
// valid in the cycle after ctrl.rd_en (same latency as the SRAM). code_o is
// valid once the last distance bit has been compared (phase 12 onwards) and
// stays until the next flag preset.
module vq_matching_block
  import vq_pkg::*;
#(
  parameter int N_TMPL = 64,
  localparam int TW = $clog2(N_TMPL)
) (
  input  logic              clk,
  input  vq_ctrl_t          ctrl,
  input  logic [ELEM_W-1:0] x,
  // template download
  input  logic              tmpl_we,
  input  logic [TW-1:0]     tmpl_vec,
  input  elem_idx_t         tmpl_elem,
  input  logic [ELEM_W-1:0] tmpl_data,
  // results
  output logic              min_bit_o,
  output logic [TW-1:0]     code_o,
  output logic [N_TMPL-1:0] flags_o
);

  logic [N_TMPL-1:0][ELEM_W-1:0] t_elem;
  logic [DIST_W-1:0]             dist_acc   [N_TMPL];
  logic [N_TMPL-1:0]             dbits;
  logic [N_TMPL-1:0]             grant;
  logic                          any;

  vq_template_sram #(.N_TMPL(N_TMPL)) u_sram (
    .clk     (clk),
    .we      (tmpl_we),
    .wr_vec  (tmpl_vec),
    .wr_elem (tmpl_elem),
    .wr_data (tmpl_data),
    .rd_en   (ctrl.rd_en),
    .rd_elem (ctrl.rd_elem),
    .rd_data (t_elem)
  );

  for (genvar j = 0; j < N_TMPL; j++) begin : g_cell
    vq_ava_cell #(.ELEM_W(ELEM_W), .ACC_W(DIST_W)) u_ava (
      .clk     (clk),
      .x       (x),
      .t       (t_elem[j]),
      .diff_en (ctrl.diff_en),
      .acc_clr (ctrl.acc_clr),
      .acc_en  (ctrl.acc_en),
      .acc     (dist_acc[j])
    );

    vq_ps_converter #(.W(DIST_W)) u_ps (
      .clk   (clk),
      .load  (ctrl.ps_load),
      .din   (dist_acc[j]),
      .shift (ctrl.shift_en),
      .bit_o (dbits[j])
    );
  end

  vq_wta #(.N(N_TMPL)) u_wta (
    .clk       (clk),
    .init      (ctrl.wta_init),
    .en        (ctrl.shift_en),
    .bits_i    (dbits),
    .min_bit_o (min_bit_o),
    .flags_o   (flags_o)
  );

  vq_winner_observer #(.N(N_TMPL)) u_wo (
    .flags (flags_o),
    .grant (grant),
    .code  (code_o),
    .any   (any)
  );

endmodule
