// vq_chip: one vector-quantization chip (256 templates).
//
// Input vectors enter the input FIFO 32 bits (four elements) at a time. As
// soon as a whole vector is stored the sequencer starts the two-stage
// pipeline: four 64-vector matching blocks compute all 256 Manhattan
// distances in 19 cycles, and in the next 19 cycles the distances compete
// bit-serially, MSB first, in three winner-take-all stages:
//   1. inside each matching block (64 templates -> block minimum),
//   2. on the chip, over the four block minima (-> chip winner), and
//   3. in the master chip only, over the chip-winner streams of all chips.
// Each stage passes its minimum on as a bit stream in the same cycle, so no
// distance is ever stored between stages. Winner observers turn the flags
// left after the competition into code numbers, smallest code on a tie.
//
// Master and slave chips are the same design; the master input enables the
// third stage and the output FIFO. Every chip sends its chip-winner distance
// (dist_bit_o, one bit per cycle, registered at the pin) and its 8-bit
// local code {block, template} (local_code_o) out; the master takes those of
// all chips back in on chip_bits_i / chip_codes_i, picks the winning chip
// and writes the 11-bit code {chip, block, template} into its output FIFO.
// Carrying local codes on dedicated pins and registering dist_bit_o (so
// stage 3 runs one cycle behind stages 1-2) are this design's choices.
//
// Timing: one vector every 19 cycles; a vector's code is written into the
// output FIFO in phase 13 of the segment after the one that computed its
// distances. hold_o (master: output FIFO full) must reach every chip's
// hold_i; a chip never starts a segment while hold_i is high.
module vq_chip
  import vq_pkg::*;
#(
  parameter int N_BLOCKS  = 4,
  parameter int N_TMPL    = 64,
  parameter int N_CHIPS   = 8,
  parameter int OUT_DEPTH = 64,
  localparam int TW  = $clog2(N_TMPL),
  localparam int BW  = (N_BLOCKS > 1) ? $clog2(N_BLOCKS) : 1,
  localparam int LCW = BW + TW,
  localparam int CHW = (N_CHIPS > 1) ? $clog2(N_CHIPS) : 1,
  localparam int GCW = CHW + LCW
) (
  input  logic                          clk,
  input  logic                          rst,
  input  logic                          master,
  input  logic                          hold_i,
  output logic                          hold_o,
  // template download
  input  logic                          tmpl_cs,
  input  logic                          tmpl_we,
  input  logic [LCW-1:0]                tmpl_vec,
  input  elem_idx_t                     tmpl_elem,
  input  logic [ELEM_W-1:0]             tmpl_data,
  // input vectors
  input  logic                          in_wr,
  input  logic [4*ELEM_W-1:0]           in_data,
  output logic                          in_full,
  // chip-to-master links
  output logic                          dist_bit_o,
  output logic [LCW-1:0]                local_code_o,
  input  logic [N_CHIPS-1:0]            chip_bits_i,
  input  logic [N_CHIPS-1:0][LCW-1:0]   chip_codes_i,
  // result (master)
  output logic                          out_valid,
  output logic [GCW-1:0]                out_code,
  input  logic                          out_rd
);

  vq_ctrl_t              ctrl;
  logic                  vec_avail;
  logic [ELEM_W-1:0]     x;
  logic [N_BLOCKS-1:0]   blk_bits;
  logic [TW-1:0]         blk_code [N_BLOCKS];
  logic [N_TMPL-1:0]     blk_flags [N_BLOCKS];
  logic                  chip_min_bit;
  logic [N_BLOCKS-1:0]   flags2, grant2;
  logic [BW-1:0]         code2;
  logic                  any2;
  logic [N_CHIPS-1:0]    flags3, grant3;
  logic [CHW-1:0]        code3;
  logic                  any3;
  logic                  out_full, out_v;
  logic [GCW-1:0]        out_q;
  logic [$clog2(OUT_DEPTH):0] out_count;
  logic                  running, v1, v2;
  phase_t                phase;

  vq_input_fifo u_in_fifo (
    .clk       (clk),
    .rst       (rst),
    .wr        (in_wr),
    .wdata     (in_data),
    .full      (in_full),
    .vec_avail (vec_avail),
    .rd_en     (ctrl.rd_en),
    .rd_elem   (ctrl.rd_elem),
    .rd_data   (x),
    .pop       (ctrl.pop)
  );

  vq_sequencer u_seq (
    .clk       (clk),
    .rst       (rst),
    .vec_avail (vec_avail),
    .hold      (hold_i),
    .ctrl      (ctrl),
    .running   (running),
    .phase     (phase),
    .v1        (v1),
    .v2        (v2)
  );

  // ---- first stage: four matching blocks ----
  for (genvar b = 0; b < N_BLOCKS; b++) begin : g_blk
    logic we_b;
    assign we_b = tmpl_cs && tmpl_we && (N_BLOCKS == 1 || tmpl_vec[LCW-1:TW] == BW'(b));

    vq_matching_block #(.N_TMPL(N_TMPL)) u_mb (
      .clk       (clk),
      .ctrl      (ctrl),
      .x         (x),
      .tmpl_we   (we_b),
      .tmpl_vec  (tmpl_vec[TW-1:0]),
      .tmpl_elem (tmpl_elem),
      .tmpl_data (tmpl_data),
      .min_bit_o (blk_bits[b]),
      .code_o    (blk_code[b]),
      .flags_o   (blk_flags[b])
    );
  end

  // ---- second stage: chip winner over the block minima ----
  vq_wta #(.N(N_BLOCKS)) u_wta2 (
    .clk       (clk),
    .init      (ctrl.wta_init),
    .en        (ctrl.shift_en),
    .bits_i    (blk_bits),
    .min_bit_o (chip_min_bit),
    .flags_o   (flags2)
  );

  vq_winner_observer #(.N(N_BLOCKS)) u_wo2 (
    .flags (flags2),
    .grant (grant2),
    .code  (code2),
    .any   (any2)
  );

  always_ff @(posedge clk) begin
    if (ctrl.shift_en) dist_bit_o <= chip_min_bit;
  end

  assign local_code_o = {code2, blk_code[code2]};

  // ---- third stage (master): global winner over the chips ----
  vq_wta #(.N(N_CHIPS)) u_wta3 (
    .clk       (clk),
    .init      (ctrl.wta_init),
    .en        (ctrl.wta3_en && master),
    .bits_i    (chip_bits_i),
    .min_bit_o (),
    .flags_o   (flags3)
  );

  vq_winner_observer #(.N(N_CHIPS)) u_wo3 (
    .flags (flags3),
    .grant (grant3),
    .code  (code3),
    .any   (any3)
  );

  vq_output_fifo #(.DEPTH(OUT_DEPTH), .W(GCW)) u_out_fifo (
    .clk   (clk),
    .rst   (rst),
    .wr    (ctrl.out_wr && master),
    .wdata ({code3, chip_codes_i[code3]}),
    .full  (out_full),
    .rd    (out_rd && master),
    .valid (out_v),
    .rdata (out_q),
    .count (out_count)
  );

  assign hold_o    = master && out_full;
  assign out_valid = master && out_v;
  assign out_code  = out_q;

endmodule
