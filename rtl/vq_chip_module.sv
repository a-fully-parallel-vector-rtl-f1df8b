// vq_chip_module: VQ chip module, one master chip and seven slave chips.
//
// Searches a codebook of up to 2048 templates (256 per chip) for the one
// nearest, in Manhattan distance, to each 16-element input vector, and
// returns its 11-bit code {chip, block, template}. Every input vector is
// broadcast to all chips, which therefore run in lockstep; each chip finds
// its own winner, streams the winner's distance bit-serially to the master,
// and the master's third winner-take-all stage picks the global winner.
// One vector is accepted every 19 cycles (1.1 us at 17 MHz); its code
// appears in the output FIFO 33 cycles after its distance segment starts.
//
// Interface:
//   tmpl_we/tmpl_addr/tmpl_data  codebook download, one element per write;
//                                tmpl_addr = {chip, block, template, element}
//                                (this design's address layout)
//   in_wr/in_data/in_full        input vector as four 32-bit words
//   out_valid/out_code/out_rd    winner codes, show-ahead FIFO
// The master's output-FIFO-full signal is fanned out as hold to all chips
// (this design's way of applying back-pressure). Chip 0 is the master.
module vq_chip_module
  import vq_pkg::*;
#(
  parameter int N_CHIPS = MAX_CHIPS,
  localparam int TW  = $clog2(TMPL_PER_BLOCK),
  localparam int BW  = $clog2(BLOCKS_PER_CHIP),
  localparam int LCW = BW + TW,
  localparam int CHW = (N_CHIPS > 1) ? $clog2(N_CHIPS) : 1,
  localparam int GCW = CHW + LCW,
  localparam int AW  = GCW + $clog2(N_ELEMS)
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 tmpl_we,
  input  logic [AW-1:0]        tmpl_addr,
  input  logic [ELEM_W-1:0]    tmpl_data,
  input  logic                 in_wr,
  input  logic [4*ELEM_W-1:0]  in_data,
  output logic                 in_full,
  output logic                 out_valid,
  output logic [GCW-1:0]       out_code,
  input  logic                 out_rd
);

  logic [N_CHIPS-1:0]           dist_bits;
  logic [N_CHIPS-1:0][LCW-1:0]  local_codes;
  logic [N_CHIPS-1:0]           hold_o, in_full_c, out_valid_c;
  logic [GCW-1:0]               out_code_c [N_CHIPS];
  logic                         hold;

  assign hold = hold_o[0];

  for (genvar c = 0; c < N_CHIPS; c++) begin : g_chip
    logic cs;
    assign cs = (N_CHIPS == 1) || (tmpl_addr[AW-1 -: CHW] == CHW'(c));

    vq_chip #(
      .N_BLOCKS  (BLOCKS_PER_CHIP),
      .N_TMPL    (TMPL_PER_BLOCK),
      .N_CHIPS   (N_CHIPS)
    ) u_chip (
      .clk          (clk),
      .rst          (rst),
      .master       (c == 0),
      .hold_i       (hold),
      .hold_o       (hold_o[c]),
      .tmpl_cs      (cs),
      .tmpl_we      (tmpl_we),
      .tmpl_vec     (tmpl_addr[$clog2(N_ELEMS) +: LCW]),
      .tmpl_elem    (tmpl_addr[$clog2(N_ELEMS)-1:0]),
      .tmpl_data    (tmpl_data),
      .in_wr        (in_wr),
      .in_data      (in_data),
      .in_full      (in_full_c[c]),
      .dist_bit_o   (dist_bits[c]),
      .local_code_o (local_codes[c]),
      .chip_bits_i  (dist_bits),
      .chip_codes_i (local_codes),
      .out_valid    (out_valid_c[c]),
      .out_code     (out_code_c[c]),
      .out_rd       (out_rd)
    );
  end

  assign in_full   = in_full_c[0];
  assign out_valid = out_valid_c[0];
  assign out_code  = out_code_c[0];

endmodule
