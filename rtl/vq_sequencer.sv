// vq_sequencer: segment counter and strobe generator of one VQ chip.
//
// The chip works as a two-stage pipeline whose segments are both 19 cycles
// long and run side by side: while the distances of vector n+1 are being
// accumulated (first stage), the distances of vector n are shifted bit by
// bit through the three winner-take-all stages (second stage). This block
// counts the phase 0..18 of the current segment and decodes it into the
// strobes of vq_ctrl_t.
//
// The chip starts by itself as soon as the input FIFO holds a whole vector.
// v1 marks a segment whose first stage works on a real vector, v2 one whose
// second stage does. When the input FIFO runs dry, one more segment is run
// to empty the second stage. A new segment only starts while hold is low
// (hold = output FIFO full); a result waiting in the P/S registers stays
// there (pend) until it can be finished. Since every chip of a module sees
// the same FIFO writes and the same hold, all chips stay in lockstep.
//
// Phase schedule (this design's choice, within the 19 cycles given):
//   first stage : 0 clear accumulators; 0..15 read elements; 1..16 subtract;
//                 2..17 accumulate; 15 pop the vector; 18 load P/S registers
//   second stage: 18 (of the previous segment) presets the WTA flags;
//                 0..11 distance bits through stages 1-2; 1..12 stage 3;
//                 13 write the code into the output FIFO.
module vq_sequencer
  import vq_pkg::*;
(
  input  logic     clk,
  input  logic     rst,
  input  logic     vec_avail,   // input FIFO holds a whole vector
  input  logic     hold,        // do not start a new segment
  output vq_ctrl_t ctrl,
  output logic     running,
  output phase_t   phase,
  output logic     v1,
  output logic     v2
);

  logic pend;                   // P/S registers hold an unfinished result
  logic seg_end;
  logic start;

  assign seg_end = running && (phase == phase_t'(PH_LAST));
  assign start   = !hold && (vec_avail || (seg_end ? v1 : pend));

  always_ff @(posedge clk) begin
    if (rst) begin
      running <= 1'b0;
      phase   <= '0;
      v1      <= 1'b0;
      v2      <= 1'b0;
      pend    <= 1'b0;
    end else if (!running || seg_end) begin
      if (seg_end) pend <= v1;
      if (start) begin
        running <= 1'b1;
        phase   <= '0;
        v1      <= vec_avail;
        v2      <= seg_end ? v1 : pend;
      end else begin
        running <= 1'b0;
      end
    end else begin
      phase <= phase + 1'b1;
    end
  end

  always_comb begin
    ctrl          = '0;
    ctrl.rd_en    = running && (phase <= phase_t'(PH_RD_LAST));
    ctrl.rd_elem  = elem_idx_t'(phase);
    ctrl.pop      = running && v1 && (phase == phase_t'(PH_RD_LAST));
    ctrl.acc_clr  = running && (phase == '0);
    ctrl.diff_en  = running && (phase >= phase_t'(PH_DIFF_FIRST)) && (phase <= phase_t'(PH_DIFF_LAST));
    ctrl.acc_en   = running && (phase >= phase_t'(PH_ACC_FIRST)) && (phase <= phase_t'(PH_ACC_LAST));
    ctrl.ps_load  = running && v1 && (phase == phase_t'(PH_LAST));
    ctrl.wta_init = running && v1 && (phase == phase_t'(PH_LAST));
    ctrl.shift_en = running && v2 && (phase <= phase_t'(PH_SHIFT_LAST));
    ctrl.wta3_en  = running && v2 && (phase >= phase_t'(PH_WTA3_FIRST)) && (phase <= phase_t'(PH_WTA3_LAST));
    ctrl.out_wr   = running && v2 && (phase == phase_t'(PH_OUT_WR));
  end

endmodule
