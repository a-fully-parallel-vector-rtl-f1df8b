// vq_pkg: constants and the control-strobe bundle shared by the VQ processor.
//
// The processor matches a 16-element input vector (a 4x4 block of 8-bit
// pixels) against stored template vectors by Manhattan distance and returns
// the code of the nearest template. Work is split into two pipeline segments
// of 19 clock cycles each: distance calculation, then a bit-serial
// three-stage minimum search. The numbers below (16 elements of 8 bits,
// 12-bit distances, 19-cycle segments, 64 templates per matching block,
// 4 blocks per chip, up to 8 chips) are the ones the processor is built
// around. The cycle schedule inside a segment (the PH_* constants) is this
// design's own choice.
package vq_pkg;

  localparam int ELEM_W          = 8;   // bits per vector element (pixel)
  localparam int N_ELEMS         = 16;  // elements per vector (4x4 block)
  localparam int DIST_W          = 12;  // 16 * 255 = 4080 fits in 12 bits
  localparam int SEG_CYCLES      = 19;  // cycles per pipeline segment
  localparam int TMPL_PER_BLOCK  = 64;  // templates per matching block
  localparam int BLOCKS_PER_CHIP = 4;   // matching blocks per chip
  localparam int MAX_CHIPS       = 8;   // master + seven slaves
  localparam int LOCAL_CODE_W    = 8;   // {block[1:0], template[5:0]}
  localparam int CODE_W          = 11;  // {chip[2:0], block, template}

  // Segment schedule (phase = cycle number inside a 19-cycle segment).
  localparam int PH_RD_LAST    = 15;    // elements read in phases 0..15
  localparam int PH_DIFF_FIRST = 1;     // subtract in phases 1..16
  localparam int PH_DIFF_LAST  = 16;
  localparam int PH_ACC_FIRST  = 2;     // accumulate in phases 2..17
  localparam int PH_ACC_LAST   = 17;
  localparam int PH_LAST       = SEG_CYCLES - 1;  // 18: load P/S, preset WTA
  localparam int PH_SHIFT_LAST = DIST_W - 1;      // bits out in phases 0..11
  localparam int PH_WTA3_FIRST = 1;               // third stage one cycle late
  localparam int PH_WTA3_LAST  = DIST_W;          // phases 1..12
  localparam int PH_OUT_WR     = DIST_W + 1;      // 13: code into output FIFO

  typedef logic [$clog2(SEG_CYCLES)-1:0] phase_t;
  typedef logic [$clog2(N_ELEMS)-1:0]    elem_idx_t;

  // Strobes issued by the sequencer each cycle.
  typedef struct packed {
    logic      rd_en;     // read one element from input FIFO and SRAMs
    elem_idx_t rd_elem;   // which element
    logic      pop;       // head vector fully read: release it
    logic      acc_clr;   // clear the accumulators
    logic      diff_en;   // capture |t - x| in the 8-bit register
    logic      acc_en;    // add the register into the accumulator
    logic      ps_load;   // move distances into the P/S registers
    logic      wta_init;  // set every WTA flag to 1
    logic      shift_en;  // shift one distance bit into stages 1 and 2
    logic      wta3_en;   // third-stage competition on the chip bits
    logic      out_wr;    // write the global code (master)
  } vq_ctrl_t;

endpackage
