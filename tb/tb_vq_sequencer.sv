// tb_vq_sequencer: checks the segment schedule of the sequencer.
// A counter stands in for the input FIFO (vectors arrive at random times,
// pop removes one). Checks, cycle by cycle, that every strobe sits at its
// phase inside the 19-cycle segment; that back-to-back vectors are popped
// exactly 19 cycles apart; that each vector's result strobe (out_wr) comes
// 17 cycles after its pop when nothing holds the pipeline; that no segment
// starts while hold is high; and that every vector gets exactly one
// ps_load and one out_wr.
module tb_vq_sequencer;
  import vq_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;

  logic     rst, vec_avail, hold, running, v1, v2;
  vq_ctrl_t ctrl;
  phase_t   phase;
  int checks = 0, failures = 0;
  int avail_cnt = 0, pushed = 0, pops = 0, loads = 0, outs = 0;
  int cyc = 0, seg_t = 99, last_pop = -100, b2b = 0, holds_seen = 0;
  bit hold_prev = 0, gaps_free = 1;
  int pop_times [$];

  vq_sequencer dut (.clk, .rst, .vec_avail, .hold, .ctrl, .running, .phase, .v1, .v2);

  assign vec_avail = (avail_cnt > 0);

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d: %s", cyc, what); end
  endtask

  // monitor
  always @(negedge clk) if (!rst) begin
    cyc++;
    if (ctrl.acc_clr) begin
      chk(!hold_prev, "segment started while hold");
      chk(seg_t >= 18, "segment shorter than 19 cycles");
      seg_t = 0;
    end else seg_t++;
    chk(ctrl.rd_en   == (seg_t <= 15), "rd_en phase");
    chk(ctrl.diff_en == (seg_t >= 1 && seg_t <= 16), "diff_en phase");
    chk(ctrl.acc_en  == (seg_t >= 2 && seg_t <= 17), "acc_en phase");
    if (ctrl.ps_load)  chk(seg_t == 18, "ps_load phase");
    if (ctrl.wta_init) chk(seg_t == 18, "wta_init phase");
    if (ctrl.shift_en) chk(seg_t <= 11, "shift phase");
    if (ctrl.wta3_en)  chk(seg_t >= 1 && seg_t <= 12, "wta3 phase");
    if (ctrl.pop) begin
      chk(seg_t == 15, "pop phase");
      chk(avail_cnt > 0, "pop with no vector");
      if (cyc - last_pop == 19) b2b++;
      last_pop = cyc;
      pop_times.push_back(cyc);
      pops++;
    end
    if (ctrl.ps_load) loads++;
    if (ctrl.out_wr) begin
      chk(seg_t == 13, "out_wr phase");
      chk(pop_times.size() > 0, "out_wr without a vector");
      if (pop_times.size() > 0) begin
        if (gaps_free) chk(cyc - pop_times[0] == 17, $sformatf("result latency %0d", cyc - pop_times[0]));
        else chk(cyc - pop_times[0] >= 17, "result too early");
        void'(pop_times.pop_front());
      end
      outs++;
    end
    hold_prev = hold;
    if (hold) holds_seen++;
  end

  always @(posedge clk) if (ctrl.pop) avail_cnt--;

  task automatic add_vectors(input int n);
    @(negedge clk);
    avail_cnt += n; pushed += n;
  endtask

  initial begin
    rst = 1; hold = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    // single vector, then idle
    add_vectors(1);
    repeat (60) @(negedge clk);
    chk(outs == 1, "single vector not finished");
    // a burst: back-to-back segments
    add_vectors(10);
    repeat (250) @(negedge clk);
    chk(outs == 11, "burst not finished");
    chk(b2b >= 9, "burst not processed every 19 cycles");
    // random arrivals with random hold
    gaps_free = 0;
    fork
      begin
        repeat (60) begin
          repeat ($urandom_range(0, 40)) @(negedge clk);
          add_vectors($urandom_range(1, 3));
        end
      end
      begin
        repeat (200) begin
          @(negedge clk);
          hold = ($urandom_range(0, 99) < 30);
          repeat ($urandom_range(0, 25)) @(negedge clk);
        end
        hold = 0;
      end
    join
    repeat (2000) @(negedge clk);
    chk(pops == pushed, $sformatf("pops %0d pushed %0d", pops, pushed));
    chk(loads == pushed, "ps_load count");
    chk(outs == pushed, $sformatf("outs %0d pushed %0d", outs, pushed));
    chk(holds_seen > 0, "hold never exercised");
    chk(!running, "not idle at the end");
    $display("vectors=%0d back_to_back=%0d hold_cycles=%0d", pushed, b2b, holds_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
