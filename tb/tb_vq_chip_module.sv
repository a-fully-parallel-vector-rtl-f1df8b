// tb_vq_chip_module: end-to-end test of the eight-chip module at its full
// size (2048 templates, 64-code output FIFO, no parameter overrides).
// Downloads a random codebook in which some templates are duplicated
// within a block, across blocks of one chip and across chips, then sends
// input vectors (copies of templates, copies with small noise, random
// ones) through the 32-bit input port and compares every 11-bit code with a
// reference search over all 2048 templates (smallest Manhattan distance,
// lowest code on a tie). Counts and requires each mechanism at least once:
// a lone vector on an idle module (latency 34 cycles from its last input
// word to a valid code), a restart after idle, back-to-back vectors every 19
// cycles, input FIFO full, output FIFO full holding all chips, and ties
// resolved inside a block, between blocks and between chips.
module tb_vq_chip_module;
  import vq_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;

  localparam int NT = 2048;
  localparam int NV = 160;
  logic        rst, tmpl_we, in_wr, in_full, out_valid, out_rd;
  logic [14:0] tmpl_addr;
  logic [7:0]  tmpl_data;
  logic [31:0] in_data;
  logic [10:0] out_code;
  logic [7:0]  tmpl [NT][16];
  logic [7:0]  vecs [NV][16];
  int checks = 0, failures = 0, got = 0, cyc = 0;
  int tie_blk = 0, tie_chip_blocks = 0, tie_chips = 0, fulls = 0, holds = 0, b2b = 0, restarts = 0;
  int chips_won [8];
  int last_wr = -100, t_last_word = 0, t_first_valid = -1;
  bit run_prev = 0;

  vq_chip_module dut (.clk, .rst, .tmpl_we, .tmpl_addr, .tmpl_data, .in_wr, .in_data, .in_full,
                      .out_valid, .out_code, .out_rd);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference search; also classifies a tie by the highest code field in which the tied codes differ
  function automatic int ref_code(input int v, output int tie_kind);
    int best = 1 << 30, bj = 0, d;
    int tied [$];
    for (int j = 0; j < NT; j++) begin
      d = 0;
      for (int i = 0; i < 16; i++)
        d += (vecs[v][i] > tmpl[j][i]) ? int'(vecs[v][i]) - int'(tmpl[j][i]) : int'(tmpl[j][i]) - int'(vecs[v][i]);
      if (d < best) begin best = d; bj = j; tied.delete(); tied.push_back(j); end
      else if (d == best) tied.push_back(j);
    end
    tie_kind = 0;
    foreach (tied[k]) begin
      if (tied[k] / 256 != bj / 256) tie_kind = 3;
      else if (tied[k] / 64 != bj / 64 && tie_kind < 2) tie_kind = 2;
      else if (tie_kind < 1 && tied[k] != bj) tie_kind = 1;
    end
    return bj;
  endfunction

  always @(negedge clk) begin
    cyc++;
    if (dut.hold) holds++;
    if (in_full) fulls++;
    if (dut.g_chip[0].u_chip.ctrl.out_wr) begin
      if (cyc - last_wr == 19) b2b++;
      last_wr = cyc;
    end
    if (dut.g_chip[0].u_chip.running && !run_prev) restarts++;
    run_prev = dut.g_chip[0].u_chip.running;
  end

  initial begin
    int e, tk;
    out_rd = 0;
    wait (!rst);
    while (got < NV) begin
      @(negedge clk);
      // read at once, except for a long stall that lets the output FIFO fill up
      out_rd = out_valid && ((got < 10) || (got > 100) || ($urandom_range(0, 99) < 2));
      if (out_rd) begin
        e = ref_code(got, tk);
        case (tk)
          1: tie_blk++;
          2: tie_chip_blocks++;
          3: tie_chips++;
          default: ;
        endcase
        chips_won[e / 256]++;
        checks++;
        if (out_code !== 11'(e)) begin failures++; $display("FAIL: vec %0d code %0d exp %0d", got, out_code, e); end
        if (got == 0) t_first_valid = cyc;
        got++;
      end
    end
    @(negedge clk) out_rd = 0;
  end

  task automatic send(input int v);
    for (int w = 0; w < 4; w++) begin
      @(negedge clk);
      while (in_full) @(negedge clk);
      in_wr = 1; in_data = {vecs[v][4*w+3], vecs[v][4*w+2], vecs[v][4*w+1], vecs[v][4*w]};
      @(negedge clk); in_wr = 0;
      t_last_word = cyc;
    end
  endtask

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int dup_src [4];
    int dup_dst [4];
    dup_src = '{100, 300, 1500, 700};
    dup_dst = '{120, 360, 1700, 1950};   // same block, other block, other chip, other chip
    rst = 1; tmpl_we = 0; tmpl_addr = 0; tmpl_data = 0; in_wr = 0; in_data = 0;
    for (int j = 0; j < NT; j++)
      for (int i = 0; i < 16; i++) tmpl[j][i] = 8'($urandom);
    for (int k = 0; k < 4; k++)
      for (int i = 0; i < 16; i++) tmpl[dup_dst[k]][i] = tmpl[dup_src[k]][i];
    for (int v = 0; v < NV; v++) begin
      int j;
      j = (v % 4 == 0) ? dup_src[(v / 4) % 4] : $urandom_range(0, NT - 1);
      for (int i = 0; i < 16; i++)
        case (v % 4)
          0, 1: vecs[v][i] = tmpl[j][i];
          2: vecs[v][i] = tmpl[j][i] ^ 8'($urandom_range(0, 7));
          default: vecs[v][i] = 8'($urandom);
        endcase
    end
    repeat (3) @(negedge clk);
    rst = 0;
    for (int j = 0; j < NT; j++)
      for (int i = 0; i < 16; i++) begin
        @(negedge clk);
        tmpl_we = 1; tmpl_addr = {11'(j), 4'(i)}; tmpl_data = tmpl[j][i];
      end
    @(negedge clk); tmpl_we = 0;
    // lone vector on an idle module
    send(0);
    wait (got == 1);
    chk(t_first_valid - t_last_word == 34, $sformatf("lone-vector latency %0d, expected 34", t_first_valid - t_last_word));
    repeat (30) @(negedge clk);
    // everything else as fast as the input FIFO accepts
    for (int v = 1; v < NV; v++) send(v);
    wait (got == NV);
    repeat (40) @(negedge clk);
    chk(tie_blk > 0, "no tie inside a block");
    chk(tie_chip_blocks > 0, "no tie between blocks of a chip");
    chk(tie_chips > 0, "no tie between chips");
    chk(holds > 0, "output FIFO never held the chips");
    chk(fulls > 0, "input FIFO never full");
    chk(b2b >= 100, $sformatf("only %0d results 19 cycles apart", b2b));
    chk(restarts >= 2, "no restart after idle");
    for (int c = 0; c < 8; c++) chk(chips_won[c] > 0, $sformatf("chip %0d never won", c));
    $display("codes=%0d ties(block/chip/module)=%0d/%0d/%0d hold_cycles=%0d in_full_cycles=%0d back_to_back=%0d restarts=%0d",
             got, tie_blk, tie_chip_blocks, tie_chips, holds, fulls, b2b, restarts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
