// tb_vq_matching_block: one 64-vector matching block driven by the real
// sequencer, with the input FIFO replaced by a behavioural element source of
// the same one-cycle latency. Downloads a random codebook that contains
// duplicated templates, streams input vectors (random ones, exact copies of
// templates, and copies of a duplicated template, which tie), and checks
// for every vector that the serial minimum collected from min_bit_o equals
// the true minimum distance and that code_o is the lowest-numbered template
// at that distance. Also checks one result per 19 cycles in a burst.
module tb_vq_matching_block;
  import vq_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;

  localparam int NV = 60;
  logic        rst, vec_avail, running, v1, v2, min_bit;
  vq_ctrl_t    ctrl;
  phase_t      phase;
  logic [7:0]  x;
  logic        tmpl_we;
  logic [5:0]  tmpl_vec, code;
  elem_idx_t   tmpl_elem;
  logic [7:0]  tmpl_data;
  logic [63:0] flags;
  logic [7:0]  tmpl [64][16];
  logic [7:0]  vecs [NV][16];
  int head = 0, n_in = 0, res = 0, ties = 0, last_out = -1, b2b = 0, cyc = 0;
  logic [11:0] serial_min;
  int checks = 0, failures = 0;

  vq_sequencer u_seq (.clk, .rst, .vec_avail, .hold(1'b0), .ctrl, .running, .phase, .v1, .v2);
  vq_matching_block dut (.clk, .ctrl, .x, .tmpl_we, .tmpl_vec, .tmpl_elem, .tmpl_data,
                         .min_bit_o(min_bit), .code_o(code), .flags_o(flags));

  assign vec_avail = (head < n_in);

  always @(posedge clk) begin
    if (ctrl.rd_en) x <= vecs[head][ctrl.rd_elem];
    if (ctrl.pop) head <= head + 1;
    if (ctrl.shift_en) serial_min <= {serial_min[10:0], min_bit};
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int distance(input int v, input int j);
    int d = 0;
    for (int i = 0; i < 16; i++)
      d += (vecs[v][i] > tmpl[j][i]) ? int'(vecs[v][i]) - int'(tmpl[j][i]) : int'(tmpl[j][i]) - int'(vecs[v][i]);
    return d;
  endfunction

  // check each result when it is complete (out_wr phase)
  always @(negedge clk) if (!rst) begin
    int best, bj, nbest, d;
    cyc++;
    if (ctrl.out_wr) begin
      best = 1 << 30; bj = 0; nbest = 0;
      for (int j = 0; j < 64; j++) begin
        d = distance(res, j);
        if (d < best) begin best = d; bj = j; nbest = 1; end
        else if (d == best) nbest++;
      end
      if (nbest > 1) ties++;
      checks += 2;
      if (code !== 6'(bj)) begin failures++; $display("FAIL: vec %0d code %0d exp %0d", res, code, bj); end
      if (serial_min !== 12'(best)) begin failures++; $display("FAIL: vec %0d min %0d exp %0d", res, serial_min, best); end
      if (last_out >= 0 && cyc - last_out == 19) b2b++;
      last_out = cyc;
      res++;
    end
  end

  initial begin
    rst = 1; tmpl_we = 0; tmpl_vec = 0; tmpl_elem = 0; tmpl_data = 0; x = 0;
    for (int j = 0; j < 64; j++)
      for (int i = 0; i < 16; i++) tmpl[j][i] = 8'($urandom);
    for (int i = 0; i < 16; i++) begin tmpl[40][i] = tmpl[7][i]; tmpl[63][i] = tmpl[7][i]; end
    for (int v = 0; v < NV; v++)
      for (int i = 0; i < 16; i++) begin
        case (v % 4)
          0: vecs[v][i] = 8'($urandom);
          1: vecs[v][i] = tmpl[$urandom_range(0, 63)][i];
          2: vecs[v][i] = tmpl[7][i] ^ 8'(v & 3);
          default: vecs[v][i] = 8'($urandom_range(0, 20));
        endcase
      end
    for (int v = 1; v < NV; v += 4) begin   // case 1 uses a whole template
      int j;
      j = $urandom_range(0, 63);
      for (int i = 0; i < 16; i++) vecs[v][i] = tmpl[j][i];
    end
    repeat (3) @(negedge clk);
    rst = 0;
    for (int j = 0; j < 64; j++)
      for (int i = 0; i < 16; i++) begin
        @(negedge clk);
        tmpl_we = 1; tmpl_vec = 6'(j); tmpl_elem = elem_idx_t'(i); tmpl_data = tmpl[j][i];
      end
    @(negedge clk); tmpl_we = 0;
    // one vector alone, then the rest as a burst
    n_in = 1;
    repeat (60) @(negedge clk);
    n_in = NV;
    wait (res == NV);
    repeat (5) @(negedge clk);
    checks += 2;
    if (ties == 0) begin failures++; $display("FAIL: no tie exercised"); end
    if (b2b < NV - 3) begin failures++; $display("FAIL: only %0d results 19 cycles apart", b2b); end
    $display("results=%0d ties=%0d back_to_back=%0d", res, ties, b2b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
