// tb_vq_chip: a single VQ chip used alone as master (its own chip-winner
// stream and local code looped back into its third stage). A small output
// FIFO (4 codes) makes hold happen. Downloads a 256-template codebook with
// duplicated templates, sends input vectors through the 32-bit input port
// (respecting in_full), reads codes with random stalls, and compares every
// code with a reference search (smallest distance, lowest code on a tie).
// Checks the latency of a lone vector (34 cycles from the last input word
// to a valid code) and that a burst is processed one vector per 19 cycles,
// and that input-FIFO full, hold and ties all occur.
module tb_vq_chip;
  import vq_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;

  localparam int NV = 120;
  logic        rst, hold, tmpl_we, in_wr, in_full, dist_bit, out_valid, out_rd;
  logic [7:0]  tmpl_vec, local_code, tmpl_data;
  elem_idx_t   tmpl_elem;
  logic [31:0] in_data;
  logic [8:0]  out_code;
  logic [7:0]  tmpl [256][16];
  logic [7:0]  vecs [NV][16];
  int checks = 0, failures = 0, got = 0, ties = 0, fulls = 0, holds = 0, b2b = 0, cyc = 0;
  int last_wr = -100, t_last_word = 0, t_first_valid = -1;

  vq_chip #(.N_CHIPS(1), .OUT_DEPTH(4)) dut (
    .clk, .rst, .master(1'b1), .hold_i(hold), .hold_o(hold),
    .tmpl_cs(1'b1), .tmpl_we, .tmpl_vec, .tmpl_elem, .tmpl_data,
    .in_wr, .in_data, .in_full,
    .dist_bit_o(dist_bit), .local_code_o(local_code),
    .chip_bits_i(dist_bit), .chip_codes_i(local_code),
    .out_valid, .out_code, .out_rd);

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_code(input int v, output bit tie);
    int best = 1 << 30, bj = 0, d, nb = 0;
    for (int j = 0; j < 256; j++) begin
      d = 0;
      for (int i = 0; i < 16; i++)
        d += (vecs[v][i] > tmpl[j][i]) ? int'(vecs[v][i]) - int'(tmpl[j][i]) : int'(tmpl[j][i]) - int'(vecs[v][i]);
      if (d < best) begin best = d; bj = j; nb = 1; end
      else if (d == best) nb++;
    end
    tie = (nb > 1);
    return bj;
  endfunction

  always @(negedge clk) begin
    cyc++;
    if (hold) holds++;
    if (in_full) fulls++;
    if (dut.ctrl.out_wr) begin
      if (cyc - last_wr == 19) b2b++;
      last_wr = cyc;
    end
  end

  // output reader with random stalls; stalls are long in the middle so hold occurs
  initial begin
    bit tie;
    int e;
    out_rd = 0;
    wait (!rst);
    while (got < NV) begin
      @(negedge clk);
      out_rd = out_valid && ((got < 20) || (got > 60) || ($urandom_range(0, 99) < 3));
      if (out_rd) begin
        e = ref_code(got, tie);
        if (tie) ties++;
        checks++;
        if (out_code !== 9'(e)) begin failures++; $display("FAIL: vec %0d code %0d exp %0d", got, out_code, e); end
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

  initial begin
    rst = 1; tmpl_we = 0; tmpl_vec = 0; tmpl_elem = 0; tmpl_data = 0; in_wr = 0; in_data = 0;
    for (int j = 0; j < 256; j++)
      for (int i = 0; i < 16; i++) tmpl[j][i] = 8'($urandom);
    for (int i = 0; i < 16; i++) begin
      tmpl[200][i] = tmpl[70][i];   // block 3 duplicates block 1
      tmpl[20][i]  = tmpl[5][i];    // same block
    end
    for (int v = 0; v < NV; v++) begin
      int j;
      j = (v % 3 == 0) ? 70 : (v % 3 == 1) ? 20 : $urandom_range(0, 255);
      for (int i = 0; i < 16; i++)
        vecs[v][i] = (v % 5 == 4) ? 8'($urandom) : tmpl[j][i] ^ 8'((v % 3 == 2) ? $urandom_range(0, 3) : 0);
    end
    repeat (3) @(negedge clk);
    rst = 0;
    for (int j = 0; j < 256; j++)
      for (int i = 0; i < 16; i++) begin
        @(negedge clk);
        tmpl_we = 1; tmpl_vec = 8'(j); tmpl_elem = elem_idx_t'(i); tmpl_data = tmpl[j][i];
      end
    @(negedge clk); tmpl_we = 0;
    // lone vector: latency
    send(0);
    wait (got == 1);
    checks++;
    if (t_first_valid - t_last_word != 34) begin
      failures++; $display("FAIL: lone-vector latency %0d cycles, expected 34", t_first_valid - t_last_word);
    end
    for (int v = 1; v < NV; v++) send(v);
    wait (got == NV);
    repeat (40) @(negedge clk);
    checks += 4;
    if (ties == 0)  begin failures++; $display("FAIL: no tie exercised"); end
    if (holds == 0) begin failures++; $display("FAIL: hold never happened"); end
    if (fulls == 0) begin failures++; $display("FAIL: input FIFO never full"); end
    if (b2b < 40)   begin failures++; $display("FAIL: only %0d results 19 cycles apart", b2b); end
    $display("codes=%0d ties=%0d hold_cycles=%0d in_full_cycles=%0d back_to_back=%0d", got, ties, holds, fulls, b2b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
