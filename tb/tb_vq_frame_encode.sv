// tb_vq_frame_encode: encodes a whole 640x480 colour frame with the
// full-size eight-chip module and checks the real-time budget.
//
// A synthetic picture is generated here (smooth gradients with texture and
// noise), sampled 4:1:1 as a 640x480 luminance plane and two 320x240
// chrominance planes, giving 19200 + 4800 + 4800 = 28800 vectors of 4x4
// pixels. The 2048-template codebook is made of blocks picked from the
// picture itself, the way a trained codebook resembles its images; the same
// codebook serves Y, U and V. The host writes vectors as fast as in_full
// allows and reads codes at once. Every code is compared with a full search
// (smallest Manhattan distance, lowest code on a tie), and the cycles from
// the first input word to the last code must fit one 33 ms frame at 17 MHz
// (561000 cycles); at one vector per 19 cycles the expected count is
// 28800 * 19 plus the pipeline fill.
//
// The codebook is then reloaded as a 1024- and a 512-template book (the
// spare slots hold copies of real templates at higher codes, which lose
// every tie) and the first 2400 luminance vectors are encoded with each;
// every code must lie inside the smaller book.
module tb_vq_frame_encode;
  import vq_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;

  localparam int W = 640, H = 480;
  localparam int NY = (W / 4) * (H / 4);            // 19200
  localparam int NC = (W / 8) * (H / 8);            // 4800 per chroma plane
  localparam int NV = NY + 2 * NC;                  // 28800
  localparam int NT = 2048;
  localparam int BUDGET = 561000;                   // 33 ms at 17 MHz

  logic        rst, tmpl_we, in_wr, in_full, out_valid, out_rd;
  logic [14:0] tmpl_addr;
  logic [7:0]  tmpl_data;
  logic [31:0] in_data;
  logic [10:0] out_code;
  logic [7:0]  tmpl [NT][16];
  logic [7:0]  vecs [NV][16];
  int checks = 0, failures = 0, got = 0, n_expect = 0, book = NT, cyc = 0;
  int t_first_word = -1, t_last_code = 0;

  vq_chip_module dut (.clk, .rst, .tmpl_we, .tmpl_addr, .tmpl_data, .in_wr, .in_data, .in_full,
                      .out_valid, .out_code, .out_rd);

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) cyc++;

  function automatic logic [7:0] pix(input int plane, input int x, input int y);
    int v;
    case (plane)
      0: v = (x * 3 + y * 2) / 5 + ((x * y) >> 7) % 40 + ((x / 16 + y / 16) % 2) * 30;
      1: v = 128 + (x - 160) / 4 + ((y >> 3) % 8) * 3;
      default: v = 100 + (y - 120) / 3 + ((x >> 4) % 4) * 5;
    endcase
    v += $urandom_range(0, 6);
    return 8'(v);
  endfunction

  function automatic int ref_code(input int v);
    int best = 1 << 30, bj = 0, d;
    for (int j = 0; j < book; j++) begin
      d = 0;
      for (int i = 0; i < 16; i++)
        d += (vecs[v][i] > tmpl[j][i]) ? int'(vecs[v][i]) - int'(tmpl[j][i]) : int'(tmpl[j][i]) - int'(vecs[v][i]);
      if (d < best) begin best = d; bj = j; end
    end
    return bj;
  endfunction

  // reader: codes come back in input order
  initial begin
    int e;
    out_rd = 0;
    forever begin
      @(negedge clk);
      out_rd = out_valid;
      if (out_rd) begin
        e = ref_code(got);
        checks++;
        if (out_code !== 11'(e)) begin
          failures++;
          if (failures < 10) $display("FAIL: vector %0d code %0d expected %0d", got, out_code, e);
        end
        if (int'(out_code) >= book) begin failures++; $display("FAIL: code %0d outside the book", out_code); end
        got++;
        t_last_code = cyc;
      end
    end
  end

  task automatic load_book();
    for (int j = 0; j < NT; j++)
      for (int i = 0; i < 16; i++) begin
        @(negedge clk);
        tmpl_we = 1; tmpl_addr = {11'(j), 4'(i)}; tmpl_data = tmpl[j][i];
      end
    @(negedge clk); tmpl_we = 0;
  endtask

  task automatic send(input int v);
    for (int w = 0; w < 4; w++) begin
      @(negedge clk);
      while (in_full) @(negedge clk);
      in_wr = 1; in_data = {vecs[v][4*w+3], vecs[v][4*w+2], vecs[v][4*w+1], vecs[v][4*w]};
      if (t_first_word < 0) t_first_word = cyc;
      @(negedge clk); in_wr = 0;
    end
  endtask

  initial begin
    int v, src, frame_cycles;
    rst = 1; tmpl_we = 0; tmpl_addr = 0; tmpl_data = 0; in_wr = 0; in_data = 0;
    // picture -> vectors
    v = 0;
    for (int p = 0; p < 3; p++) begin
      int pw, ph;
      pw = (p == 0) ? W : W / 2;
      ph = (p == 0) ? H : H / 2;
      for (int by = 0; by < ph / 4; by++)
        for (int bx = 0; bx < pw / 4; bx++) begin
          for (int i = 0; i < 16; i++) vecs[v][i] = pix(p, bx * 4 + i % 4, by * 4 + i / 4);
          v++;
        end
    end
    // codebook: blocks sampled from the picture (mostly luminance)
    for (int j = 0; j < NT; j++) begin
      src = (j % 8 == 7) ? NY + $urandom_range(0, 2 * NC - 1) : $urandom_range(0, NY - 1);
      for (int i = 0; i < 16; i++) tmpl[j][i] = vecs[src][i] ^ 8'($urandom_range(0, 3));
    end
    repeat (3) @(negedge clk);
    rst = 0;
    load_book();
    // one full frame, as fast as the module accepts it
    n_expect = NV;
    for (int k = 0; k < NV; k++) send(k);
    wait (got == NV);
    frame_cycles = t_last_code - t_first_word;
    checks += 2;
    if (frame_cycles > BUDGET) begin failures++; $display("FAIL: frame took %0d cycles, budget %0d", frame_cycles, BUDGET); end
    if (frame_cycles > NV * SEG_CYCLES + 60) begin failures++; $display("FAIL: frame took %0d cycles, expected about %0d", frame_cycles, NV * SEG_CYCLES); end
    $display("frame: %0d vectors in %0d cycles (%0d per vector, %0.2f ms at 17 MHz)",
             NV, frame_cycles, frame_cycles / NV, real'(frame_cycles) / 17000.0);
    // smaller codebooks
    for (int b = 1024; b >= 512; b /= 2) begin
      for (int j = b; j < NT; j++) tmpl[j] = tmpl[j % b];
      load_book();
      book = b;
      got = 0;
      for (int k = 0; k < 2400; k++) send(k);
      wait (got == 2400);
      $display("%0d-template book: 2400 vectors encoded", b);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
