// tb_vq_input_fifo: writes input vectors as 32-bit words, reads them back
// element by element (one-cycle read latency) and compares with a queue
// model. Fills the FIFO to its 64-vector capacity to check full and that
// vec_avail only rises once all four words of a vector are in, and mixes
// writes with reads.
module tb_vq_input_fifo;
  import vq_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;

  logic        rst, wr, full, vec_avail, rd_en, pop;
  logic [31:0] wdata;
  elem_idx_t   rd_elem;
  logic [7:0]  rd_data;
  int checks = 0, failures = 0;
  logic [7:0] model [$];     // stored elements, oldest first
  int fulls = 0;

  vq_input_fifo dut (.clk, .rst, .wr, .wdata, .full, .vec_avail, .rd_en, .rd_elem, .rd_data, .pop);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write_word();
    logic [31:0] w = $urandom;
    @(negedge clk);
    checks++;
    if (full !== (model.size() == 512)) begin failures++; $display("FAIL: full=%b size=%0d", full, model.size()); end
    if (full) begin fulls++; return; end
    wr = 1; wdata = w;
    for (int b = 0; b < 4; b++) model.push_back(w[8*b +: 8]);
    @(negedge clk); wr = 0;
  endtask

  task automatic read_vector();
    checks++;
    if (vec_avail !== (model.size() >= 16)) begin failures++; $display("FAIL: vec_avail"); end
    if (!vec_avail) return;
    for (int i = 0; i < 16; i++) begin
      @(negedge clk); rd_en = 1; rd_elem = elem_idx_t'(i);
      @(negedge clk); rd_en = 0;
      checks++;
      if (rd_data !== model[i]) begin failures++; $display("FAIL: elem %0d got %h exp %h", i, rd_data, model[i]); end
    end
    @(negedge clk); pop = 1;
    @(negedge clk); pop = 0;
    repeat (16) void'(model.pop_front());
  endtask

  initial begin
    rst = 1; wr = 0; wdata = 0; rd_en = 0; rd_elem = 0; pop = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    // partial vector: not yet available
    repeat (3) write_word();
    @(negedge clk); checks++;
    if (vec_avail) begin failures++; $display("FAIL: vec_avail on 3 words"); end
    write_word();
    @(negedge clk); checks++;
    if (!vec_avail) begin failures++; $display("FAIL: no vec_avail on 4 words"); end
    // fill to capacity (128 words) and beyond
    repeat (130) write_word();
    @(negedge clk); checks++;
    if (!full) begin failures++; $display("FAIL: not full at 64 vectors"); end
    // drain a few, then mixed traffic
    repeat (10) read_vector();
    for (int n = 0; n < 400; n++) begin
      if ($urandom_range(0, 1) != 0) write_word(); else read_vector();
    end
    while (model.size() >= 16) read_vector();
    if (fulls == 0) begin failures++; $display("FAIL: full never reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
