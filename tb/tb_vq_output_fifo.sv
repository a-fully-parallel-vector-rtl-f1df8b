// tb_vq_output_fifo: random writes and reads against a queue model of the
// code FIFO: checks rdata/valid/full/count every cycle and that the FIFO
// reaches full. Writes are never issued while full (the processor's hold
// guarantees the same).
module tb_vq_output_fifo;
  logic clk = 0;
  always #5 clk = ~clk;

  localparam int DEPTH = 64;
  logic        rst, wr, rd, full, valid;
  logic [10:0] wdata, rdata;
  logic [6:0]  count;
  int checks = 0, failures = 0, fulls = 0;
  logic [10:0] model [$];

  vq_output_fifo #(.DEPTH(DEPTH), .W(11)) dut (.clk, .rst, .wr, .wdata, .full, .rd, .valid, .rdata, .count);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int pw;
    rst = 1; wr = 0; rd = 0; wdata = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 5000; n++) begin
      pw = ((n / 500) % 2 != 0) ? 80 : 30;    // alternate filling and draining phases
      @(negedge clk);
      checks += 3;
      if (valid !== (model.size() != 0)) begin failures++; $display("FAIL: valid"); end
      if (full !== (model.size() == DEPTH)) begin failures++; $display("FAIL: full"); end
      if (count !== 7'(model.size())) begin failures++; $display("FAIL: count"); end
      if (valid) begin
        checks++;
        if (rdata !== model[0]) begin failures++; $display("FAIL: rdata %h exp %h", rdata, model[0]); end
      end
      if (full) fulls++;
      wr = !full && ($urandom_range(0, 99) < pw);
      rd = ($urandom_range(0, 99) < 50);
      wdata = 11'($urandom);
      @(posedge clk);
      if (rd && model.size() != 0) void'(model.pop_front());
      if (wr) model.push_back(wdata);
    end
    if (fulls == 0) begin failures++; $display("FAIL: never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
