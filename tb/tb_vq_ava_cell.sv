// tb_vq_ava_cell: self-checking test of the absolute-value-and-accumulate
// cell. Feeds 16-element vector pairs with the cell's timing (subtract in
// one cycle, accumulate in the next) and compares the final accumulator
// with the Manhattan distance computed here. Covers random vectors and the
// extremes (all 0 against all 255, and equal vectors).
module tb_vq_ava_cell;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [7:0]  x, t;
  logic        diff_en, acc_clr, acc_en;
  logic [11:0] acc;
  int checks = 0, failures = 0;

  vq_ava_cell dut (.clk, .x, .t, .diff_en, .acc_clr, .acc_en, .acc);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_vec(input logic [7:0] xv [16], input logic [7:0] tv [16]);
    int expect_d = 0;
    @(negedge clk);
    acc_clr = 1; diff_en = 0; acc_en = 0;
    for (int i = 0; i < 16; i++) begin
      @(negedge clk);
      acc_clr = 0;
      x = xv[i]; t = tv[i]; diff_en = 1; acc_en = (i > 0);
      expect_d += (xv[i] > tv[i]) ? int'(xv[i]) - int'(tv[i]) : int'(tv[i]) - int'(xv[i]);
    end
    @(negedge clk);
    diff_en = 0; acc_en = 1;
    @(negedge clk);
    acc_en = 0;
    checks++;
    if (acc !== 12'(expect_d)) begin
      failures++;
      $display("FAIL: acc=%0d expected %0d", acc, expect_d);
    end
  endtask

  initial begin
    logic [7:0] xv [16], tv [16];
    x = 0; t = 0; diff_en = 0; acc_clr = 0; acc_en = 0;
    // extremes
    for (int i = 0; i < 16; i++) begin xv[i] = 8'd0; tv[i] = 8'd255; end
    run_vec(xv, tv);
    run_vec(tv, xv);
    for (int i = 0; i < 16; i++) begin xv[i] = 8'($urandom); tv[i] = xv[i]; end
    run_vec(xv, tv);
    for (int n = 0; n < 500; n++) begin
      for (int i = 0; i < 16; i++) begin xv[i] = 8'($urandom); tv[i] = 8'($urandom); end
      run_vec(xv, tv);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
