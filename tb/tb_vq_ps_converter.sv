// tb_vq_ps_converter: loads random 12-bit values into the parallel-to-serial
// register and checks that the bits come out MSB first, one per shift, and
// that the register holds while shift is low.
module tb_vq_ps_converter;
  logic clk = 0;
  always #5 clk = ~clk;

  logic        load, shift, bit_o;
  logic [11:0] din;
  int checks = 0, failures = 0;

  vq_ps_converter dut (.clk, .load, .din, .shift, .bit_o);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [11:0] v;
    load = 0; shift = 0; din = 0;
    for (int n = 0; n < 300; n++) begin
      v = 12'($urandom);
      @(negedge clk); load = 1; din = v;
      @(negedge clk); load = 0;
      for (int b = 11; b >= 0; b--) begin
        // hold for a random number of cycles first
        shift = 0;
        repeat ($urandom_range(0, 2)) @(negedge clk);
        checks++;
        if (bit_o !== v[b]) begin
          failures++;
          $display("FAIL: value %h bit %0d got %b", v, b, bit_o);
        end
        shift = 1;
        @(negedge clk);
      end
      shift = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
