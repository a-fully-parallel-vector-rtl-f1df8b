// tb_vq_wta: bit-serial winner-take-all test. Random 12-bit distance sets,
// often drawn from a narrow range so that ties occur, are shifted in MSB
// first. Checks every cycle that min_bit_o is the corresponding bit of the
// true minimum, and at the end that exactly the inputs equal to the minimum
// keep their flag. Runs a 64-input and an 8-input instance.
module tb_vq_wta;
  logic clk = 0;
  always #5 clk = ~clk;

  localparam int NA = 64, NB = 8;
  logic          init, en;
  logic [NA-1:0] bits_a, flags_a;
  logic [NB-1:0] bits_b, flags_b;
  logic          min_a, min_b;
  int checks = 0, failures = 0;
  int ties = 0;

  vq_wta #(.N(NA)) dut_a (.clk, .init, .en, .bits_i(bits_a), .min_bit_o(min_a), .flags_o(flags_a));
  vq_wta #(.N(NB)) dut_b (.clk, .init, .en, .bits_i(bits_b), .min_bit_o(min_b), .flags_o(flags_b));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [11:0] da [NA];
    logic [11:0] db [NB];
    logic [11:0] mina, minb;
    int lo, span, nmin;
    init = 0; en = 0; bits_a = 0; bits_b = 0;
    for (int n = 0; n < 400; n++) begin
      lo   = $urandom_range(0, 4000);
      span = (n % 3 == 0) ? 3 : 4095 - lo;
      mina = 12'hfff; minb = 12'hfff;
      for (int i = 0; i < NA; i++) begin
        da[i] = 12'(lo + $urandom_range(0, span));
        if (da[i] < mina) mina = da[i];
      end
      for (int i = 0; i < NB; i++) begin
        db[i] = 12'(lo + $urandom_range(0, span));
        if (db[i] < minb) minb = db[i];
      end
      @(negedge clk); init = 1;
      @(negedge clk); init = 0; en = 1;
      for (int b = 11; b >= 0; b--) begin
        for (int i = 0; i < NA; i++) bits_a[i] = da[i][b];
        for (int i = 0; i < NB; i++) bits_b[i] = db[i][b];
        #1;
        checks += 2;
        if (min_a !== mina[b]) begin failures++; $display("FAIL: A min bit %0d", b); end
        if (min_b !== minb[b]) begin failures++; $display("FAIL: B min bit %0d", b); end
        @(negedge clk);
      end
      en = 0;
      nmin = 0;
      for (int i = 0; i < NA; i++) begin
        checks++;
        if (flags_a[i] !== (da[i] == mina)) begin failures++; $display("FAIL: A flag %0d", i); end
        if (da[i] == mina) nmin++;
      end
      if (nmin > 1) ties++;
      for (int i = 0; i < NB; i++) begin
        checks++;
        if (flags_b[i] !== (db[i] == minb)) begin failures++; $display("FAIL: B flag %0d", i); end
      end
    end
    if (ties == 0) begin failures++; $display("FAIL: no tie exercised"); end
    $display("ties exercised: %0d", ties);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
