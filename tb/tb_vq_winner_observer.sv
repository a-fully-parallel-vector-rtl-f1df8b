// tb_vq_winner_observer: exhaustive test of the 8-input winner observer and
// a random test of the 64-input one. Expects the lowest set flag's index,
// its one-hot grant, and any = (flags != 0).
module tb_vq_winner_observer;
  logic [7:0]  f8, g8;
  logic [2:0]  c8;
  logic        a8;
  logic [63:0] f64, g64;
  logic [5:0]  c64;
  logic        a64;
  int checks = 0, failures = 0;

  vq_winner_observer #(.N(8))  dut8  (.flags(f8),  .grant(g8),  .code(c8),  .any(a8));
  vq_winner_observer #(.N(64)) dut64 (.flags(f64), .grant(g64), .code(c64), .any(a64));

  function automatic int lowest(input logic [63:0] f);
    for (int i = 0; i < 64; i++) if (f[i]) return i;
    return -1;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e;
    for (int v = 0; v < 256; v++) begin
      f8 = 8'(v); #1;
      e = lowest(64'(v));
      checks++;
      if (a8 !== (v != 0)) begin failures++; $display("FAIL: any8 %h", v); end
      if (v != 0) begin
        checks += 2;
        if (c8 !== 3'(e)) begin failures++; $display("FAIL: code8 %h -> %0d", v, c8); end
        if (g8 !== 8'(1 << e)) begin failures++; $display("FAIL: grant8 %h", v); end
      end
    end
    for (int n = 0; n < 2000; n++) begin
      f64 = {$urandom, $urandom};
      // thin out the flags so the lowest one lands anywhere
      f64 &= 64'hffff_ffff_ffff_ffff << $urandom_range(0, 63);
      if (n % 7 == 0 || f64 == 0) f64 = 64'd1 << $urandom_range(0, 63);
      #1;
      e = lowest(f64);
      checks += 2;
      if (c64 !== 6'(e)) begin failures++; $display("FAIL: code64 %h -> %0d", f64, c64); end
      if (g64 !== 64'(64'd1 << e)) begin failures++; $display("FAIL: grant64 %h", f64); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
