// tb_vq_template_sram: writes a random codebook of 64 templates element by
// element, then reads each element index and checks that the same element
// of all 64 templates comes out one cycle later. Rewrites a few elements
// and checks that only those change.
module tb_vq_template_sram;
  import vq_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;

  logic              we, rd_en;
  logic [5:0]        wr_vec;
  elem_idx_t         wr_elem, rd_elem;
  logic [7:0]        wr_data;
  logic [63:0][7:0]  rd_data;
  logic [7:0]        model [64][16];
  int checks = 0, failures = 0;

  vq_template_sram dut (.clk, .we, .wr_vec, .wr_elem, .wr_data, .rd_en, .rd_elem, .rd_data);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all();
    for (int e = 0; e < 16; e++) begin
      @(negedge clk); rd_en = 1; rd_elem = elem_idx_t'(e);
      @(negedge clk); rd_en = 0;
      for (int j = 0; j < 64; j++) begin
        checks++;
        if (rd_data[j] !== model[j][e]) begin
          failures++; $display("FAIL: tmpl %0d elem %0d got %h exp %h", j, e, rd_data[j], model[j][e]);
        end
      end
    end
  endtask

  initial begin
    we = 0; rd_en = 0; wr_vec = 0; wr_elem = 0; wr_data = 0; rd_elem = 0;
    for (int j = 0; j < 64; j++)
      for (int e = 0; e < 16; e++) begin
        @(negedge clk);
        we = 1; wr_vec = 6'(j); wr_elem = elem_idx_t'(e); wr_data = 8'($urandom);
        model[j][e] = wr_data;
      end
    @(negedge clk); we = 0;
    check_all();
    for (int n = 0; n < 20; n++) begin
      @(negedge clk);
      we = 1; wr_vec = 6'($urandom); wr_elem = elem_idx_t'($urandom); wr_data = 8'($urandom);
      model[wr_vec][wr_elem] = wr_data;
    end
    @(negedge clk); we = 0;
    check_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
