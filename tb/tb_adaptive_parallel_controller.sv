// tb_adaptive_parallel_controller: for every row address and every
// Restore code, checks the pre-decoder outputs and that exactly the
// expected 1, 4 or 16 word lines open (rows sharing ADDR<11:4>, ADDR<11:6>
// or ADDR<11:8>), and that nothing opens when disabled.
`timescale 1ns / 1ps
module tb_adaptive_parallel_controller;
  import nvp_pkg::*;
  logic         en;
  logic [7:0]   addr_row;
  restore_par_t restore;
  logic [15:0]  xa;
  logic [3:0]   xb, xc;
  logic [255:0] wl;
  int checks = 0, failures = 0;

  adaptive_parallel_controller dut (.*);

  initial begin
    for (int m = 0; m < 4; m++) begin
      for (int a = 0; a < 256; a++) begin
        logic [255:0] exp;
        int n;
        en = 1; addr_row = 8'(a); restore = restore_par_t'(m);
        #1;
        n = (m == 2) ? 4 : (m == 3) ? 16 : 1;
        exp = '0;
        for (int r = 0; r < 256; r++)
          if (r / n == a / n) exp[r] = 1'b1;
        checks++;
        if (wl !== exp) begin
          failures++;
          $display("FAIL wl mode %0d addr %0d", m, a);
        end
        checks++;
        if (xa != 16'(1 << (a >> 4))) begin
          failures++;
          $display("FAIL xa");
        end
      end
    end
    en = 0; addr_row = 8'h5A; restore = RST_16WL;
    #1;
    checks++;
    if (wl != '0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
