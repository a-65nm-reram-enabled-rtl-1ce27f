// tb_space_domain_controller: for every nvSRAM size of the document
// (0 B, 16 B, 256 B, 1 KB, 4 KB) and every restore parallelism (1, 4, 16
// word lines), checks the restore walk: the row addresses issued (0, n,
// 2n, ...), the Restore code, and the number of cycles, which must be the
// number of groups max(1, rows/n), and 0 for the 0 B size. Store walks are
// checked row by row with row_done pulses after random delays.
`timescale 1ns / 1ps
module tb_space_domain_controller;
  import nvp_pkg::*;
  logic clk = 0, rst_n = 0, start_store = 0, start_restore = 0, nvsram_en = 1, row_done = 0;
  restore_par_t restore_mode = RST_1WL;
  logic [7:0] nvsize_last = 0, addr_row;
  logic nv_store, active, done;
  restore_par_t nv_restore;
  int checks = 0, failures = 0;
  int sizes [5] = '{0, 1, 16, 64, 256};   // rows of 16 B

  space_domain_controller dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    foreach (sizes[s]) begin
      nvsram_en   = (sizes[s] != 0);
      nvsize_last = 8'(sizes[s] - 1);
      for (int m = 1; m < 4; m++) begin
        int n, groups, cyc;
        restore_mode = restore_par_t'(m);
        n = wl_per_step(restore_mode);
        groups = (sizes[s] == 0) ? 0 : (sizes[s] < n ? 1 : sizes[s] / n);
        start_restore = 1; @(posedge clk); #1; start_restore = 0;
        cyc = 0;
        while (active) begin
          chk(nv_restore == restore_mode, "restore code");
          chk(addr_row == 8'(cyc * n), $sformatf("restore address %0d", addr_row));
          @(posedge clk); #1; cyc++;
        end
        chk(cyc == groups, $sformatf("size %0d rows, %0dWL: %0d cycles, expected %0d",
                                     sizes[s], n, cyc, groups));
        chk(done && nv_restore == RST_NONE, "restore done");
      end
      // store walk
      begin
        int rows;
        start_store = 1; @(posedge clk); #1; start_store = 0;
        rows = 0;
        while (active) begin
          chk(nv_store && addr_row == 8'(rows), "store address");
          repeat ($urandom % 3) @(posedge clk);
          #1 row_done = 1; @(posedge clk); #1 row_done = 0;
          rows++;
        end
        chk(rows == sizes[s], $sformatf("store rows %0d", rows));
        chk(done && !nv_store, "store done");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
