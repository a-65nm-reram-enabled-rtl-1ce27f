// tb_nvsram_timing: checks the operation decode against the nvSRAM
// operation table (WRITE, READ, STORE, RESTORE, idle) and the row-store
// sequence: one precharge cycle, word-line cycles until the columns stop
// being busy (or the guard length), a one-cycle row_done, and the cycle
// count of each row store.
`timescale 1ns / 1ps
module tb_nvsram_timing;
  import nvp_pkg::*;
  localparam int unsigned GUARD = 20;
  logic clk = 0, rst_n = 0, ceb = 1, web = 1, store = 0, swt_busy = 0;
  restore_par_t restore = RST_NONE;
  logic op_read, op_write, op_restore, op_precharge, op_store_wl, dec_en, row_done;
  int checks = 0, failures = 0;

  nvsram_timing #(.STORE_MAX_CYCLES(GUARD)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // one row store with the columns busy for 'k' word-line cycles; returns
  // the cycles from store request to row_done
  task automatic row_store(input int k, output int cycles);
    int wlc;
    store = 1; ceb = 0; web = 1;
    cycles = 0; wlc = 0;
    while (!row_done) begin
      #1;
      if (op_store_wl) begin
        swt_busy = (wlc < k);
        wlc++;
      end else swt_busy = 0;
      @(posedge clk);
      cycles++;
      #1;
      if (cycles > 100) break;
    end
    store = 0; ceb = 1;
    @(posedge clk);
    #1;
  endtask

  initial begin
    int c;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // operation table
    ceb = 0; web = 0; #1;
    chk(op_write && !op_read && !op_restore && dec_en, "WRITE");
    web = 1; #1;
    chk(op_read && !op_write && !op_restore, "READ");
    for (int m = 1; m < 4; m++) begin
      restore = restore_par_t'(m); #1;
      chk(op_restore && !op_read && !op_write, "RESTORE");
    end
    restore = RST_NONE; ceb = 1; #1;
    chk(!op_read && !op_write && !op_restore && !dec_en, "idle");
    @(posedge clk); #1;
    // row store, columns busy for 5 cycles
    row_store(5, c);
    // IDLE->PRE edge, PRE, then 6 word-line cycles; counted up to DONE
    chk(c == 1 + 1 + 6, $sformatf("row store cycles %0d", c));
    row_store(1, c);
    chk(c == 1 + 1 + 2, $sformatf("fast row store cycles %0d", c));
    // stuck column: the guard ends the row
    row_store(1000, c);
    chk(c == 1 + 1 + GUARD, $sformatf("guard cycles %0d", c));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
