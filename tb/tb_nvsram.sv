// tb_nvsram: end-to-end test of the nvSRAM macro.
//  1. SRAM mode: random bytes written to every address and read back.
//  2. STORE of every row; the number of ReRAM devices switched must equal
//     the number of bits whose stored state changes (fresh devices are
//     HRS, so the zeros), and the latch reads inverted after the store.
//  3. Power loss of the array supply, then RESTORE with 1WL, 4WL and 16WL
//     parallelism over different regions; all bytes must come back.
//  4. A second store of unchanged data must switch no device and keep the
//     write drivers on for far fewer cycles (self-write-termination).
`timescale 1ns / 1ps
module tb_nvsram;
  import nvp_pkg::*;
  logic clk = 0, rst_n = 0, vdds_on = 1, ceb = 1, web = 1, store = 0;
  logic [11:0] addr = 0;
  logic [7:0]  din = 0, dout;
  restore_par_t restore = RST_NONE;
  logic row_done, swt_busy;
  logic [31:0] switch_count, drive_cycles;
  int checks = 0, failures = 0;
  logic [7:0] ref_mem [4096];

  nvsram #(.STORE_MAX_CYCLES(400), .SW_MAX_CYCLES(40)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic wr(input int a, input logic [7:0] d);
    ceb = 0; web = 0; addr = 12'(a); din = d;
    @(posedge clk); #1;
    ceb = 1; web = 1;
  endtask

  task automatic rd(input int a, output logic [7:0] d);
    ceb = 0; web = 1; addr = 12'(a);
    @(posedge clk); #1;
    ceb = 1;
    d = dout;
  endtask

  task automatic store_rows(input int first, input int last);
    ceb = 0; web = 1; store = 1; addr = 12'(first << 4);
    for (int r = first; r <= last; r++) begin
      addr = 12'(r << 4);
      do @(posedge clk); while (!row_done);
      #1;
    end
    store = 0; ceb = 1;
    @(posedge clk); #1;
  endtask

  task automatic restore_region(input restore_par_t m, input int first_row, input int nrows);
    int n = wl_per_step(m);
    for (int r = first_row; r < first_row + nrows; r += n) begin
      ceb = 0; web = 1; restore = m; addr = 12'(r << 4);
      @(posedge clk); #1;
    end
    ceb = 1; restore = RST_NONE;
  endtask

  function automatic int zeros(input logic [7:0] b);
    int z = 0;
    for (int i = 0; i < 8; i++) if (!b[i]) z++;
    return z;
  endfunction

  initial begin
    logic [7:0] d;
    int exp_sw, sw0, dc0, dc_first;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int a = 0; a < 4096; a++) begin
      ref_mem[a] = 8'($urandom);
      wr(a, ref_mem[a]);
    end
    for (int a = 0; a < 4096; a += 7) begin
      rd(a, d);
      chk(d == ref_mem[a], $sformatf("SRAM read %0d", a));
    end
    // first store: every zero bit is SET from HRS to LRS
    exp_sw = 0;
    for (int a = 0; a < 4096; a++) exp_sw += zeros(ref_mem[a]);
    sw0 = switch_count; dc0 = drive_cycles;
    store_rows(0, 255);
    chk(switch_count - sw0 == exp_sw, $sformatf("switched %0d expected %0d", switch_count - sw0, exp_sw));
    dc_first = drive_cycles - dc0;
    rd(100, d);
    chk(d == ~ref_mem[100], "latch overwritten by the store");
    // power loss and restore
    vdds_on = 0;
    repeat (3) @(posedge clk);
    #1 vdds_on = 1;
    @(posedge clk); #1;
    restore_region(RST_1WL, 0, 16);
    restore_region(RST_4WL, 16, 48);
    restore_region(RST_16WL, 64, 192);
    for (int a = 0; a < 4096; a += 3) begin
      rd(a, d);
      chk(d == ref_mem[a], $sformatf("restored byte %0d", a));
    end
    // unchanged data: nothing switches, drivers on one cycle per column
    sw0 = switch_count; dc0 = drive_cycles;
    store_rows(0, 255);
    chk(switch_count == sw0, "matched store switched a device");
    chk(drive_cycles - dc0 == 256 * 128, $sformatf("matched drive cycles %0d", drive_cycles - dc0));
    chk(dc_first > 4 * (drive_cycles - dc0), "self-write-termination saves drive cycles");
    $display("first store drive cycles %0d, matched store %0d", dc_first, drive_cycles - dc0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
