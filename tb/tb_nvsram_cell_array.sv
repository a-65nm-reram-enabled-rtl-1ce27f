// tb_nvsram_cell_array: drives the 7T1R cell-array model directly, with the
// write drivers enabled by a reference termination rule kept in this
// testbench. Checks byte write/read, that a row store makes the 0 side's
// bit line fall first, that every column ends with both bit lines low,
// that Q=0 is kept as LRS and Q=1 as HRS (seen through a restore after the
// latches lost their data), multi-row restore, and the switch count.
`timescale 1ns / 1ps
module tb_nvsram_cell_array;
  localparam int ROWS = 16, COLS = 128;
  logic clk = 0, vdds_on = 1;
  logic [ROWS-1:0] wl = '0;
  logic [3:0] col = 0;
  logic op_read = 0, op_write = 0, op_restore = 0, op_precharge = 0, op_store_wl = 0;
  logic [7:0] din = 0, dout;
  logic [COLS-1:0] driver_en, bl, blb, armed;
  logic [31:0] switch_count, drive_cycles;
  int checks = 0, failures = 0;
  logic [COLS-1:0] ref_row [ROWS];

  nvsram_cell_array #(.ROWS(ROWS), .COLS(COLS), .SW_MAX_CYCLES(12)) dut (.*);

  always #5 clk = ~clk;

  // reference termination: armed on both high, off on both low
  always_ff @(posedge clk)
    for (int c = 0; c < COLS; c++)
      if (bl[c] && blb[c]) armed[c] <= 1'b1;
      else if (!bl[c] && !blb[c]) armed[c] <= 1'b0;
  assign driver_en = op_store_wl ? (armed & (bl ^ blb)) : '0;

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic store_row(input int r);
    int n;
    wl = '0; wl[r] = 1'b1;
    op_precharge = 1; @(posedge clk); #1; op_precharge = 0;
    chk(&bl && &blb, "precharged");
    op_store_wl = 1; @(posedge clk); #1;
    for (int c = 0; c < COLS; c++)
      chk(bl[c] == ref_row[r][c] && blb[c] == !ref_row[r][c], "0 side falls first");
    n = 0;
    while ((|armed) && n < 40) begin @(posedge clk); #1; n++; end
    chk(!(|bl) && !(|blb), "all columns terminated");
    op_store_wl = 0; wl = '0;
  endtask

  initial begin
    logic [7:0] b;
    int zeros, sw0;
    armed = '0;
    #1;
    for (int r = 0; r < ROWS; r++) begin
      ref_row[r] = {$urandom, $urandom, $urandom, $urandom};
      for (int k = 0; k < 16; k++) begin
        wl = '0; wl[r] = 1; col = 4'(k); din = ref_row[r][k*8 +: 8]; op_write = 1;
        @(posedge clk); #1; op_write = 0;
      end
    end
    for (int r = 0; r < ROWS; r++) begin
      wl = '0; wl[r] = 1; col = 4'(r); op_read = 1; @(posedge clk); #1; op_read = 0;
      chk(dout == ref_row[r][r*8 +: 8], "read back");
    end
    zeros = 0;
    for (int r = 0; r < ROWS; r++) for (int c = 0; c < COLS; c++) zeros += !ref_row[r][c];
    sw0 = switch_count;
    for (int r = 0; r < ROWS; r++) store_row(r);
    chk(switch_count - sw0 == zeros, "switch count = cells set to LRS");
    vdds_on = 0; @(posedge clk); @(posedge clk); #1 vdds_on = 1;
    wl = '1; op_restore = 1; @(posedge clk); #1; op_restore = 0;
    for (int r = 0; r < ROWS; r++)
      for (int k = 0; k < 16; k++) begin
        wl = '0; wl[r] = 1; col = 4'(k); op_read = 1; @(posedge clk); #1; op_read = 0;
        chk(dout == ref_row[r][k*8 +: 8], "restored");
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
