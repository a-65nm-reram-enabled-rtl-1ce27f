// tb_nvff_bank: checks the nvFF bank: parallel capture, the scan chain
// (a pattern shifted in appears at scan_out NBITS cycles later), hold with
// the clock enable low, a store whose busy flag falls once every cell has
// terminated, and the restore of every bit after the supply was lost.
`timescale 1ns / 1ps
module tb_nvff_bank;
  import nvp_pkg::*;
  localparam int N = 40, SWMAX = 5;
  logic clk = 0, clk_en = 1, pwr_on = 1, scan_en = 0, scan_in = 0;
  logic [N-1:0] d = '0, q;
  logic scan_out, busy;
  nvff_ctrl_t ctrl = '0;
  int checks = 0, failures = 0;

  nvff_bank #(.NBITS(N), .SW_MAX_CYCLES(SWMAX)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic phase(input nvff_ctrl_t c);
    int n = 0;
    ctrl = c;
    @(posedge clk); #1;
    while (busy && n < SWMAX + 4) begin @(posedge clk); #1; n++; end
    chk(!busy, "phase terminated");
  endtask

  initial begin
    logic [N-1:0] v, pat;
    @(posedge clk); #1;
    for (int k = 0; k < 5; k++) begin
      v = {$urandom, $urandom};
      d = v; @(posedge clk); #1;
      chk(q == v, "parallel capture");
      clk_en = 0; d = ~v; @(posedge clk); #1;
      chk(q == v, "hold with clock gated");
      phase('{store: 1, restore: 0, set: 0, reset: 1, rswl: 0});
      phase('{store: 1, restore: 0, set: 1, reset: 1, rswl: 1});
      ctrl = '0;
      pwr_on = 0; #2; pwr_on = 1;
      @(posedge clk); #1;
      ctrl = '{store: 0, restore: 1, set: 0, reset: 0, rswl: 1};
      @(posedge clk); #1;
      ctrl = '0;
      chk(q == v, "restore after power loss");
      clk_en = 1;
    end
    // scan chain
    pat = {$urandom, $urandom};
    scan_en = 1;
    for (int i = 0; i < N; i++) begin scan_in = pat[i]; @(posedge clk); #1; end
    for (int i = 0; i < N; i++) begin
      chk(scan_out == pat[i], "scan out");
      scan_in = 0; @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
