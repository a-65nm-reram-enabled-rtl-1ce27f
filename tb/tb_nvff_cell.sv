// tb_nvff_cell: checks one nonvolatile flip-flop: D and scan capture, hold
// with the clock gated, a RESET-then-SET store that ends with
// self-write-termination within the program-time bound, restore of 0 and 1
// after the supply was lost, and that storing an unchanged value drives no
// device (busy never rises).
`timescale 1ns / 1ps
module tb_nvff_cell;
  import nvp_pkg::*;
  localparam int SWMAX = 6;
  logic clk = 0, ff_en = 1, pwr_on = 1, d = 0, sin = 0, scan_en = 0;
  nvff_ctrl_t ctrl = '0;
  logic q, busy;
  int checks = 0, failures = 0;

  nvff_cell #(.SEED(3), .SW_MAX_CYCLES(SWMAX)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // returns the number of cycles busy was high over both phases
  task automatic do_store(output int busy_cycles);
    busy_cycles = 0;
    ctrl = '{store: 1, restore: 0, set: 0, reset: 1, rswl: 0};
    repeat (SWMAX + 3) begin @(posedge clk); #1; busy_cycles += busy; end
    chk(!busy, "RESET phase terminated");
    ctrl = '{store: 1, restore: 0, set: 1, reset: 1, rswl: 1};
    repeat (SWMAX + 3) begin @(posedge clk); #1; busy_cycles += busy; end
    chk(!busy, "SET phase terminated");
    ctrl = '0;
  endtask

  task automatic power_cycle_restore();
    pwr_on = 0; #3; pwr_on = 1;
    @(posedge clk); #1;
    ctrl = '{store: 0, restore: 1, set: 0, reset: 0, rswl: 1};
    @(posedge clk); #1;
    ctrl = '0;
  endtask

  initial begin
    int bc;
    @(posedge clk); #1;
    d = 1; @(posedge clk); #1; chk(q == 1, "capture D=1");
    d = 0; @(posedge clk); #1; chk(q == 0, "capture D=0");
    scan_en = 1; sin = 1; @(posedge clk); #1; chk(q == 1, "scan capture");
    scan_en = 0;
    ff_en = 0; d = 0; @(posedge clk); #1; chk(q == 1, "gated clock holds");
    ff_en = 1;
    // store 1 (devices start RL=HRS, RR=LRS, which already encodes 1)
    do_store(bc);
    chk(bc == 0, "matched store drives nothing");
    d = 0; @(posedge clk); #1;
    ff_en = 0;
    do_store(bc);
    chk(bc >= 2 && bc <= 2 * SWMAX + 2, $sformatf("store of 0 busy cycles %0d", bc));
    power_cycle_restore();
    chk(q == 0, "restore 0");
    ff_en = 1; d = 1; @(posedge clk); #1; ff_en = 0;
    do_store(bc);
    chk(bc >= 2, "store of 1 switches");
    power_cycle_restore();
    chk(q == 1, "restore 1");
    // random values
    repeat (20) begin
      logic v;
      v = 1'($urandom);
      ff_en = 1; d = v; @(posedge clk); #1; ff_en = 0;
      do_store(bc);
      power_cycle_restore();
      chk(q == v, "random restore");
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
