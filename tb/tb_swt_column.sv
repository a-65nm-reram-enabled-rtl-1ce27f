// tb_swt_column: checks the self-write-termination column against a
// reference of its rule (arm on BL=BLB=1, drive while exactly one bit line
// is low and Store is high, disarm on BL=BLB=0), with directed SET and
// RESET sequences followed by random bit-line patterns.
`timescale 1ns / 1ps
module tb_swt_column;
  logic clk = 0, rst_n = 0, store = 0, bl = 1, blb = 1;
  logic driver_en, set_op, busy;
  int checks = 0, failures = 0;
  logic ref_armed;

  swt_column dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic step(input logic s, input logic b, input logic bb);
    store = s; bl = b; blb = bb;
    #1;
    chk(driver_en == (s && ref_armed && (b ^ bb)), "driver_en");
    chk(set_op == !b, "set_op");
    chk(busy == ref_armed, "busy");
    @(posedge clk);
    if (b && bb) ref_armed = 1;
    else if (!b && !bb) ref_armed = 0;
    #1;
  endtask

  initial begin
    ref_armed = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // SET of a 0-cell: precharge, BL falls, driver on, then BLB falls
    step(1, 1, 1);
    step(1, 0, 1);
    chk(driver_en && set_op, "SET driver on");
    step(1, 0, 1);
    step(1, 0, 0);
    chk(!driver_en && !busy, "SET terminated");
    // RESET of a 1-cell
    step(1, 1, 1);
    step(1, 1, 0);
    chk(driver_en && !set_op, "RESET driver on");
    step(1, 0, 0);
    step(1, 1, 0);
    chk(!driver_en, "stays terminated until the next precharge");
    // random patterns
    repeat (300) step($urandom % 4 != 0, 1'($urandom), 1'($urandom));
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
