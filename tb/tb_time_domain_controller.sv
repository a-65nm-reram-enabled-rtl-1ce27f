// tb_time_domain_controller: drives sleeps of chosen lengths (counted in
// local-clock ticks supplied by this testbench) and checks the retention
// counter, the TimeOut threshold (255 with no recent long interruption,
// the time configuration register otherwise), the 2-bit history, the
// forecast (store only after two long interruptions), force store / force
// restore, and that the predictor does not update when disabled.
`timescale 1ns / 1ps
module tb_time_domain_controller;
  logic clk = 0, rst_n = 0, lclk = 0, enable = 1, sleep = 0, wakeup = 0;
  logic [7:0] time_conf = 8'd40;
  logic force_store = 0, force_restore = 0;
  logic osc_en, backup, timeout;
  logic [1:0] history;
  logic [7:0] count;
  int checks = 0, failures = 0;

  time_domain_controller dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // one interruption of 'ticks' local-clock ticks; returns the tick count at
  // which timeout was first seen (-1: never)
  task automatic interruption(input int ticks, output int to_at);
    to_at = -1;
    sleep = 1; @(posedge clk); #1 sleep = 0;
    chk(osc_en, "local clock enabled on sleep");
    for (int t = 1; t <= ticks; t++) begin
      #7 lclk = 1; #7 lclk = 0;
      repeat (3) @(posedge clk);
      #1;
      if (timeout && to_at < 0) to_at = t;
    end
    chk(count == 8'(ticks > 255 ? 255 : ticks), $sformatf("count %0d", count));
    wakeup = 1; @(posedge clk); #1 wakeup = 0;
    chk(!osc_en, "local clock stopped on wakeup");
    @(posedge clk); #1;
  endtask

  initial begin
    int to;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;
    chk(history == 2'b00 && !backup, "reset: no history, retention forecast");
    interruption(30, to);
    chk(to < 0 && history == 2'b00, "short interruption");
    interruption(300, to);
    chk(to == 255, $sformatf("timeout at 255 with history 00: %0d", to));
    chk(history == 2'b01 && !backup, "one long interruption: still retention");
    interruption(60, to);
    chk(to == 40, $sformatf("timeout at time conf: %0d", to));
    chk(history == 2'b10, "history shifts");
    interruption(260, to);
    chk(history == 2'b01, "history after long");
    interruption(256, to);
    chk(history == 2'b11 && backup, "two long interruptions: store forecast");
    force_restore = 1; #1; chk(!backup, "force restore");
    force_restore = 0; interruption(10, to);
    chk(history == 2'b10 && !backup, "short breaks the streak");
    force_store = 1; #1; chk(backup, "force store");
    force_store = 0;
    enable = 0; interruption(280, to);
    chk(history == 2'b10, "predictor frozen when disabled");
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
