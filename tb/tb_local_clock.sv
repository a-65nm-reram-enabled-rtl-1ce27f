// tb_local_clock: checks that the ring-oscillator model is silent while
// disabled, toggles with the configured half period while enabled, and
// stops low when disabled again.
`timescale 1ns / 1ps
module tb_local_clock;
  localparam int HALF = 30;
  logic en = 0, lclk;
  int checks = 0, failures = 0;
  int edges = 0;
  realtime t_first, t_last;

  local_clock #(.HALF_PERIOD_NS(HALF)) dut (.*);

  always @(posedge lclk) begin
    if (edges == 0) t_first = $realtime;
    t_last = $realtime;
    edges++;
  end

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #1000;
    chk(edges == 0 && !lclk, "silent while disabled");
    en = 1;
    #(2 * HALF * 20 + 1);
    chk(edges == 20, $sformatf("20 periods, %0d edges", edges));
    chk(t_last - t_first == real'(2 * HALF * 19), "period");
    en = 0;
    #1;
    chk(!lclk, "low when disabled");
    #1000;
    chk(edges == 20, "stopped");
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
