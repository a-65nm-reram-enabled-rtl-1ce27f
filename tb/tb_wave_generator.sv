// tb_wave_generator: checks the nvFF control waveforms against the nvFF
// operating table (RESET phase, SET phase, restore, idle), that each store
// phase ends as soon as busy falls or at its worst-case length, that the
// restore pulse lasts one cycle, the done flag, and that the flip-flop
// clock is enabled only in NORMAL mode.
`timescale 1ns / 1ps
module tb_wave_generator;
  import nvp_pkg::*;
  localparam int TR = 12, TS = 9;
  logic clk = 0, rst_n = 0, start_store = 0, start_restore = 0, nvff_busy = 0;
  nvc_mode_t mode = MODE_NORMAL;
  nvff_ctrl_t ctrl;
  logic clk_en, done;
  logic [15:0] store_cycles;
  int checks = 0, failures = 0;
  localparam nvff_ctrl_t C_RESET = '{store: 1, restore: 0, set: 0, reset: 1, rswl: 0};
  localparam nvff_ctrl_t C_SET   = '{store: 1, restore: 0, set: 1, reset: 1, rswl: 1};
  localparam nvff_ctrl_t C_REST  = '{store: 0, restore: 1, set: 0, reset: 0, rswl: 1};

  wave_generator #(.T_RESET_MAX(TR), .T_SET_MAX(TS), .RESTORE_CYCLES(1)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // store with busy held for kr / ks cycles of each phase; returns the
  // phase lengths seen
  task automatic run_store(input int kr, input int ks, output int nr, output int ns);
    nr = 0; ns = 0;
    start_store = 1; @(posedge clk); #1; start_store = 0;
    while (ctrl == C_RESET) begin nvff_busy = (nr < kr); #1; @(posedge clk); #1; nr++; end
    while (ctrl == C_SET)   begin nvff_busy = (ns < ks); #1; @(posedge clk); #1; ns++; end
    nvff_busy = 0;
    chk(ctrl == '0 && done, "idle and done after store");
  endtask

  initial begin
    int nr, ns;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    chk(ctrl == '0 && clk_en, "NORMAL: lines low, clock on");
    mode = MODE_RETENTION; #1;
    chk(!clk_en, "RETENTION: clock gated");
    mode = MODE_STORE;
    run_store(3, 5, nr, ns);
    chk(nr == 4 && ns == 6, $sformatf("phases end on termination: %0d %0d", nr, ns));
    run_store(0, 0, nr, ns);
    chk(nr == 2 && ns == 2, $sformatf("matched phases: %0d %0d", nr, ns));
    run_store(100, 100, nr, ns);
    chk(nr == TR && ns == TS, $sformatf("worst-case phases: %0d %0d", nr, ns));
    chk(store_cycles == 16'(TR + TS), "store cycle count");
    mode = MODE_RESTORE;
    start_restore = 1; @(posedge clk); #1; start_restore = 0;
    chk(ctrl == C_REST && !done, "restore pulse");
    @(posedge clk); #1;
    chk(ctrl == '0 && done, "restore pulse one cycle");
    mode = MODE_NORMAL; #1;
    chk(clk_en, "clock back on");
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
