// tb_adaptive_nv_controller: the NV controller with simple stand-ins for
// the nvFF bank (busy for a few cycles per store phase) and for the nvSRAM
// (row_done a few cycles after each row store starts). Checks:
//   - restore length max(2, G+1) cycles for every size and parallelism,
//     with G the number of row groups (20 ns .. 170 ns at 100 MHz);
//   - a store covers every configured row exactly once, drives the nvFF
//     RESET then SET phases, and ends in OFF;
//   - retention on a short interruption, timeout into store on a long one,
//     and the store forecast after two long interruptions.
`timescale 1ns / 1ps
module tb_adaptive_nv_controller;
  import nvp_pkg::*;
  logic clk = 0, rst_n = 0, lclk = 0, sleep = 0, wakeup = 0;
  logic [7:0] time_conf = 8'd10, nvsize_last = 8'd255;
  logic pred_enable = 1, force_store = 0, force_restore = 0, nvsram_en = 1;
  restore_par_t restore_mode = RST_16WL;
  nvff_ctrl_t nvff_ctrl;
  logic nvff_clk_en, nvff_busy, osc_en;
  logic nv_own, nv_ceb, nv_web, nv_store, nv_row_done;
  logic [11:0] nv_addr;
  restore_par_t nv_restore;
  nvc_mode_t mode;
  pwr_status_t pwr;
  logic backup, timeout;
  logic [1:0] history;
  int checks = 0, failures = 0;
  int rows_stored, phase_reset_seen, phase_set_seen;

  adaptive_nv_controller #(.T_RESET_MAX(16), .T_SET_MAX(16)) dut (.*);

  always #5 clk = ~clk;
  always #40 if (osc_en) lclk = ~lclk; else lclk = 0;

  // nvFF stand-in: busy for 3 cycles at the start of each phase
  int ph_cnt;
  nvff_ctrl_t ctrl_q;
  always @(posedge clk) begin
    ctrl_q <= nvff_ctrl;
    if (nvff_ctrl != ctrl_q) ph_cnt <= 0; else ph_cnt <= ph_cnt + 1;
    if (nvff_ctrl.store && !nvff_ctrl.set) phase_reset_seen <= 1;
    if (nvff_ctrl.store && nvff_ctrl.set)  phase_set_seen <= 1;
  end
  assign nvff_busy = nvff_ctrl.store && (ph_cnt < 3);

  // nvSRAM stand-in: a row store takes 4 cycles
  int row_cnt;
  always @(posedge clk) begin
    if (!nv_own || !nv_store || nv_row_done) row_cnt <= 0;
    else row_cnt <= row_cnt + 1;
    if (nv_row_done) rows_stored <= rows_stored + 1;
  end
  assign nv_row_done = nv_own && nv_store && (row_cnt == 3);

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic wait_mode(input nvc_mode_t m, input int limit, output int cyc);
    cyc = 0;
    while (mode != m && cyc < limit) begin @(posedge clk); #1; cyc++; end
    chk(mode == m, $sformatf("reached mode %0d", m));
  endtask

  // sleep that goes to OFF (by forecast or by timeout), then wakeup;
  // returns the cycles spent in RESTORE
  task automatic power_cycle(input int off_cycles, output int rcyc);
    int c;
    rows_stored = 0; phase_reset_seen = 0; phase_set_seen = 0;
    sleep = 1; @(posedge clk); #1 sleep = 0;
    wait_mode(MODE_OFF, 100000, c);
    chk(phase_reset_seen && phase_set_seen, "nvFF RESET and SET phases driven");
    chk(rows_stored == (nvsram_en ? int'(nvsize_last) + 1 : 0),
        $sformatf("rows stored %0d", rows_stored));
    repeat (off_cycles) @(posedge clk);
    #1 wakeup = 1; @(posedge clk); #1 wakeup = 0;
    chk(mode == MODE_RESTORE, "wakeup -> RESTORE");
    rcyc = 0;
    while (mode == MODE_RESTORE && rcyc < 1000) begin @(posedge clk); #1; rcyc++; end
    chk(mode == MODE_NORMAL, "back to NORMAL");
  endtask

  initial begin
    int rc, c;
    int lasts [4] = '{0, 15, 63, 255};
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // short interruption: retention and back
    sleep = 1; @(posedge clk); #1 sleep = 0;
    chk(mode == MODE_RETENTION, "short forecast -> RETENTION");
    repeat (50) @(posedge clk);
    #1 wakeup = 1; @(posedge clk); #1 wakeup = 0;
    chk(mode == MODE_NORMAL, "wakeup from RETENTION");
    // forced store: restore lengths for each size and parallelism
    force_store = 1;
    foreach (lasts[s]) begin
      for (int m = 1; m < 4; m++) begin
        int n, g;
        nvsize_last = 8'(lasts[s]);
        restore_mode = restore_par_t'(m);
        n = wl_per_step(restore_mode);
        g = (lasts[s] + 1 < n) ? 1 : (lasts[s] + 1) / n;
        power_cycle(5, rc);
        chk(rc == ((g + 1 > 2) ? g + 1 : 2),
            $sformatf("restore %0d rows %0dWL: %0d cycles", lasts[s] + 1, n, rc));
      end
    end
    nvsram_en = 0;
    power_cycle(5, rc);
    chk(rc == 2, $sformatf("nvFF-only restore %0d cycles", rc));
    nvsram_en = 1; nvsize_last = 0;
    force_store = 0;
    // long interruptions: timeout at 255 ticks, then forecast
    sleep = 1; @(posedge clk); #1 sleep = 0;
    chk(mode == MODE_RETENTION, "RETENTION");
    wait_mode(MODE_STORE, 100000, c);
    chk(c > 255 * 6, "timeout after 255 local-clock ticks");
    wait_mode(MODE_OFF, 10000, c);
    #1 wakeup = 1; @(posedge clk); #1 wakeup = 0;
    wait_mode(MODE_NORMAL, 100, c);
    chk(history == 2'b01 && !backup, "one long interruption");
    sleep = 1; @(posedge clk); #1 sleep = 0;
    chk(mode == MODE_RETENTION, "RETENTION again");
    wait_mode(MODE_STORE, 100000, c);
    chk(c < 20 * 10, "timeout at the configured time");
    wait_mode(MODE_OFF, 10000, c);
    repeat (255 * 10) @(posedge clk);
    #1 wakeup = 1; @(posedge clk); #1 wakeup = 0;
    wait_mode(MODE_NORMAL, 100, c);
    chk(history == 2'b11 && backup, "two long interruptions: store forecast");
    sleep = 1; @(posedge clk); #1 sleep = 0;
    chk(mode == MODE_STORE, "forecast sends sleep straight to STORE");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
