// tb_nvp_top: end-to-end test of the nonvolatile processor at its default
// size (1422 nvFF bits, 4 KB nvSRAM, 8 KB code ReRAM), standing in for the
// core: it loads state into the nvFFs and the nvSRAM, then goes through
// power interruptions and checks that the state survives each one.
// Mechanisms exercised and counted (each must happen at least once):
//   retention   short interruption kept at 0.4 V, no store
//   timeout     retention that lasts too long turns into a store
//   forecast    after two long interruptions a sleep goes straight to store
//   force       force-restore keeps a sleep in retention despite the
//               forecast; force-store sends a sleep to store
//   restore16   4 KB restored 16 rows per step: 17 cycles (170 ns)
//   restore_small 16 B restored: 2 cycles (20 ns)
//   swt_matched a store of unchanged data switches no ReRAM device and
//               finishes much faster than the first store
//   scan        the nvFF scan chain shifts a pattern through
//   code        the code ReRAM is programmed and read
`timescale 1ns / 1ps
module tb_nvp_top;
  import nvp_pkg::*;
  localparam int NB = 1422;
  logic clk = 0, rst_n = 0, sleep = 0, wakeup = 0;
  logic [7:0] time_conf = 8'd20, nvsize_last = 8'd255;
  logic pred_enable = 1, force_store = 0, force_restore = 0, nvsram_en = 1;
  restore_par_t restore_mode = RST_16WL;
  logic [NB-1:0] core_nvff_d = '0, core_nvff_q;
  logic scan_en = 0, scan_in = 0, scan_out;
  logic core_ceb = 1, core_web = 1;
  logic [11:0] core_addr = 0;
  logic [7:0] core_din = 0, core_dout;
  logic code_ren = 0, code_wen = 0, code_busy;
  logic [12:0] code_addr = 0;
  logic [7:0] code_rdata, code_wdata = 0;
  nvc_mode_t mode;
  pwr_status_t pwr;
  logic backup, timeout, nvff_busy, nvsram_swt_busy;
  logic [31:0] nvsram_switch_count, nvsram_drive_cycles;
  int checks = 0, failures = 0;
  logic [7:0] ref_mem [4096];
  logic [NB-1:0] ref_ff;
  int n_retention = 0, n_timeout = 0, n_forecast = 0, n_force = 0, n_restore16 = 0,
      n_restore_small = 0, n_swt_matched = 0, n_scan = 0, n_code = 0;

  nvp_top dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic wait_mode(input nvc_mode_t m, input int limit, output int cyc);
    cyc = 0;
    while (mode != m && cyc < limit) begin @(posedge clk); #1; cyc++; end
    chk(mode == m, $sformatf("reached mode %0d", m));
  endtask

  task automatic pulse_sleep();
    sleep = 1; @(posedge clk); #1 sleep = 0;
  endtask

  task automatic pulse_wakeup();
    wakeup = 1; @(posedge clk); #1 wakeup = 0;
  endtask

  task automatic sram_wr(input int a, input logic [7:0] d);
    core_ceb = 0; core_web = 0; core_addr = 12'(a); core_din = d;
    @(posedge clk); #1;
    core_ceb = 1; core_web = 1;
  endtask

  task automatic sram_rd(input int a, output logic [7:0] d);
    core_ceb = 0; core_web = 1; core_addr = 12'(a);
    @(posedge clk); #1;
    core_ceb = 1;
    d = core_dout;
  endtask

  task automatic check_state(input string when, input int bytes);
    logic [7:0] d;
    int bad = 0;
    chk(core_nvff_q == ref_ff, {when, ": nvFF state"});
    for (int a = 0; a < bytes; a++) begin
      sram_rd(a, d);
      if (d != ref_mem[a]) bad++;
    end
    chk(bad == 0, $sformatf("%s: %0d nvSRAM bytes wrong", when, bad));
  endtask

  // wakeup from OFF; returns the cycles spent in RESTORE
  task automatic wake_from_off(output int rcyc);
    chk(mode == MODE_OFF && pwr == '0, "OFF: every domain off");
    pulse_wakeup();
    rcyc = 0;
    while (mode == MODE_RESTORE && rcyc < 1000) begin @(posedge clk); #1; rcyc++; end
    chk(mode == MODE_NORMAL, "restored to NORMAL");
  endtask

  initial begin
    int c, rc, sw0, st_first, st_matched;
    logic [7:0] d;
    logic [NB-1:0] pat;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;
    // load state
    ref_ff = '0;
    for (int i = 0; i < NB; i += 32) ref_ff[i +: 32] = $urandom;
    core_nvff_d = ref_ff;
    @(posedge clk); #1;
    for (int a = 0; a < 4096; a++) begin
      ref_mem[a] = 8'($urandom);
      sram_wr(a, ref_mem[a]);
    end
    check_state("loaded", 64);
    // code ReRAM
    code_wen = 1; code_addr = 13'd100; code_wdata = 8'hA5;
    @(posedge clk); #1 code_wen = 0;
    while (code_busy) begin @(posedge clk); #1; end
    code_ren = 1; @(posedge clk); #1 code_ren = 0;
    chk(code_rdata == 8'hA5, "code ReRAM read");
    n_code++;

    // 1. short interruption: retention
    pulse_sleep();
    chk(mode == MODE_RETENTION && pwr.reten_latch == SUP_0V4 && pwr.cpu_core == SUP_OFF,
        "RETENTION at 0.4 V");
    core_nvff_d = ~ref_ff;   // the core is off: its outputs must not be captured
    repeat (100) @(posedge clk);
    #1 pulse_wakeup();
    chk(mode == MODE_NORMAL, "back from retention");
    core_nvff_d = ref_ff;
    check_state("after retention", 4096);
    n_retention++;

    // 2. long interruption: timeout turns retention into store
    sw0 = nvsram_switch_count;
    pulse_sleep();
    chk(mode == MODE_RETENTION, "long sleep starts in retention");
    wait_mode(MODE_STORE, 200000, c);
    chk(timeout, "timeout raised");
    n_timeout++;
    c = 0;
    while (mode == MODE_STORE) begin @(posedge clk); #1; c++; end
    st_first = c;
    chk(mode == MODE_OFF, "store ends in OFF");
    chk(core_nvff_q != ref_ff, "nvFF latches lost in OFF");
    repeat (200) @(posedge clk);
    #1 wake_from_off(rc);
    chk(rc == 17, $sformatf("4 KB 16WL restore: %0d cycles, expected 17 (170 ns)", rc));
    if (rc == 17) n_restore16++;
    check_state("after first store/restore", 4096);
    chk(nvsram_switch_count != sw0, "first store switched devices");

    // 3. second long interruption: timeout at the configured time, and a
    //    long OFF period, so the history becomes 11
    pulse_sleep();
    wait_mode(MODE_STORE, 200000, c);
    chk(c < 30 * 20, "timeout at time conf");
    wait_mode(MODE_OFF, 200000, c);
    repeat (260 * 10) @(posedge clk);
    #1 wake_from_off(rc);
    check_state("after second store/restore", 256);
    chk(backup, "store forecast after two long interruptions");

    // 4. forecast: a sleep goes straight to store; unchanged data
    sw0 = nvsram_switch_count;
    pulse_sleep();
    chk(mode == MODE_STORE, "forecast: straight to STORE");
    n_forecast++;
    c = 0;
    while (mode == MODE_STORE) begin @(posedge clk); #1; c++; end
    st_matched = c;
    chk(nvsram_switch_count == sw0, "matched store switches nothing");
    chk(st_matched * 5 < st_first, $sformatf("matched store %0d cycles vs %0d", st_matched, st_first));
    if (nvsram_switch_count == sw0 && st_matched * 5 < st_first) n_swt_matched++;
    $display("store cycles: first %0d, unchanged data %0d", st_first, st_matched);
    wake_from_off(rc);
    check_state("after matched store", 256);

    // 5. force restore overrides the forecast: retention
    force_restore = 1;
    pulse_sleep();
    chk(mode == MODE_RETENTION, "force restore -> RETENTION");
    repeat (20) @(posedge clk);
    #1 pulse_wakeup();
    chk(mode == MODE_NORMAL, "back");
    force_restore = 0;
    n_force++;

    // 6. 16 B configuration, restore 1 row: 20 ns
    nvsize_last = 8'd0; restore_mode = RST_1WL;
    for (int a = 0; a < 16; a++) begin
      ref_mem[a] = 8'($urandom);
      sram_wr(a, ref_mem[a]);
    end
    ref_ff = ~ref_ff; core_nvff_d = ref_ff;
    @(posedge clk); #1;
    // the short interruption of step 5 broke the streak: force the store
    chk(!backup, "short interruption resets the forecast");
    force_store = 1;
    pulse_sleep();
    chk(mode == MODE_STORE, "force store -> STORE");
    force_store = 0;
    wait_mode(MODE_OFF, 200000, c);
    wake_from_off(rc);
    chk(rc == 2, $sformatf("16 B restore: %0d cycles, expected 2 (20 ns)", rc));
    if (rc == 2) n_restore_small++;
    check_state("16 B configuration", 16);

    // 7. scan chain
    scan_en = 1;
    pat = '0;
    for (int i = 0; i < NB; i += 32) pat[i +: 32] = $urandom;
    for (int i = 0; i < NB; i++) begin scan_in = pat[i]; @(posedge clk); #1; end
    chk(core_nvff_q == {<<{pat}}, "scan chain loaded");
    begin
      int bad = 0;
      for (int i = 0; i < NB; i++) begin
        if (scan_out != pat[i]) bad++;
        @(posedge clk); #1;
      end
      chk(bad == 0, "scan chain unloaded");
      if (bad == 0) n_scan++;
    end
    scan_en = 0;

    $display("mechanisms: retention=%0d timeout=%0d forecast=%0d force=%0d restore16=%0d restore_small=%0d swt_matched=%0d scan=%0d code=%0d",
             n_retention, n_timeout, n_forecast, n_force, n_restore16, n_restore_small,
             n_swt_matched, n_scan, n_code);
    chk(n_retention > 0, "retention happened");
    chk(n_timeout > 0, "timeout happened");
    chk(n_forecast > 0, "forecast store happened");
    chk(n_force > 0, "force restore happened");
    chk(n_restore16 > 0, "16WL restore happened");
    chk(n_restore_small > 0, "16 B restore happened");
    chk(n_swt_matched > 0, "self-write-termination saving happened");
    chk(n_scan > 0, "scan happened");
    chk(n_code > 0, "code ReRAM access happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #50ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
