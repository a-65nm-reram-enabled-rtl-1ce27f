// tb_nvc_mode_fsm: walks every edge of the control flow (NORMAL, RETENTION,
// STORE, OFF, RESTORE), checks the start pulses and the power-domain status
// of every mode against the power-domain table, and that a mode waits for
// its condition (no store without store_done, no restore without wakeup).
`timescale 1ns / 1ps
module tb_nvc_mode_fsm;
  import nvp_pkg::*;
  logic clk = 0, rst_n = 0, sleep = 0, wakeup = 0, backup = 0, timeout = 0;
  logic store_done = 0, restore_done = 0;
  nvc_mode_t mode;
  logic start_store, start_restore;
  pwr_status_t pwr;
  int checks = 0, failures = 0;

  nvc_mode_fsm dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic pwr_status_t exp_pwr(nvc_mode_t m);
    case (m)
      MODE_NORMAL:    return '{SUP_ON,  SUP_OFF, SUP_OFF, SUP_ON,  SUP_OFF};
      MODE_RETENTION: return '{SUP_OFF, SUP_0V4, SUP_OFF, SUP_0V4, SUP_OFF};
      MODE_STORE:     return '{SUP_OFF, SUP_ON,  SUP_ON,  SUP_ON,  SUP_ON};
      MODE_RESTORE:   return '{SUP_OFF, SUP_ON,  SUP_ON,  SUP_ON,  SUP_ON};
      default:        return '{SUP_OFF, SUP_OFF, SUP_OFF, SUP_OFF, SUP_OFF};
    endcase
  endfunction

  task automatic tick();
    @(posedge clk); #1;
    chk(pwr == exp_pwr(mode), $sformatf("power status in mode %0d", mode));
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    tick(); chk(mode == MODE_NORMAL, "reset to NORMAL");
    // short interruption: retention, then wakeup
    sleep = 1; backup = 0; #1; chk(!start_store, "no store on retention forecast");
    tick(); sleep = 0; chk(mode == MODE_RETENTION, "sleep -> RETENTION");
    tick(); chk(mode == MODE_RETENTION, "stays in RETENTION");
    wakeup = 1; tick(); wakeup = 0; chk(mode == MODE_NORMAL, "wakeup -> NORMAL");
    // retention that times out
    sleep = 1; tick(); sleep = 0;
    timeout = 1; #1; chk(start_store, "timeout starts store");
    tick(); timeout = 0; chk(mode == MODE_STORE, "timeout -> STORE");
    wakeup = 1; tick(); tick(); wakeup = 0; chk(mode == MODE_STORE, "store not interrupted");
    store_done = 1; tick(); store_done = 0; chk(mode == MODE_OFF, "STORE -> OFF");
    tick(); chk(mode == MODE_OFF, "stays OFF");
    wakeup = 1; #1; chk(start_restore, "wakeup starts restore");
    tick(); wakeup = 0; chk(mode == MODE_RESTORE, "OFF -> RESTORE");
    tick(); chk(mode == MODE_RESTORE, "waits for restore");
    restore_done = 1; tick(); restore_done = 0; chk(mode == MODE_NORMAL, "RESTORE -> NORMAL");
    // long forecast: straight to store
    sleep = 1; backup = 1; #1; chk(start_store, "backup forecast starts store");
    tick(); sleep = 0; chk(mode == MODE_STORE, "sleep with backup -> STORE");
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
