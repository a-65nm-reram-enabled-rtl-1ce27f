// nvc_mode_fsm: mode control flow of the adaptive NV controller.
//
// Five modes, following the document's control flow:
//   NORMAL    -> on sleep: STORE if the forecast says backup, else RETENTION
//   RETENTION -> STORE on timeout (the sleep has lasted too long);
//                NORMAL on wakeup
//   STORE     -> OFF when both nvFF and nvSRAM stores are done
//   OFF       -> RESTORE on wakeup
//   RESTORE   -> NORMAL when both restores are done
// In RETENTION, timeout is checked before wakeup. start_store and
// start_restore are one-cycle pulses issued on the transitions into STORE
// and RESTORE, in the same cycle, so the store/restore engines start in the
// first cycle of the new mode.
// The power-domain status per mode is the document's table:
//   mode       CPU core  reten latch  nvFF slave  nvSRAM VDDS  nvSRAM VHVS
//   NORMAL     on        off          off         on           off
//   RETENTION  off       0.4 V        off         0.4 V        off
//   STORE      off       on           on          on           on
//   RESTORE    off       on           on          on           on
//   OFF        off       off          off         off          off
// Reset enters NORMAL (the flow's start); the state encoding is this
// design's choice.
`timescale 1ns / 1ps
module nvc_mode_fsm
  import nvp_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        sleep,
  input  logic        wakeup,
  input  logic        backup,       // forecast: 1 store, 0 retention
  input  logic        timeout,
  input  logic        store_done,
  input  logic        restore_done,
  output nvc_mode_t   mode,
  output logic        start_store,
  output logic        start_restore,
  output pwr_status_t pwr
);

  nvc_mode_t nxt;

  always_comb begin
    nxt           = mode;
    start_store   = 1'b0;
    start_restore = 1'b0;
    case (mode)
      MODE_NORMAL:
        if (sleep) begin
          nxt         = backup ? MODE_STORE : MODE_RETENTION;
          start_store = backup;
        end
      MODE_RETENTION:
        if (timeout) begin
          nxt         = MODE_STORE;
          start_store = 1'b1;
        end else if (wakeup) begin
          nxt = MODE_NORMAL;
        end
      MODE_STORE:   if (store_done) nxt = MODE_OFF;
      MODE_OFF:
        if (wakeup) begin
          nxt           = MODE_RESTORE;
          start_restore = 1'b1;
        end
      MODE_RESTORE: if (restore_done) nxt = MODE_NORMAL;
      default:      nxt = MODE_NORMAL;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) mode <= MODE_NORMAL;
    else        mode <= nxt;
  end

  always_comb begin
    case (mode)
      MODE_NORMAL:    pwr = '{cpu_core: SUP_ON,  reten_latch: SUP_OFF, nvff_slave: SUP_OFF,
                              nvsram_vdds: SUP_ON,  nvsram_vhvs: SUP_OFF};
      MODE_RETENTION: pwr = '{cpu_core: SUP_OFF, reten_latch: SUP_0V4, nvff_slave: SUP_OFF,
                              nvsram_vdds: SUP_0V4, nvsram_vhvs: SUP_OFF};
      MODE_STORE,
      MODE_RESTORE:   pwr = '{cpu_core: SUP_OFF, reten_latch: SUP_ON,  nvff_slave: SUP_ON,
                              nvsram_vdds: SUP_ON,  nvsram_vhvs: SUP_ON};
      default:        pwr = '{cpu_core: SUP_OFF, reten_latch: SUP_OFF, nvff_slave: SUP_OFF,
                              nvsram_vdds: SUP_OFF, nvsram_vhvs: SUP_OFF};
    endcase
  end

  // The flow never skips from RETENTION or OFF straight into a store/restore
  // without the matching start pulse.
  assert property (@(posedge clk) disable iff (!rst_n)
    (nxt == MODE_STORE && mode != MODE_STORE) |-> start_store);
  assert property (@(posedge clk) disable iff (!rst_n)
    (nxt == MODE_RESTORE && mode != MODE_RESTORE) |-> start_restore);

endmodule
