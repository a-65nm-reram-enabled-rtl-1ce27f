// adaptive_nv_controller: the adaptive nonvolatile controller (NVC).
//
// It decides, for each power interruption, whether to keep the state at a
// lowered supply (RETENTION) or to back it up into ReRAM and power off
// (STORE, then OFF), and it runs the store and restore of both the nvFFs
// and the nvSRAM. Blocks:
//   time_domain_controller   retention/store forecast and retention timeout
//   local_clock              (outside, in the top) clocks the timeout counter
//   nvc_mode_fsm             NORMAL/RETENTION/STORE/OFF/RESTORE flow and
//                            power-domain status
//   wave_generator           nvFF store/restore waveforms, clock gating
//   space_domain_controller  nvSRAM row address walk over the configured size
// A store is finished when both the nvFF sequence and the nvSRAM walk are
// done; likewise a restore. During a store or restore the controller owns
// the nvSRAM pins (nv_ceb/nv_web/nv_addr/nv_store/nv_restore); nv_own tells
// the top to select them instead of the core's.
// Restore timing at the default settings: RESTORE lasts max(2, G+1) cycles,
// where G is the number of 1/4/16-row groups of the configured size (2
// cycles = 20 ns at 100 MHz for the nvFFs or a 16 B nvSRAM, 17 cycles =
// 170 ns for 4 KB restored 16 rows at a time).
`timescale 1ns / 1ps
module adaptive_nv_controller
  import nvp_pkg::*;
#(
  parameter int unsigned T_RESET_MAX = 64,
  parameter int unsigned T_SET_MAX   = 64
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         lclk,
  output logic         osc_en,
  input  logic         sleep,
  input  logic         wakeup,
  // configuration registers
  input  logic [7:0]   time_conf,
  input  logic         pred_enable,
  input  logic         force_store,
  input  logic         force_restore,
  input  restore_par_t restore_mode,
  input  logic         nvsram_en,
  input  logic [7:0]   nvsize_last,
  // nvFF side
  output nvff_ctrl_t   nvff_ctrl,
  output logic         nvff_clk_en,
  input  logic         nvff_busy,
  // nvSRAM side
  output logic         nv_own,
  output logic         nv_ceb,
  output logic         nv_web,
  output logic [11:0]  nv_addr,
  output logic         nv_store,
  output restore_par_t nv_restore,
  input  logic         nv_row_done,
  // status
  output nvc_mode_t    mode,
  output pwr_status_t  pwr,
  output logic         backup,
  output logic         timeout,
  output logic [1:0]   history
);

  logic       start_store, start_restore;
  logic       wg_done, sdc_done, sdc_active;
  logic [7:0] addr_row;
  logic [7:0] count;
  logic [15:0] store_cycles;

  time_domain_controller u_tdc (
    .clk, .rst_n, .lclk, .enable(pred_enable), .sleep(sleep && mode == MODE_NORMAL),
    .wakeup(wakeup && (mode == MODE_RETENTION || mode == MODE_OFF)),
    .time_conf, .force_store, .force_restore,
    .osc_en, .backup, .timeout, .history, .count
  );

  nvc_mode_fsm u_fsm (
    .clk, .rst_n, .sleep, .wakeup, .backup, .timeout,
    .store_done(wg_done && sdc_done), .restore_done(wg_done && sdc_done),
    .mode, .start_store, .start_restore, .pwr
  );

  wave_generator #(.T_RESET_MAX(T_RESET_MAX), .T_SET_MAX(T_SET_MAX)) u_wg (
    .clk, .rst_n, .mode, .start_store, .start_restore, .nvff_busy,
    .ctrl(nvff_ctrl), .clk_en(nvff_clk_en), .done(wg_done), .store_cycles
  );

  space_domain_controller u_sdc (
    .clk, .rst_n, .start_store, .start_restore, .restore_mode, .nvsram_en,
    .nvsize_last, .row_done(nv_row_done), .addr_row, .nv_store, .nv_restore,
    .active(sdc_active), .done(sdc_done)
  );

  assign nv_own  = sdc_active;
  assign nv_ceb  = !sdc_active;
  assign nv_web  = 1'b1;
  assign nv_addr = {addr_row, 4'h0};

endmodule
