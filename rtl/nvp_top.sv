// nvp_top: ReRAM-based nonvolatile processor, without its CPU core.
//
// The processor keeps running through power interruptions. Its state lives
// in nonvolatile flip-flops (nvFFs, 1422 bits) and in a 4 KB nvSRAM that is
// at once the working data memory and the ReRAM backup, and its program in
// an 8 KB code ReRAM. The adaptive NV controller chooses, for each
// interruption, between keeping the state at a lowered supply (retention)
// and storing it into ReRAM and powering off, and it restores only the
// configured part of the nvSRAM, 1, 4 or 16 rows per cycle.
//
// The 8051-class core, the bus and the timer/UART/GPIO peripherals are not
// part of this RTL: the core's register state enters and leaves through
// core_nvff_d / core_nvff_q, its data-memory accesses through the core_*
// SRAM pins and its instruction fetch through the code_* pins. The
// configuration registers of the controller (time_conf, nvsize, restore
// mode, force store/restore, predictor enable) are inputs here because the
// bus that would write them is outside. Power switches are outside too: pwr
// reports which domain the controller wants on, at 0.4 V or off, and the
// same status drives the models' volatile contents.
//
// Timing: one clock (clk, 100 MHz in the document) for everything but the
// retention-time counter, which runs on the internal local clock. sleep and
// wakeup are sampled on clk; they are single-cycle requests.
`timescale 1ns / 1ps
module nvp_top
  import nvp_pkg::*;
#(
  parameter int unsigned NVFF_BITS        = 1422,
  parameter int unsigned CODE_BYTES       = 8192,
  parameter int unsigned T_RESET_MAX      = 64,
  parameter int unsigned T_SET_MAX        = 64,
  parameter int unsigned NVFF_SW_MAX      = 32,
  parameter int unsigned STORE_MAX_CYCLES = 400,
  parameter int unsigned NVSRAM_SW_MAX    = 255,
  parameter int unsigned LCLK_HALF_NS     = 50
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  sleep,
  input  logic                  wakeup,
  // controller configuration
  input  logic [7:0]            time_conf,
  input  logic                  pred_enable,
  input  logic                  force_store,
  input  logic                  force_restore,
  input  restore_par_t          restore_mode,
  input  logic                  nvsram_en,
  input  logic [7:0]            nvsize_last,
  // core state held in nvFFs
  input  logic [NVFF_BITS-1:0]  core_nvff_d,
  output logic [NVFF_BITS-1:0]  core_nvff_q,
  input  logic                  scan_en,
  input  logic                  scan_in,
  output logic                  scan_out,
  // core data-memory port (nvSRAM in SRAM mode)
  input  logic                  core_ceb,
  input  logic                  core_web,
  input  logic [11:0]           core_addr,
  input  logic [7:0]            core_din,
  output logic [7:0]            core_dout,
  // core instruction port (code ReRAM)
  input  logic                  code_ren,
  input  logic [$clog2(CODE_BYTES)-1:0] code_addr,
  output logic [7:0]            code_rdata,
  input  logic                  code_wen,
  input  logic [7:0]            code_wdata,
  output logic                  code_busy,
  // status
  output nvc_mode_t             mode,
  output pwr_status_t           pwr,
  output logic                  backup,
  output logic                  timeout,
  output logic                  nvff_busy,
  output logic                  nvsram_swt_busy,
  output logic [31:0]           nvsram_switch_count,
  output logic [31:0]           nvsram_drive_cycles
);

  logic         lclk, osc_en;
  nvff_ctrl_t   nvff_ctrl;
  logic         nvff_clk_en;
  logic         nv_own, nv_ceb, nv_web, nv_store, nv_row_done;
  logic [11:0]  nv_addr;
  restore_par_t nv_restore;
  logic [1:0]   history;
  logic         core_ok;

  local_clock #(.HALF_PERIOD_NS(LCLK_HALF_NS)) u_lclk (.en(osc_en), .lclk);

  adaptive_nv_controller #(.T_RESET_MAX(T_RESET_MAX), .T_SET_MAX(T_SET_MAX)) u_nvc (
    .clk, .rst_n, .lclk, .osc_en, .sleep, .wakeup,
    .time_conf, .pred_enable, .force_store, .force_restore,
    .restore_mode, .nvsram_en, .nvsize_last,
    .nvff_ctrl, .nvff_clk_en, .nvff_busy,
    .nv_own, .nv_ceb, .nv_web, .nv_addr, .nv_store, .nv_restore,
    .nv_row_done, .mode, .pwr, .backup, .timeout, .history
  );

  nvff_bank #(.NBITS(NVFF_BITS), .SW_MAX_CYCLES(NVFF_SW_MAX)) u_nvff (
    .clk, .clk_en(nvff_clk_en),
    .pwr_on(pwr.cpu_core != SUP_OFF || pwr.reten_latch != SUP_OFF),
    .d(core_nvff_d), .q(core_nvff_q), .scan_en, .scan_in, .scan_out,
    .ctrl(nvff_ctrl), .busy(nvff_busy)
  );

  // the core reaches the nvSRAM only while it is powered
  assign core_ok = (mode == MODE_NORMAL);

  nvsram #(.STORE_MAX_CYCLES(STORE_MAX_CYCLES), .SW_MAX_CYCLES(NVSRAM_SW_MAX)) u_nvsram (
    .clk, .rst_n,
    .vdds_on(pwr.nvsram_vdds != SUP_OFF),
    .ceb    (nv_own ? nv_ceb  : (core_ceb || !core_ok)),
    .web    (nv_own ? nv_web  : core_web),
    .addr   (nv_own ? nv_addr : core_addr),
    .din    (core_din),
    .dout   (core_dout),
    .store  (nv_own && nv_store),
    .restore(nv_own ? nv_restore : RST_NONE),
    .row_done(nv_row_done),
    .swt_busy(nvsram_swt_busy),
    .switch_count(nvsram_switch_count),
    .drive_cycles(nvsram_drive_cycles)
  );

  code_reram #(.BYTES(CODE_BYTES)) u_code (
    .clk, .ren(code_ren), .addr(code_addr), .rdata(code_rdata),
    .wen(code_wen), .wdata(code_wdata), .busy(code_busy)
  );

endmodule
