// nvsram: adaptive nonvolatile SRAM macro (4 KB of 7T1R cells by default).
//
// One macro serves both as the working SRAM and as the nonvolatile backup,
// so normal reads and writes run at SRAM speed and a restore copies ReRAM
// into the latches in place, with no transfer over a bus. Pins follow the
// document: CLK, CEB, WEB, a 12-bit ADDR (ADDR<11:4> row, ADDR<3:0> byte),
// 8-bit Din/Dout, Store and Restore<1:0>.
//   SRAM mode:  one byte read or written per cycle; Dout is valid the cycle
//               after a read.
//   STORE:      the row at ADDR<11:4> is written to ReRAM with per-column
//               self-write-termination; row_done pulses when it has ended.
//   RESTORE:    Restore<1:0> = 01, 10, 11 restores 1, 4 or 16 rows (the
//               16-byte rows of ADDR<11:4>, ADDR<11:6> or ADDR<11:8>) in
//               one cycle.
// Built from nvsram_timing (operation decode and store sequencing),
// adaptive_parallel_controller (pre-decoders, main decoder, parallel
// restore), one swt_column per bit column and the behavioural cell array.
// vdds_on is the array supply; data in the latches is lost when it is off.
// swt_busy, switch_count and drive_cycles are observation outputs.
`timescale 1ns / 1ps
module nvsram
  import nvp_pkg::*;
#(
  parameter int unsigned STORE_MAX_CYCLES = 400,
  parameter int unsigned SW_MAX_CYCLES    = 255
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         vdds_on,
  input  logic         ceb,
  input  logic         web,
  input  logic [11:0]  addr,
  input  logic [7:0]   din,
  output logic [7:0]   dout,
  input  logic         store,
  input  restore_par_t restore,
  output logic         row_done,
  output logic         swt_busy,
  output logic [31:0]  switch_count,
  output logic [31:0]  drive_cycles
);

  localparam int unsigned COLS = 128;

  logic op_read, op_write, op_restore, op_precharge, op_store_wl, dec_en;
  logic [15:0]     xa;
  logic [3:0]      xb, xc;
  logic [255:0]    wl;
  logic [COLS-1:0] bl, blb, driver_en, col_busy, set_op;

  nvsram_timing #(.STORE_MAX_CYCLES(STORE_MAX_CYCLES)) u_timing (
    .clk, .rst_n, .ceb, .web, .store, .restore, .swt_busy,
    .op_read, .op_write, .op_restore, .op_precharge, .op_store_wl,
    .dec_en, .row_done
  );

  adaptive_parallel_controller u_apc (
    .en(dec_en), .addr_row(addr[11:4]),
    .restore(op_restore ? restore : RST_NONE),
    .xa, .xb, .xc, .wl
  );

  for (genvar c = 0; c < COLS; c++) begin : g_swt
    swt_column u_swt (
      .clk, .rst_n, .store(op_store_wl), .bl(bl[c]), .blb(blb[c]),
      .driver_en(driver_en[c]), .set_op(set_op[c]), .busy(col_busy[c])
    );
  end

  assign swt_busy = |col_busy;

  nvsram_cell_array #(.ROWS(256), .COLS(COLS), .SW_MAX_CYCLES(SW_MAX_CYCLES)) u_array (
    .clk, .vdds_on, .wl, .col(addr[3:0]),
    .op_read, .op_write, .op_restore, .op_precharge, .op_store_wl,
    .din, .dout, .driver_en, .bl, .blb, .switch_count, .drive_cycles
  );

endmodule
