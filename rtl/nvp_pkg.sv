// nvp_pkg: types and constants shared by the nonvolatile-processor RTL.
//
// The five controller modes, the per-domain supply states and the restore
// parallelism codes follow the document's control flow, power-domain table
// and nvSRAM operation table. The encodings (enum values) are this design's
// own choice; only the names and the Restore<1:0> codes 01/10/11 are given.
`timescale 1ns / 1ps
package nvp_pkg;

  // Controller modes (control flow of the adaptive NV controller).
  typedef enum logic [2:0] {
    MODE_NORMAL    = 3'd0,
    MODE_RETENTION = 3'd1,
    MODE_STORE     = 3'd2,
    MODE_OFF       = 3'd3,
    MODE_RESTORE   = 3'd4
  } nvc_mode_t;

  // State of one supply rail: off, lowered to the 0.4 V retention level, or on.
  typedef enum logic [1:0] {
    SUP_OFF = 2'd0,
    SUP_0V4 = 2'd1,
    SUP_ON  = 2'd2
  } supply_t;

  // Power-domain status, one field per column of the power-domain table.
  typedef struct packed {
    supply_t cpu_core;      // CPU core
    supply_t reten_latch;   // retention latches (volatile part of the nvFFs)
    supply_t nvff_slave;    // nvFF NV slave (VDDNV / VHV)
    supply_t nvsram_vdds;   // nvSRAM array supply
    supply_t nvsram_vhvs;   // nvSRAM high-voltage (ReRAM write) supply
  } pwr_status_t;

  // Restore<1:0>: word lines restored per step.
  typedef enum logic [1:0] {
    RST_NONE = 2'b00,
    RST_1WL  = 2'b01,
    RST_4WL  = 2'b10,
    RST_16WL = 2'b11
  } restore_par_t;

  // nvFF control bundle, one bit per row of the nvFF operating table.
  typedef struct packed {
    logic store;
    logic restore;
    logic set;
    logic reset;
    logic rswl;
  } nvff_ctrl_t;

  // ReRAM resistance state.
  typedef enum logic {
    HRS = 1'b0,
    LRS = 1'b1
  } reram_state_t;

  // Word lines restored in one step for a Restore<1:0> code.
  function automatic int unsigned wl_per_step(restore_par_t r);
    case (r)
      RST_4WL:  return 4;
      RST_16WL: return 16;
      default:  return 1;
    endcase
  endfunction

endpackage
