// nvff_bank: the processor's bank of adaptive nonvolatile flip-flops.
//
// NBITS nvff_cell instances hold the core's state (1422 bits by default).
// The flip-flop clock is gated by clk_en (modelled as a clock enable), which the wave
// generator drops outside NORMAL mode (clock gating in RETENTION). All cells
// share the store/restore controls. The cells form one scan chain for test
// access: with scan_en high each clock shifts scan_in into bit 0 and bit i
// into bit i+1; scan_out is bit NBITS-1. busy is the OR of the cells'
// self-write-termination flags, so the store phase can end as soon as
// every cell has terminated. The width, scan chain and shared controls
// follow the document; modelling the clock gate as an enable and deriving
// each cell's program-time spread from its index are this design's choices.
`timescale 1ns / 1ps
module nvff_bank
  import nvp_pkg::*;
#(
  parameter int unsigned NBITS         = 1422,
  parameter int unsigned SW_MAX_CYCLES = 8
) (
  input  logic             clk,
  input  logic             clk_en,
  input  logic             pwr_on,
  input  logic [NBITS-1:0] d,
  output logic [NBITS-1:0] q,
  input  logic             scan_en,
  input  logic             scan_in,
  output logic             scan_out,
  input  nvff_ctrl_t       ctrl,
  output logic             busy
);

  logic [NBITS-1:0] cell_busy;
  logic [NBITS-1:0] sin;

  assign sin = {q[NBITS-2:0], scan_in};

  for (genvar i = 0; i < NBITS; i++) begin : g_cell
    nvff_cell #(.SEED(i), .SW_MAX_CYCLES(SW_MAX_CYCLES)) u_cell (
      .clk, .ff_en(clk_en), .pwr_on, .d(d[i]), .sin(sin[i]), .scan_en,
      .ctrl, .q(q[i]), .busy(cell_busy[i])
    );
  end

  assign busy     = |cell_busy;
  assign scan_out = q[NBITS-1];

endmodule
