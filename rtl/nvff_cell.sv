// nvff_cell: behavioural model of one adaptive nonvolatile flip-flop.
//
// This is a behavioural model, not synthesizable logic: the two ReRAM
// devices (RL, RR), their program times and the self-write-termination
// sense are modelled with a counter per device.
//
// NORMAL: a scan flip-flop; on a rising clk edge with ff_en high Q takes D,
// or SIN when SCAN_EN is high. ff_en stands for the clock gate. RETENTION:
// ff_en is low and the latch is held at a lowered supply (pwr_on stays high). STORE: the
// controller applies a RESET phase and then a SET phase (ctrl, as in the
// nvFF operating table). Q=0 is kept as RL=LRS, RR=HRS and Q=1 as RL=HRS,
// RR=LRS. In the RESET phase the device that must end in HRS is driven, in
// the SET phase the device that must end in LRS. A driven device switches
// after 1..SW_MAX_CYCLES cycles of clk (spread per cell by SEED and per
// store); self-write-termination stops the drive as soon as the device is
// in its target state, so a device that already matches is not driven at
// all. busy is high while the current phase still drives this cell.
// RESTORE (restore and RSWL high): Q becomes 0 when RL is LRS and 1 when RL
// is HRS. When pwr_on falls, the volatile Q is lost (it takes a fixed
// per-cell value, so a missing restore shows).
//
// The encoding of the value in RL/RR, the phases and the restore rule are
// the document's; cycle counts are this model's choice.
`timescale 1ns / 1ps
module nvff_cell
  import nvp_pkg::*;
#(
  parameter int unsigned SEED          = 0,
  parameter int unsigned SW_MAX_CYCLES = 8
) (
  input  logic       clk,
  input  logic       ff_en,    // flip-flop clock enable (the gated clock)
  input  logic       pwr_on,   // latch supply present (on or 0.4 V)
  input  logic       d,
  input  logic       sin,
  input  logic       scan_en,
  input  nvff_ctrl_t ctrl,
  output logic       q,        // NVQ
  output logic       busy      // self-write-termination not yet reached
);

  reram_state_t rl, rr;
  logic [7:0]   timer;
  logic [15:0]  epoch;
  logic         reset_ph, set_ph, reset_ph_q, set_ph_q;

  assign reset_ph = ctrl.store && ctrl.reset && !ctrl.set;
  assign set_ph   = ctrl.store && ctrl.set;

  function automatic logic [7:0] sw_time(int unsigned s, int unsigned e);
    int unsigned h;
    h = (s * 32'd2654435761) ^ (e * 32'd40503);
    h = h ^ (h >> 15);
    h = h * 32'd2246822519;
    h = h ^ (h >> 13);
    return 8'(h % SW_MAX_CYCLES);
  endfunction

  // device that is driven in the current phase, and its target
  logic         drive_rl;
  reram_state_t tgt;
  always_comb begin
    // RESET phase drives the HRS-side device, SET phase the LRS-side device
    if (reset_ph) begin
      drive_rl = q;        // Q=1: RL must be HRS
      tgt      = HRS;
    end else begin
      drive_rl = !q;       // Q=0: RL must be LRS
      tgt      = LRS;
    end
    busy = (reset_ph || set_ph) && ((drive_rl ? rl : rr) != tgt);
  end

  initial begin
    rl = HRS; rr = LRS; epoch = 0;
    timer = '0; reset_ph_q = 1'b0; set_ph_q = 1'b0;
  end

  // volatile part
  always @(posedge clk or negedge pwr_on) begin
    if (!pwr_on)
      q <= 1'(SEED % 2);             // supply lost: the latch forgets
    else if (ctrl.restore && ctrl.rswl)
      q <= (rl == HRS);
    else if (ff_en && !ctrl.store && !ctrl.restore)
      q <= scan_en ? sin : d;
  end

  // nonvolatile part
  always @(posedge clk) begin
    reset_ph_q <= reset_ph;
    set_ph_q   <= set_ph;
    if ((reset_ph && !reset_ph_q) || (set_ph && !set_ph_q)) begin
      // phase start: draw this store's program time
      timer <= sw_time(SEED, 32'(epoch));
      epoch <= epoch + 1'b1;
    end else if (busy) begin
      if (timer == 0) begin
        if (drive_rl) rl <= tgt;
        else          rr <= tgt;
      end else begin
        timer <= timer - 1'b1;
      end
    end
  end

endmodule
