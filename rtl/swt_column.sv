// swt_column: self-write-termination (SWT) for one nvSRAM column.
//
// During a row store both bit lines are precharged high, which arms the
// column. When the word line opens, the bit line on the side of the cell
// that holds 0 falls; while exactly one bit line is low the column's write
// driver is enabled (BL low: the cell stores 0 and its ReRAM is SET to LRS;
// BLB low: the cell stores 1 and its ReRAM is RESET to HRS). When the ReRAM
// has switched, the stored current flips the latch, the other bit line
// falls too, and with both low the column disarms and the driver stops.
// A cell whose ReRAM already holds the right state flips at once, so it
// draws driver current for only one cycle.
//
// The arm/disarm rule and the driver condition are the document's; here the
// bit lines are sampled on the clock (a synchronous model of the analog
// latch), which is this design's choice.
//
// Timing: busy rises the cycle after the precharge is seen and falls the
// cycle after both bit lines are seen low. driver_en is combinational.
`timescale 1ns / 1ps
module swt_column (
  input  logic clk,
  input  logic rst_n,
  input  logic store,      // Store: row store in progress
  input  logic bl,         // bit line (high = precharged)
  input  logic blb,        // complementary bit line
  output logic driver_en,  // write driver of this column on
  output logic set_op,     // 1: SET toward LRS (BL side low), 0: RESET toward HRS
  output logic busy        // armed and not yet terminated
);

  logic armed;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)               armed <= 1'b0;
    else if (bl && blb)       armed <= 1'b1;   // start: both precharged
    else if (!bl && !blb)     armed <= 1'b0;   // end: both discharged
  end

  assign driver_en = store && armed && (bl ^ blb);
  assign set_op    = !bl;
  assign busy      = armed;

endmodule
