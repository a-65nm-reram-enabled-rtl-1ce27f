// local_clock: behavioural model of the gated ring oscillator that clocks
// the retention-time counter while the system is asleep.
//
// This is a behavioural model, not synthesizable logic: a real ring
// oscillator is a loop of inverters whose period depends on supply and
// process. Here the output toggles every HALF_PERIOD_NS while en is high
// and stays low while en is low. The gating by en follows the document's
// figure; the period is this model's choice (no value is given).
`timescale 1ns / 1ps
module local_clock #(
  parameter int unsigned HALF_PERIOD_NS = 50
) (
  input  logic en,
  output logic lclk
);

  logic ring;

  initial ring = 1'b0;

  always begin
    if (en) begin
      #(HALF_PERIOD_NS);
      ring = ~ring;
    end else begin
      ring = 1'b0;
      @(posedge en);
    end
  end

  assign lclk = ring && en;

endmodule
