// time_domain_controller: decides between retention and store for each
// power interruption and times how long the interruption lasts.
//
// Store/restore forecast (a 2-bit predictor): two history flip-flops BK1
// and BK2 hold whether each of the last two interruptions was long. At
// each wakeup (when enable is high) the Forecast Judge result, "the
// retention-time counter reached 255", is shifted into BK1 and BK1 into
// BK2. The forecast backup = 1 (store, go to OFF) when both of the last two
// interruptions were long, backup = 0 (retention) otherwise. force_store and
// force_restore override it (force_restore wins when both are set).
// Retention time controller: on sleep, Ctrl clears the counter and starts
// the local clock; the 8-bit counter, counting lclk periods,
// saturates at 255. TimeOut is high while the count is at or above a threshold
// chosen by a multiplexer on the history {BK2,BK1}: 255 when neither of
// the last two interruptions was long, the time configuration register
// otherwise. On wakeup Ctrl stops the local clock; the count is cleared at
// the next sleep.
// The counter itself runs in the clk domain of the controller: each rising
// edge of lclk, passed through a two-flip-flop synchronizer, is one count.
// This needs clk to run at least about three times faster than lclk.
//
// The history flip-flops, the 255 constant, the threshold mux inputs,
// force store/restore, the 8-bit counter and the local clock are the
// document's; the exact combination of history bits and overrides, and
// counting local-clock edges in the clk domain instead of clocking the
// counter by lclk, are this design's reading.
`timescale 1ns / 1ps
module time_domain_controller (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       lclk,          // local clock
  input  logic       enable,        // predictor update enable
  input  logic       sleep,
  input  logic       wakeup,
  input  logic [7:0] time_conf,     // time conf reg
  input  logic       force_store,
  input  logic       force_restore,
  output logic       osc_en,        // local clock enable
  output logic       backup,        // forecast: 1 store, 0 retention
  output logic       timeout,       // TimeOut
  output logic [1:0] history,       // {BK2, BK1}
  output logic [7:0] count          // retention-time counter (lclk domain)
);

  logic       bk1, bk2;
  logic [7:0] threshold;
  logic [2:0] lclk_sync;
  logic       tick;
  logic       long_flag;

  // Ctrl: the local clock runs from sleep until wakeup
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                 osc_en <= 1'b0;
    else if (sleep && !osc_en)  osc_en <= 1'b1;
    else if (wakeup && osc_en)  osc_en <= 1'b0;
  end

  // local-clock edges, synchronized into the clk domain
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) lclk_sync <= '0;
    else        lclk_sync <= {lclk_sync[1:0], lclk};
  end
  assign tick = lclk_sync[1] && !lclk_sync[2];

  // retention-time counter: cleared (CLR) at sleep, saturates at 255
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                        count <= '0;
    else if (sleep && !osc_en)         count <= '0;
    else if (osc_en && tick && count != 8'hFF) count <= count + 8'd1;
  end

  always_comb begin
    case ({bk2, bk1})
      2'b00:   threshold = 8'd255;
      default: threshold = time_conf;
    endcase
    timeout   = osc_en && (count >= threshold);
    long_flag = (count == 8'd255);   // Forecast Judge
  end

  // forecast history: updated once per interruption, at wakeup
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bk1 <= 1'b0;
      bk2 <= 1'b0;
    end else if (enable && wakeup && osc_en) begin
      bk1 <= long_flag;
      bk2 <= bk1;
    end
  end

  assign history = {bk2, bk1};
  assign backup  = !force_restore && (force_store || (bk1 && bk2));

endmodule
