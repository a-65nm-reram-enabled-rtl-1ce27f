// nvsram_timing: operation decoder and row-store sequencer of the nvSRAM.
//
// The pins CEB, WEB, Store and Restore<1:0> select the macro operation as in
// the document's operation table: WRITE (CEB=0, WEB=0), READ (CEB=0, WEB=1),
// STORE (CEB=0, WEB=1, Store=1) and RESTORE (CEB=0, WEB=1, Restore=01/10/11).
// CEB=1 is idle. READ, WRITE and RESTORE take one clock cycle each.
//
// A STORE writes the whole row at ADDR<11:4> to its ReRAM cells. This block
// sequences it: one precharge cycle (bit lines high, which arms every
// column's self-write-termination), then word-line cycles until no column is
// busy any more, or until STORE_MAX_CYCLES word-line cycles have passed as a
// guard. It then pulses row_done for one cycle. If Store is still high after
// row_done, the next row (the address presented then) is stored. The
// sequence and the guard length are this design's choices; the document
// gives only the termination principle.
`timescale 1ns / 1ps
module nvsram_timing
  import nvp_pkg::*;
#(
  parameter int unsigned STORE_MAX_CYCLES = 400
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         ceb,
  input  logic         web,
  input  logic         store,
  input  restore_par_t restore,
  input  logic         swt_busy,   // some column still writing
  output logic         op_read,
  output logic         op_write,
  output logic         op_restore,
  output logic         op_precharge,
  output logic         op_store_wl, // word line open for a row store
  output logic         dec_en,      // row decoder enable
  output logic         row_done     // one-cycle pulse: row store finished
);

  typedef enum logic [1:0] {S_IDLE, S_PRE, S_WL, S_DONE} st_t;
  st_t st;
  logic [$clog2(STORE_MAX_CYCLES+1)-1:0] cnt;

  logic store_cmd;
  assign store_cmd = !ceb && web && store;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st  <= S_IDLE;
      cnt <= '0;
    end else begin
      case (st)
        S_IDLE: if (store_cmd) st <= S_PRE;
        S_PRE: begin
          cnt <= '0;
          st  <= store_cmd ? S_WL : S_IDLE;
        end
        S_WL: begin
          cnt <= cnt + 1'b1;
          if ((cnt >= 1 && !swt_busy) || cnt == STORE_MAX_CYCLES[$bits(cnt)-1:0] - 1'b1)
            st <= S_DONE;
        end
        S_DONE: st <= store_cmd ? S_PRE : S_IDLE;
        default: st <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    op_read      = (st == S_IDLE) && !ceb &&  web && !store && (restore == RST_NONE);
    op_write     = (st == S_IDLE) && !ceb && !web && !store;
    op_restore   = (st == S_IDLE) && !ceb &&  web && !store && (restore != RST_NONE);
    op_precharge = (st == S_PRE)  && store_cmd;
    op_store_wl  = (st == S_WL);
    row_done     = (st == S_DONE);
    dec_en       = op_read || op_write || op_restore || op_precharge || op_store_wl;
  end

endmodule
