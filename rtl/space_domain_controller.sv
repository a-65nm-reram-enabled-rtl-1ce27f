// space_domain_controller: walks the configured part of the nvSRAM during
// a store or a restore, generating the row address ADDR<11:4>.
//
// An 8-bit counter supplies ADDR<11:4>. A decoder turns the 2-bit Restore
// mode into the counter step: +1 for 1WL (01), +4 for 4WL (10), +16 for
// 16WL (11); a store always steps +1, one 16-byte row at a time. A
// comparator checks the counter against the nvsize configuration register
// (nvsize_last = index of the last 16-byte row in use: 0 for 16 B, 15 for
// 256 B, 63 for 1 KB, 255 for 4 KB); nvsram_en = 0 selects the 0 B size, for
// which there is nothing to walk. Ctrl clears the counter on start and stops
// it when the step just issued reached the last row.
//   Restore: one group of 1/4/16 rows per cycle, nv_restore = mode code.
//   Store:   nv_store held high; the counter advances on each row_done pulse
//            from the nvSRAM.
// done is high from the cycle after the last group until the next start.
// Counter, steps, decoder and comparator are the document's. The ">="
// comparison (so a size smaller than one restore group ends after one
// step) and the separate 0 B enable are this design's reading.
`timescale 1ns / 1ps
module space_domain_controller
  import nvp_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start_store,
  input  logic         start_restore,
  input  restore_par_t restore_mode,   // configured restore parallelism
  input  logic         nvsram_en,      // 0: nvSRAM size 0 B
  input  logic [7:0]   nvsize_last,    // nvsize conf reg
  input  logic         row_done,       // from nvSRAM: row store finished
  output logic [7:0]   addr_row,       // ADDR<11:4>
  output logic         nv_store,
  output restore_par_t nv_restore,
  output logic         active,
  output logic         done
);

  logic         storing, restoring;
  logic [7:0]   cnt;
  restore_par_t rmode;
  logic [8:0]   step, group_end;
  logic         last;

  always_comb begin
    step      = storing ? 9'd1 : 9'(wl_per_step(rmode));
    group_end = {1'b0, cnt} + step - 9'd1;
    last      = (group_end >= {1'b0, nvsize_last});
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      storing   <= 1'b0;
      restoring <= 1'b0;
      cnt       <= '0;
      rmode     <= RST_1WL;
      done      <= 1'b0;
    end else if (start_store || start_restore) begin
      cnt       <= '0;
      rmode     <= (restore_mode == RST_NONE) ? RST_1WL : restore_mode;
      storing   <= start_store && nvsram_en;
      restoring <= start_restore && nvsram_en;
      done      <= !nvsram_en;
    end else if (restoring) begin
      cnt <= cnt + step[7:0];
      if (last) begin
        restoring <= 1'b0;
        done      <= 1'b1;
      end
    end else if (storing && row_done) begin
      cnt <= cnt + 8'd1;
      if (last) begin
        storing <= 1'b0;
        done    <= 1'b1;
      end
    end
  end

  assign addr_row   = cnt;
  assign nv_store   = storing;
  assign nv_restore = restoring ? rmode : RST_NONE;
  assign active     = storing || restoring;

  // The restore groups must stay aligned to their size.
  assert property (@(posedge clk) disable iff (!rst_n)
    restoring |-> ((cnt & (step[7:0] - 8'd1)) == 8'd0));

endmodule
