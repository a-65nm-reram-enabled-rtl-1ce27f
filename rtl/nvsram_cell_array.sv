// nvsram_cell_array: behavioural model of the 7T1R nvSRAM cell array.
//
// This is a behavioural model, not synthesizable logic: each cell is a 6T
// SRAM latch plus one ReRAM device, and the analog store, restore and
// power behaviour is modelled with per-cell counters and hashed switching
// times.
//
// Each of the ROWS rows holds 16 bytes (COLS = 128 bit columns); ADDR<3:0>
// selects the byte. SRAM mode reads and writes one byte of the single open
// word line, like a 6T SRAM. In a row store the precharge cycle raises both
// bit lines of every column; when the word line opens, the bit line on the
// 0 side of each cell falls (BL for Q=0, BLB for Q=1). While the column's
// write driver is on, the cell's ReRAM switches after a switching time in
// cycles (1..SW_MAX_CYCLES, spread per cell and per store, standing in for
// the wide program-time distribution); a cell whose ReRAM already holds the
// target state switches in its first driven cycle. When the ReRAM switches,
// its current overwrites the latch (Q inverts), so the other bit line falls
// as well. Q=0 is stored as LRS and Q=1 as HRS; a restore sets Q to 0 for
// LRS and 1 for HRS on every open word line (1, 4 or 16 rows at once).
// When vdds_on falls the latches lose their data (filled with a hashed
// pattern); the ReRAM keeps its state.
//
// The cell polarity, the overwrite of the latch and the restore rule are the
// document's; the cycle-level timing and the switching-time spread are this
// model's own choices. Every operation takes effect at a rising clock edge;
// dout is registered.
`timescale 1ns / 1ps
module nvsram_cell_array
  import nvp_pkg::*;
#(
  parameter int unsigned ROWS          = 256,
  parameter int unsigned COLS          = 128,
  parameter int unsigned SW_MAX_CYCLES = 255
) (
  input  logic             clk,
  input  logic             vdds_on,
  input  logic [ROWS-1:0]  wl,
  input  logic [3:0]       col,         // ADDR<3:0>: byte within the row
  input  logic             op_read,
  input  logic             op_write,
  input  logic             op_restore,
  input  logic             op_precharge,
  input  logic             op_store_wl,
  input  logic [7:0]       din,
  output logic [7:0]       dout,
  input  logic [COLS-1:0]  driver_en,
  output logic [COLS-1:0]  bl,
  output logic [COLS-1:0]  blb,
  output logic [31:0]      switch_count, // ReRAM devices actually switched
  output logic [31:0]      drive_cycles  // column-cycles with the write driver on
);

  logic [COLS-1:0] q     [ROWS];
  logic [COLS-1:0] lrs   [ROWS];   // ReRAM state per cell: 1 = LRS, 0 = HRS
  logic [COLS-1:0] bl_low, blb_low;
  logic [8:0]      timer [COLS];
  logic [15:0]     epoch;
  logic            vdds_q;

  assign bl  = ~bl_low;
  assign blb = ~blb_low;

  function automatic int first_row(input logic [ROWS-1:0] w);
    for (int r = 0; r < ROWS; r++) if (w[r]) return r;
    return -1;
  endfunction

  // Switching time of a cell for one store, 0..SW_MAX_CYCLES-1 extra cycles.
  function automatic int unsigned sw_time(int unsigned r, int unsigned c, int unsigned e);
    int unsigned h;
    h = (r * 32'd2654435761) ^ (c * 32'd40503) ^ (e * 32'd97);
    h = h ^ (h >> 13);
    h = h * 32'd1274126177;
    h = h ^ (h >> 16);
    return h % SW_MAX_CYCLES;
  endfunction

  initial begin
    for (int r = 0; r < ROWS; r++) lrs[r] = '0;   // fresh devices in HRS
    switch_count = 0;
    drive_cycles = 0;
    epoch = 0;
    bl_low = '0;
    blb_low = '0;
    vdds_q = 1'b0;
    dout = '0;
  end

  always @(posedge clk) begin
    int r;
    int unsigned nsw, ndrv;
    nsw = 0;
    ndrv = 0;
    vdds_q <= vdds_on;
    r = first_row(wl);
    if (!vdds_on) begin
      if (vdds_q)
        for (int i = 0; i < ROWS; i++) q[i] <= {(COLS/32){32'(sw_time(i, 0, 999)) * 32'h9E3779B9}};
    end else if (op_write && r >= 0) begin
      q[r][col*8 +: 8] <= din;
    end else if (op_read && r >= 0) begin
      dout <= q[r][col*8 +: 8];
    end else if (op_restore) begin
      for (int i = 0; i < ROWS; i++)
        if (wl[i]) q[i] <= ~lrs[i];   // LRS restores 0, HRS restores 1
    end else if (op_precharge) begin
      bl_low  <= '0;
      blb_low <= '0;
      epoch   <= epoch + 1'b1;
      if (r >= 0)
        for (int c = 0; c < COLS; c++) timer[c] <= 9'(sw_time(r, c, epoch));
    end else if (op_store_wl && r >= 0) begin
      for (int c = 0; c < COLS; c++) begin
        // the 0 side of the latch pulls its bit line down
        if (!q[r][c]) bl_low[c]  <= 1'b1;
        else          blb_low[c] <= 1'b1;
        if (driver_en[c]) begin
          logic tgt;
          tgt = !q[r][c];   // Q=0 is stored as LRS, Q=1 as HRS
          ndrv++;
          if (lrs[r][c] == tgt || timer[c] == 0) begin
            if (lrs[r][c] != tgt) nsw++;
            lrs[r][c]   <= tgt;
            q[r][c]     <= ~q[r][c];   // stored current overwrites the latch
            bl_low[c]   <= 1'b1;
            blb_low[c]  <= 1'b1;
          end else begin
            timer[c] <= timer[c] - 1'b1;
          end
        end
      end
    end
    switch_count <= switch_count + nsw;
    drive_cycles <= drive_cycles + ndrv;
  end

endmodule
