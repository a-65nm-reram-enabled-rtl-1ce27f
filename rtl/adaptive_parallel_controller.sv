// adaptive_parallel_controller: row pre-decoders and main decoder of the
// adaptive nvSRAM, with restore parallelism.
//
// The 8-bit row address ADDR<11:4> is split over three pre-decoders:
// ADDR<11:8> drives xa<15:0>, ADDR<7:6> drives xb<3:0> and ADDR<5:4> drives
// xc<3:0>; the main decoder opens word line r when xa[r[7:4]], xb[r[3:2]]
// and xc[r[1:0]] are all high. A 2-bit Restore code is decoded into EN4WL
// (code 10) and EN16WL (code 11). EN16WL forces every xb and xc output on,
// so 16 word lines sharing ADDR<11:8> open together; EN4WL (or EN16WL)
// forces every xc output on, so 4 word lines sharing ADDR<11:6> open.
// Code 01 (and 00) opens one word line. These splits and codes are the
// document's; the en input, which stands for the clocked enable of the
// pre-decoders, is this design's rendering of their CLK pin.
//
// Purely combinational: wl follows addr_row, restore and en in the same cycle.
`timescale 1ns / 1ps
module adaptive_parallel_controller
  import nvp_pkg::*;
(
  input  logic         en,        // decoder enable (CLK phase of the pre-decoders)
  input  logic [7:0]   addr_row,  // ADDR<11:4>
  input  restore_par_t restore,   // Restore<1:0>
  output logic [15:0]  xa,
  output logic [3:0]   xb,
  output logic [3:0]   xc,
  output logic [255:0] wl
);

  logic en4wl, en16wl;

  always_comb begin
    en4wl  = (restore == RST_4WL);
    en16wl = (restore == RST_16WL);
    xa = '0;
    xb = '0;
    xc = '0;
    if (en) begin
      xa[addr_row[7:4]] = 1'b1;
      xb = en16wl          ? 4'hF : (4'h1 << addr_row[3:2]);
      xc = (en4wl||en16wl) ? 4'hF : (4'h1 << addr_row[1:0]);
    end
  end

  always_comb begin
    for (int r = 0; r < 256; r++) begin
      wl[r] = xa[r[7:4]] && xb[r[3:2]] && xc[r[1:0]];
    end
  end

endmodule
