// code_reram: behavioural model of the code (instruction) ReRAM macro.
//
// This is a behavioural model, not synthesizable logic: it stands for a
// ReRAM macro of BYTES bytes (8 KB by default) from which the core fetches
// its program. Reads are synchronous: rdata is valid the cycle after addr is
// presented with ren high. Programming is slow, as ReRAM writes are: a
// write with wen high starts a program operation of PROG_CYCLES cycles
// during which busy is high and further writes are ignored; the byte takes
// its new value at the end. The contents are nonvolatile: they survive any
// power state, so the macro has no power input. Only the size and the role
// come from the document; the port list and the program time are this
// model's choice.
`timescale 1ns / 1ps
module code_reram #(
  parameter int unsigned BYTES       = 8192,
  parameter int unsigned PROG_CYCLES = 10,
  localparam int unsigned AW         = $clog2(BYTES)
) (
  input  logic          clk,
  input  logic          ren,
  input  logic [AW-1:0] addr,
  output logic [7:0]    rdata,
  input  logic          wen,
  input  logic [7:0]    wdata,
  output logic          busy
);

  logic [7:0]    mem [BYTES];
  logic [AW-1:0] p_addr;
  logic [7:0]    p_data;
  int unsigned   p_cnt;

  initial begin
    for (int i = 0; i < BYTES; i++) mem[i] = 8'hFF;   // erased cells read 1
    p_cnt = 0;
    busy  = 1'b0;
    rdata = '0;
  end

  always @(posedge clk) begin
    if (ren) rdata <= mem[addr];
    if (busy) begin
      if (p_cnt == PROG_CYCLES - 1) begin
        mem[p_addr] <= p_data;
        busy        <= 1'b0;
      end
      p_cnt <= p_cnt + 1;
    end else if (wen) begin
      p_addr <= addr;
      p_data <= wdata;
      p_cnt  <= 0;
      busy   <= 1'b1;
    end
  end

endmodule
