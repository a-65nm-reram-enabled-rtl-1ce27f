// tb_code_reram: programs a set of bytes into the code ReRAM model and
// checks the program time (busy for the configured number of cycles,
// writes ignored meanwhile), the erased value elsewhere, and the one-cycle
// read latency.
`timescale 1ns / 1ps
module tb_code_reram;
  localparam int BYTES = 8192, PROG = 10;
  logic clk = 0, ren = 0, wen = 0, busy;
  logic [12:0] addr = 0;
  logic [7:0] rdata, wdata = 0;
  int checks = 0, failures = 0;
  logic [7:0] ref_mem [int];

  code_reram #(.BYTES(BYTES), .PROG_CYCLES(PROG)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    @(posedge clk); #1;
    for (int k = 0; k < 40; k++) begin
      int a, n;
      a = $urandom % BYTES;
      ref_mem[a] = 8'($urandom);
      wen = 1; addr = 13'(a); wdata = ref_mem[a];
      @(posedge clk); #1;
      wen = 1; addr = 13'(a ^ 1); wdata = ~ref_mem[a];   // ignored while busy
      n = 0;
      while (busy) begin @(posedge clk); #1; n++; wen = 0; end
      chk(n == PROG, $sformatf("program time %0d", n));
      wen = 0;
    end
    foreach (ref_mem[a]) begin
      ren = 1; addr = 13'(a); @(posedge clk); #1; ren = 0;
      chk(rdata == ref_mem[a], "read programmed byte");
    end
    for (int k = 0; k < 50; k++) begin
      int a = $urandom % BYTES;
      if (!ref_mem.exists(a) && !ref_mem.exists(a ^ 1)) begin
        ren = 1; addr = 13'(a); @(posedge clk); #1; ren = 0;
        chk(rdata == 8'hFF, "erased byte");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
