// tb_delay_line: self-checking test of the sync delay line. A sync square wave is
// applied; for several shift periods and tap settings the delay of the output's
// rising edges behind the input's is measured in clocks and compared with
// (sync_delay + 1) shift periods, allowing for one period of strobe alignment.
`timescale 1ns/1ps
`include "tb_macros.svh"
module tb_delay_line;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, sync_in = 0, sync_out;
  logic [15:0] div;
  logic [5:0]  sel;
  longint cyc = 0, t_in, t_out;

  delay_line #(.TAPS(64)) dut (.clk, .rst, .clk_divide(div), .sync_delay(sel), .sync_in, .sync_out);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;
  initial begin #5000000; failures++; $display("FAIL watchdog"); `TB_FINISH end

  task automatic one(int d, int s);
    longint lo, hi, dly;
    div = 16'(d); sel = 6'(s);
    sync_in = 0;
    repeat ((s + 2) * d + 10) @(negedge clk);
    @(negedge clk) sync_in = 1; t_in = cyc;
    t_out = -1;
    for (int i = 0; i < (s + 3) * d + 10; i++) begin
      @(posedge clk); #1;
      if (sync_out && t_out < 0) t_out = cyc;
    end
    dly = t_out - t_in;
    lo = longint'(s + 1) * d - d + 1;
    hi = longint'(s + 1) * d + 1;
    `TB_CHECK(t_out >= 0 && dly >= lo && dly <= hi,
              $sformatf("div=%0d sel=%0d delay %0d not in [%0d,%0d]", d, s, dly, lo, hi))
    repeat ((s + 3) * d + 10) @(negedge clk);
    `TB_CHECK(sync_out == 1'b1, "level passes through")
    sync_in = 0;
  endtask

  initial begin
    div = 1; sel = 0;
    repeat (3) @(negedge clk); rst = 0;
    one(1, 0); one(1, 5); one(1, 63); one(7, 0); one(7, 12); one(20, 3); one(3, 40);
    `TB_FINISH
  end
endmodule
