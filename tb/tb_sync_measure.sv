// tb_sync_measure: self-checking test of the sync period measurement. Sync waves of
// known period (and changing duty cycle) are applied; the captured period must
// equal the generator's period from the second edge on, and the divide value must
// be period >> spp_log2. A period change must show after one sync period.
`timescale 1ns/1ps
`include "tb_macros.svh"
module tb_sync_measure;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, sync = 0, rise, pv;
  logic [3:0] spp;
  logic [23:0] per, div;
  int rises = 0;

  sync_measure #(.CNT_W(24)) dut (.clk, .rst, .sync, .spp_log2(spp), .sync_rise(rise),
    .sync_period(per), .clk_divide(div), .period_valid(pv));

  always #5 clk = ~clk;
  always @(posedge clk) if (!rst && rise) rises++;
  initial begin #20000000; failures++; $display("FAIL watchdog"); `TB_FINISH end

  task automatic periods(int p, int hi, int n, int s);
    spp = 4'(s);
    for (int k = 0; k < n; k++) begin
      @(negedge clk) sync = 1;
      repeat (hi) @(negedge clk);
      sync = 0;
      repeat (p - hi - 1) @(negedge clk);
    end
  endtask

  initial begin
    spp = 5;
    repeat (3) @(negedge clk); rst = 0;
    `TB_CHECK(pv == 1'b0, "no period before two edges")
    periods(3200, 1600, 3, 5);
    repeat (3) @(negedge clk);
    `TB_CHECK(pv && per == 24'd3200, $sformatf("period 3200 got %0d", per))
    `TB_CHECK(div == 24'd100, $sformatf("divide 3200>>5 got %0d", div))
    periods(1000, 100, 2, 3);
    repeat (3) @(negedge clk);
    `TB_CHECK(per == 24'd1000, $sformatf("new period after one sync period, got %0d", per))
    `TB_CHECK(div == 24'd125, $sformatf("divide 1000>>3 got %0d", div))
    periods(4097, 4000, 2, 4);
    repeat (3) @(negedge clk);
    `TB_CHECK(per == 24'd4097 && div == 24'd256, $sformatf("period 4097 got %0d div %0d", per, div))
    `TB_CHECK(rises == 7, $sformatf("edge pulses %0d", rises))
    `TB_FINISH
  end
endmodule
