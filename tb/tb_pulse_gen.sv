// tb_pulse_gen: self-checking test of the sample strobe generator. With a fixed
// divide value the strobes must come every `clk_divide` clocks; a sync edge must
// restart the sequence with a strobe one clock after the edge; no strobes while
// disabled; and no more than 2^spp_log2 strobes between two sync edges.
`timescale 1ns/1ps
`include "tb_macros.svh"
module tb_pulse_gen;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, en = 0, rise = 0, stb;
  logic [23:0] div = 24'd10;
  logic [3:0] spp = 4'd4;
  longint cyc = 0, last = -1;
  int n = 0, bad = 0;

  pulse_gen #(.CNT_W(24)) dut (.clk, .rst, .enable(en), .sync_rise(rise), .spp_log2(spp),
    .clk_divide(div), .sample_strobe(stb));

  always #5 clk = ~clk;
  initial begin #2000000; failures++; $display("FAIL watchdog"); `TB_FINISH end

  initial begin
    repeat (3) @(negedge clk); rst = 0;
    repeat (50) begin @(posedge clk); #1; `TB_CHECK(!stb, "no strobe while disabled") end
    en = 1;
    @(negedge clk) rise = 1; @(negedge clk) rise = 0;
    #1 `TB_CHECK(stb, "strobe one clock after the sync edge")
    for (int k = 1; k <= 6; k++) begin
      repeat (9) begin @(posedge clk); #1; `TB_CHECK(!stb, "no strobe between") end
      @(posedge clk); #1; `TB_CHECK(stb, $sformatf("strobe %0d after 10 clocks", k))
    end
    // restart in the middle of a period
    repeat (4) @(negedge clk);
    rise = 1; @(negedge clk) rise = 0;
    #1 `TB_CHECK(stb, "restart strobes")
    div = 24'd3;
    repeat (9) @(posedge clk);   // first period still uses the old divide
    for (int k = 0; k < 4; k++) begin
      repeat (2) begin @(posedge clk); #1; `TB_CHECK(!stb, "no strobe between (div 3)") end
      @(posedge clk); #1; `TB_CHECK(stb, "strobe every 3 clocks")
    end
    // sample limit: 4 strobes per sync period, then silence until the next edge
    spp = 4'd2;
    for (int p = 0; p < 2; p++) begin
      @(negedge clk) rise = 1; @(negedge clk) rise = 0;
      n = 0;
      repeat (100) begin #1 if (stb) n++; @(negedge clk); end
      `TB_CHECK(n == 4, $sformatf("%0d strobes in a sync period, expected 4", n))
    end
    `TB_FINISH
  end
endmodule
