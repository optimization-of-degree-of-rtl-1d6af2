// tb_adc_controller: self-checking test of the ADC controller against a behavioural
// serial ADC. Checks the sampling period (adc_clk_divide clocks), the convert
// pulse width, that every converted value arrives intact and in order on the system
// side, the re-alignment of conversions to a sync edge, and the busy error.
`timescale 1ns/1ps
`include "tb_macros.svh"
module tb_adc_controller;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, sync = 0, align = 0;
  logic [15:0] div = 16'd100, pw = 16'd5;
  logic sc, busyb, sclk, sdata, rdy, err;
  logic signed [15:0] sout;
  logic [15:0] value;
  int convs;
  longint cyc = 0;
  logic [15:0] sent [$];

  adc_controller dut (.clk, .rst, .adc_clk_divide(div), .pulse_width(pw), .sync, .sync_align(align),
    .start_convert(sc), .busyb, .sclk, .sdata, .sample_out(sout), .sample_rdy(rdy), .error(err));

  ad977a_model adc (.start_convert(sc), .value, .busyb, .sclk, .sdata, .convs);

  always #10 clk = ~clk;   // 50 MHz
  always @(posedge clk) cyc++;
  // the first conversion after reset only aligns the bit counter and is not delivered
  int nconv = 0;
  always @(posedge sc) if (!rst) begin value = 16'($urandom); if (nconv++ > 0) sent.push_back(value); end
  initial begin #10000000; failures++; $display("FAIL watchdog"); `TB_FINISH end

  // convert pulse width and period
  longint last_rise = -1, rise_t;
  int periods_ok = 0, periods_bad = 0, widths_bad = 0, width;
  always @(posedge clk) begin
    if (!rst) begin
      if (sc && width >= 0) width++;
      if (sc && !$past(sc)) begin
        rise_t = cyc;
        if (last_rise >= 0 && !align) begin
          if (rise_t - last_rise == longint'(div)) periods_ok++; else periods_bad++;
        end
        last_rise = rise_t;
        width = 1;
      end
      if (!sc && $past(sc)) begin
        if (width != int'(pw)) widths_bad++;
      end
    end
  end

  int got = 0, bad = 0;
  always @(posedge clk) if (!rst && rdy && div == 16'd100) begin
    logic [15:0] e;
    e = sent.pop_front();
    if (sout != e) begin bad++; $display("FAIL sample %h exp %h", sout, e); end
    got++;
  end

  initial begin
    value = 0; width = -1;
    repeat (4) @(negedge clk); rst = 0;
    repeat (100 * 30) @(negedge clk);
    `TB_CHECK(got >= 28, $sformatf("samples received %0d", got))
    `TB_CHECK(bad == 0, "samples intact and in order")
    `TB_CHECK(periods_ok >= 28 && periods_bad == 0, $sformatf("sampling period ok=%0d bad=%0d", periods_ok, periods_bad))
    `TB_CHECK(widths_bad == 0, "convert pulse width")
    `TB_CHECK(!err, "no busy error at 100 clocks per sample")
    `TB_CHECK(got == convs || got == convs - 1, "one sample per conversion")
    // sync re-alignment: the rate counter restarts at the sync edge, so the next
    // conversion starts one sampling period (plus register delays) after it
    align = 1;
    repeat (37) @(negedge clk);
    sync = 1; last_rise = cyc;
    @(posedge sc); #1;
    `TB_CHECK(cyc - last_rise >= longint'(div) && cyc - last_rise <= longint'(div) + 3,
              $sformatf("conversion re-aligned to sync, %0d clocks", cyc - last_rise))
    sync = 0;
    align = 0;
    // too fast: the ADC is still busy at the next request
    repeat (300) @(negedge clk);
    div = 16'd20; pw = 16'd2; last_rise = -1;
    repeat (400) @(negedge clk);
    `TB_CHECK(err, "busy error when converting faster than the ADC")
    `TB_FINISH
  end
endmodule
