// tb_dac_driver: self-checking test of the serial DAC driver.
//
// A receiver model shifts `dac_data` in at each rising `dac_sclk` while `dac_enb` is
// low and takes the word when `dac_enb` rises. Random samples on the selected source
// must arrive as offset binary (MSB inverted); samples on other sources and samples
// that arrive while a word is being sent must not start a word. The enable-low time
// must be 2 * 16 * SCLK_HALF clocks.
`timescale 1ns/1ps
`include "tb_macros.svh"
module tb_dac_driver;
  import dlia_pkg::*;
  localparam int NSRC = 8, HALF = 3;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  logic [2:0] sel = '0;
  sample_t src_data [NSRC];
  logic src_valid [NSRC];
  logic sclk, enb, sdata;

  dac_driver #(.NSRC(NSRC), .SCLK_HALF(HALF)) dut (.clk, .rst, .sel, .src_data, .src_valid,
    .dac_sclk(sclk), .dac_enb(enb), .dac_data(sdata));

  always #5 clk = ~clk;
  initial begin #2000000; failures++; $display("FAIL watchdog"); `TB_FINISH end

  // receiver
  logic [15:0] rx_shift = '0;
  int rx_bits = 0, words = 0, low_clks = 0, last_low = 0;
  logic [15:0] rx_word = '0;
  always @(posedge sclk) if (!enb) begin rx_shift <= {rx_shift[14:0], sdata}; rx_bits++; end
  always @(posedge enb) begin
    rx_word = rx_shift;
    words++;
    `TB_CHECK(rx_bits == 16, $sformatf("%0d bits in a word", rx_bits))
    rx_bits = 0;
  end
  always @(posedge clk) if (!enb) low_clks++; else if (low_clks != 0) begin last_low = low_clks; low_clks = 0; end

  task automatic pulse(int s, sample_t v);
    @(negedge clk);
    src_data[s] = v; src_valid[s] = 1;
    @(negedge clk);
    src_valid[s] = 0;
  endtask

  initial begin
    for (int s = 0; s < NSRC; s++) begin src_data[s] = '0; src_valid[s] = 0; end
    repeat (4) @(negedge clk); rst = 0;
    repeat (4) @(negedge clk);
    `TB_CHECK(enb && words == 0, "idle after reset")

    for (int n = 0; n < 40; n++) begin
      int s, w0;
      sample_t v;
      s = $urandom_range(NSRC - 1);
      v = sample_t'($urandom);
      if (n < 4) v = (n == 0) ? 16'sh8000 : (n == 1) ? 16'sh7FFF : (n == 2) ? 16'sh0000 : -16'sh1;
      sel = 3'(s);
      w0 = words;
      // a sample on another source does nothing
      pulse((s + 1) % NSRC, sample_t'($urandom));
      repeat (3) @(negedge clk);
      `TB_CHECK(enb, "unselected source ignored")
      pulse(s, v);
      // a second sample while busy is skipped
      repeat (10) @(negedge clk);
      pulse(s, sample_t'($urandom));
      wait (words == w0 + 1);
      repeat (2 * 16 * HALF + 10) @(negedge clk);
      `TB_CHECK(words == w0 + 1, "one word per accepted sample")
      `TB_CHECK(rx_word == {~v[15], v[14:0]}, $sformatf("DAC word %h for sample %h", rx_word, v))
      `TB_CHECK(last_low == 2 * 16 * HALF, $sformatf("enable low for %0d clocks", last_low))
    end
    `TB_FINISH
  end
endmodule
