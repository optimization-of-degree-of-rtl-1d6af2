// dac_driver: sends any selected point of the sample datapath to an external
// serial DAC, so it can be watched as a real-time voltage.
//
// `sel` picks one of NSRC sample streams (sample word plus valid pulse). When the
// selected stream delivers a sample and the driver is idle, the word is converted
// from two's complement to offset binary (MSB inverted, mid-scale = 0) and shifted
// out MSB first: `dac_enb` goes low for the whole word, `dac_data` changes while
// `dac_sclk` is low and is stable across each rising edge. Each half period of
// `dac_sclk` lasts SCLK_HALF system clocks, so a word takes 2*W*SCLK_HALF + 1 clocks;
// samples arriving meanwhile are skipped (at the platform's 100 kHz rate and a 50 MHz
// clock a word takes 129 of the 500 clocks between samples).
//
// The document gives this block's function and its three pins; the serial format,
// offset-binary coding and clock rate are this design's choices.
module dac_driver
  import dlia_pkg::*;
#(
  parameter int NSRC      = 8,
  parameter int SCLK_HALF = 4,
  localparam int SW       = $clog2(NSRC)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [SW-1:0] sel,
  input  sample_t       src_data  [NSRC],
  input  logic          src_valid [NSRC],
  output logic          dac_sclk,
  output logic          dac_enb,
  output logic          dac_data
);

  localparam int W = SAMPLE_W;

  logic [W-1:0]                   shreg;
  logic [$clog2(W+1)-1:0]         bits_left;
  logic [$clog2(SCLK_HALF+1)-1:0] tick;

  always_ff @(posedge clk) begin
    if (rst) begin
      shreg     <= '0;
      bits_left <= '0;
      tick      <= '0;
      dac_sclk  <= 1'b0;
      dac_enb   <= 1'b1;
      dac_data  <= 1'b0;
    end else if (bits_left == '0) begin
      dac_sclk <= 1'b0;
      dac_enb  <= 1'b1;
      if (src_valid[sel]) begin
        shreg     <= {src_data[sel][W-1] ^ 1'b1, src_data[sel][W-2:0]};
        dac_data  <= ~src_data[sel][W-1];
        dac_enb   <= 1'b0;
        bits_left <= ($clog2(W+1))'(W);
        tick      <= '0;
      end
    end else if (int'(tick) == SCLK_HALF - 1) begin
      tick     <= '0;
      dac_sclk <= ~dac_sclk;
      if (dac_sclk) begin
        // falling edge: next bit, or end of word
        bits_left <= bits_left - 1'b1;
        shreg     <= {shreg[W-2:0], 1'b0};
        dac_data  <= shreg[W-2];
        if (bits_left == 1) dac_enb <= 1'b1;
      end
    end else begin
      tick <= tick + 1'b1;
    end
  end

endmodule
