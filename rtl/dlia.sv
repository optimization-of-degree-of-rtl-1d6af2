// dlia: one digital lock-in amplifier sub-system: an ADC input, a shared sample
// datapath and two PSD channels, each demodulating the input at the frequency of its
// own sync signal.
//
// Datapath: adc_controller -> fir_lowpass -> per channel downsampler -> psd. For each
// channel c the external sync (`sync_in[c]`, asynchronous, brought in through two
// flip-flops) passes a delay_line, which sets the fine phase. The delayed sync
// drives sync_measure, whose divide value sets the pulse_gen rate so that exactly
// 2^spp_log2 samples are taken per sync period, the first on the sync edge; the same
// edge re-aligns the PSD's reference index. Each PSD reads its two reference tables
// (ref_lut, inphase and quadrature) and produces an inphase/quadrature mean every
// 2^avg_log2 samples.
//
// Host access to the four tables of this DLIA: `lut_sel` = 2*c + r picks channel c,
// table r (0 inphase, 1 quadrature); `lut_addr` is the word in the table. Read data
// returns with `lut_rd_valid` one cycle after `lut_re_n`.
//
// `taps` exposes four sample-path points (ADC, filter, downsampler 1 and 2) for the
// DAC driver and for capture. The block structure follows the document; the
// synchroniser on the sync inputs, a delay line per channel, and taking the ADC's
// sync re-alignment from channel 0 are this design's choices.
module dlia
  import dlia_pkg::*;
#(
  parameter int FIR_ORDER   = 64,
  parameter int STORE_DEPTH = 1024,
  parameter int CNT_W       = 24
) (
  input  logic              clk,
  input  logic              rst,
  // ADC pins
  output logic              adc_start_convert,
  input  logic              adc_busyb,
  input  logic              adc_sclk,
  input  logic              adc_sdata,
  // external syncs
  input  logic [1:0]        sync_in,
  // configuration
  input  logic [15:0]       adc_div,
  input  logic [15:0]       adc_pw,
  input  logic              adc_sync_align,
  input  ch_cfg_t           ch_cfg [2],
  input  logic [1:0]        flush,
  // host access to the reference tables
  input  logic              lut_we_n,
  input  logic              lut_re_n,
  input  logic [1:0]        lut_sel,
  input  logic [LUT_AW-1:0] lut_addr,
  input  logic [15:0]       lut_wdata,
  output logic [15:0]       lut_rdata,
  output logic              lut_rd_valid,
  // results and observation
  output psd_result_t       result [2],
  output logic [1:0]        result_valid,
  output logic [LUT_AW-1:0] phase [2],
  output logic [CNT_W-1:0]  sync_period [2],
  output tap_t              taps [TAP_PER_DLIA],
  output logic              adc_error
);

  // ---------------- shared input path ----------------
  logic [1:0] sync_m, sync_s;

  always_ff @(posedge clk) begin
    if (rst) begin
      sync_m <= '0;
      sync_s <= '0;
    end else begin
      sync_m <= sync_in;
      sync_s <= sync_m;
    end
  end

  sample_t adc_sample, lpf_sample;
  logic    adc_rdy, lpf_valid;

  adc_controller u_adc (
    .clk, .rst, .adc_clk_divide(adc_div), .pulse_width(adc_pw),
    .sync(sync_s[0]), .sync_align(adc_sync_align),
    .start_convert(adc_start_convert), .busyb(adc_busyb), .sclk(adc_sclk), .sdata(adc_sdata),
    .sample_out(adc_sample), .sample_rdy(adc_rdy), .error(adc_error)
  );

  fir_lowpass #(.N(FIR_ORDER)) u_lpf (
    .clk, .rst, .in_valid(adc_rdy), .filter_in(adc_sample),
    .out_valid(lpf_valid), .filter_out(lpf_sample)
  );

  assign taps[0] = '{data: adc_sample, valid: adc_rdy};
  assign taps[1] = '{data: lpf_sample, valid: lpf_valid};

  logic [15:0] lut_rd [4];
  logic [3:0]  lut_rv;

  // ---------------- two PSD channels ----------------
  for (genvar c = 0; c < 2; c++) begin : g_ch
    logic             sync_dly, sync_rise, period_ok, strobe, ds_valid;
    logic [CNT_W-1:0] divide;
    sample_t          ds_sample, ref_i, ref_q;
    logic [LUT_AW-1:0] idx;

    delay_line #(.TAPS(DLY_TAPS)) u_dly (
      .clk, .rst, .clk_divide(ch_cfg[c].dly_div), .sync_delay(ch_cfg[c].dly_sel),
      .sync_in(sync_s[c]), .sync_out(sync_dly)
    );

    sync_measure #(.CNT_W(CNT_W)) u_meas (
      .clk, .rst, .sync(sync_dly), .spp_log2(ch_cfg[c].spp_log2),
      .sync_rise, .sync_period(sync_period[c]), .clk_divide(divide), .period_valid(period_ok)
    );

    pulse_gen #(.CNT_W(CNT_W)) u_pgen (
      .clk, .rst, .enable(period_ok), .sync_rise, .spp_log2(ch_cfg[c].spp_log2),
      .clk_divide(divide), .sample_strobe(strobe)
    );

    downsampler u_ds (
      .clk, .rst, .sample_strobe(strobe), .filter_out(lpf_sample),
      .sample_out(ds_sample), .sample_valid(ds_valid)
    );

    assign taps[2 + c] = '{data: ds_sample, valid: ds_valid};

    ref_lut #(.DEPTH(LUT_DEPTH)) u_lut_i (
      .clk, .rst,
      .we_n(lut_we_n | (lut_sel != 2'(2*c))), .re_n(lut_re_n | (lut_sel != 2'(2*c))),
      .addr(lut_addr), .data_in(lut_wdata), .data_out(lut_rd[2*c]), .rd_valid(lut_rv[2*c]),
      .idx, .ref_out(ref_i)
    );

    ref_lut #(.DEPTH(LUT_DEPTH)) u_lut_q (
      .clk, .rst,
      .we_n(lut_we_n | (lut_sel != 2'(2*c+1))), .re_n(lut_re_n | (lut_sel != 2'(2*c+1))),
      .addr(lut_addr), .data_in(lut_wdata), .data_out(lut_rd[2*c+1]), .rd_valid(lut_rv[2*c+1]),
      .idx, .ref_out(ref_q)
    );

    psd #(.STORE_DEPTH(STORE_DEPTH), .TABLE_DEPTH(LUT_DEPTH)) u_psd (
      .clk, .rst, .sample_in(ds_sample), .sample_valid(ds_valid), .sync_rise,
      .spp_log2(ch_cfg[c].spp_log2), .phase_offset(ch_cfg[c].phase),
      .auto_sync(ch_cfg[c].auto_sync), .avg_log2(ch_cfg[c].avg_log2), .flush(flush[c]),
      .lut_idx(idx), .ref_i, .ref_q,
      .inphase_mean(result[c].i), .quad_mean(result[c].q), .mean_valid(result_valid[c]),
      .phase(phase[c])
    );
  end

  // ---------------- table read-back ----------------
  logic [1:0] rd_sel_q;
  always_ff @(posedge clk) begin
    if (rst)            rd_sel_q <= '0;
    else if (!lut_re_n) rd_sel_q <= lut_sel;
  end
  assign lut_rdata    = lut_rd[rd_sel_q];
  assign lut_rd_valid = |lut_rv;

endmodule
